// cp_remove: cyclic prefix removal.
//
// Every DMT symbol arrives as CP_LEN prefix samples followed by SYM_LEN symbol
// samples. A sample counter, aligned to the first sample after reset, discards
// the prefix and passes the SYM_LEN samples on, flagging the first (out_sof).
// The stream is combinational from input to output (valid/ready pass straight
// through for kept samples; dropped samples are accepted without output).
// The 16-sample prefix and 256-sample symbol are the receiver's figures; symbol
// alignment at reset is this design's assumption (start-up is already done).
module cp_remove #(
  parameter int unsigned CP_LEN  = 16,
  parameter int unsigned SYM_LEN = 256,
  parameter int unsigned DW      = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data,
  output logic                 out_sof
);
  localparam int unsigned TOT = CP_LEN + SYM_LEN;
  localparam int unsigned CW = $clog2(TOT);
  logic [CW-1:0]          cnt;
  logic                   in_cp;

  assign in_cp     = cnt < CW'(CP_LEN);
  assign out_valid = in_valid && !in_cp;
  assign out_data  = in_data;
  assign out_sof   = cnt == CW'(CP_LEN);
  assign in_ready  = in_cp || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid && in_ready) cnt <= (cnt == CW'(TOT - 1)) ? '0 : cnt + 1'b1;
  end
endmodule
