// sync_frame_drop: removes the synchronisation frame of each superframe.
//
// The transmitter inserts a synchronisation frame as the last of every PERIOD
// frames. It carries no user data, so this block counts frames of FRAME_LEN
// samples and passes frames 0..PERIOD-2 of each superframe, accepting and
// discarding all samples of frame PERIOD-1. out_sof marks the first sample of a
// passed frame and out_frame gives its index (0..PERIOD-2) in the superframe.
// Valid/ready pass combinationally for kept samples. Superframe alignment at
// reset is assumed; the 69-frame period and dropping of the last frame follow
// the receiver description.
module sync_frame_drop #(
  parameter int unsigned FRAME_LEN = 256,
  parameter int unsigned PERIOD    = 69,
  parameter int unsigned DW        = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic signed [DW-1:0]          in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic signed [DW-1:0]          out_data,
  output logic                          out_sof,
  output logic [$clog2(PERIOD)-1:0]     out_frame,
  output logic                          sync_dropped  // pulses on the last sample of a dropped frame
);
  localparam int unsigned SW = $clog2(FRAME_LEN);
  localparam int unsigned FW = $clog2(PERIOD);
  logic [SW-1:0]                scnt;
  logic [FW-1:0]                fcnt;
  logic                         is_sync;

  assign is_sync      = fcnt == FW'(PERIOD - 1);
  assign out_valid    = in_valid && !is_sync;
  assign out_data     = in_data;
  assign out_sof      = scnt == 0;
  assign out_frame    = fcnt;
  assign in_ready     = is_sync || out_ready;
  assign sync_dropped = in_valid && is_sync && scnt == SW'(FRAME_LEN - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scnt <= '0;
      fcnt <= '0;
    end else if (in_valid && in_ready) begin
      if (scnt == SW'(FRAME_LEN - 1)) begin
        scnt <= '0;
        fcnt <= (fcnt == FW'(PERIOD - 1)) ? '0 : fcnt + 1'b1;
      end else begin
        scnt <= scnt + 1'b1;
      end
    end
  end
endmodule
