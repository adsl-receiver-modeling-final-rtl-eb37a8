// teq_fir: time-domain equalizer (TEQ), a direct-form FIR filter.
//
// The receiver shortens the channel impulse response with an FIR filter whose
// taps are found once at initialisation and then held fixed (no adaptive update).
// Taps are written through cfg_we/cfg_addr/cfg_coef; tap k multiplies the sample
// k steps old. Each accepted input sample shifts the delay line and produces one
// output sample y = sum(c_k * x_{n-k}) >> CFRAC, rounded and saturated to DW bits.
//
// Interface: valid/ready streams on both sides; one output register, so the
// latency is one cycle and the throughput one sample per cycle.
// The tap count, the tap format (Q2.14) and the saturation are this design's own
// choices; the filter structure and the fixed taps follow the receiver description.
module teq_fir #(
  parameter int unsigned NTAPS = 16,
  parameter int unsigned DW    = 16,
  parameter int unsigned CW    = 16,
  parameter int unsigned CFRAC = 14
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_we,
  input  logic [$clog2(NTAPS)-1:0]  cfg_addr,
  input  logic signed [CW-1:0]      cfg_coef,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic signed [DW-1:0]      in_data,
  output logic                      out_valid,
  input  logic                      out_ready,
  output logic signed [DW-1:0]      out_data
);
  localparam int unsigned AW = DW + CW + $clog2(NTAPS) + 1;

  logic signed [CW-1:0] coef [NTAPS];
  logic signed [DW-1:0] dline [NTAPS];
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] shifted;
  logic signed [DW-1:0] sat;

  assign in_ready = !out_valid || out_ready;

  // Sum of products with the new sample in position 0.
  always_comb begin
    acc = AW'(in_data) * AW'(coef[0]);
    for (int k = 1; k < NTAPS; k++) acc += AW'(dline[k-1]) * AW'(coef[k]);
    shifted = (acc + (AW'(1) <<< (CFRAC - 1))) >>> CFRAC;
    if (shifted > AW'((2**(DW-1)) - 1))       sat = {1'b0, {(DW-1){1'b1}}};
    else if (shifted < -AW'(2**(DW-1)))       sat = {1'b1, {(DW-1){1'b0}}};
    else                                      sat = shifted[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) begin
        coef[k]  <= (k == 0) ? CW'(1 << CFRAC) : '0;
        dline[k] <= '0;
      end
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (cfg_we) coef[cfg_addr] <= cfg_coef;
      if (in_valid && in_ready) begin
        dline[0] <= in_data;
        for (int k = 1; k < NTAPS; k++) dline[k] <= dline[k-1];
        out_data  <= sat;
        out_valid <= 1'b1;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
  // Handshake rule: an offered output stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
