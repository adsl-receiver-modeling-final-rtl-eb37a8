// descrambler: self-synchronising descrambler for the received byte stream.
//
// The transmitter scrambles the serial bit stream with d'(n) = d(n) ^ d'(n-18)
// ^ d'(n-23). This block inverts it with a 23-bit shift register of received
// bits: d(n) = d'(n) ^ d'(n-18) ^ d'(n-23). Being fed only by received bits it
// needs no synchronisation and an error spreads over at most 3 output bits.
// Bytes are taken bit 0 first; eight bits are handled in one cycle.
//
// Interface: valid/ready byte streams with one output register (latency one
// cycle, one byte per cycle). The register starts at zero after reset.
// The shift-register descrambler is the receiver's; the taps 18 and 23 are those
// of the ADSL standard and the bit order is this design's choice.
module descrambler (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data
);
  logic [22:0] hist;      // hist[0] = most recent received bit
  logic [22:0] hist_nx;
  logic [7:0]  dec;

  always_comb begin
    hist_nx = hist;
    for (int b = 0; b < 8; b++) begin
      dec[b]  = in_data[b] ^ hist_nx[17] ^ hist_nx[22];
      hist_nx = {hist_nx[21:0], in_data[b]};
    end
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_valid && in_ready) begin
      hist      <= hist_nx;
      out_data  <= dec;
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end
  // Handshake rule: an offered output stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
