// bit_decoder: constellation slicer and tone-to-bit-stream demapper.
//
// Takes the N complex FFT bins of one symbol in bin order and turns every data
// tone into the b bits the bit-loading table assigns to it (0..16 bits per tone,
// tones 1..127; tone 64 is the pilot and never carries data; bins 0 and 128..255
// carry none either). A coordinate is sliced to the nearest odd integer of the
// constellation grid, whose unit is 2^UNIT_SHIFT LSBs: q = floor(v / 2^(UNIT_SHIFT+1)),
// point = 2q+1, q clamped to the bits of that coordinate. For b bits
// v[b-1..0] the X coordinate holds v[b-1], v[b-3], ... and the Y coordinate
// v[b-2], v[b-4], ..., most significant first, each completed by an implied
// LSB of 1 (the square-grid rule of the ADSL constellation encoder). X takes
// ceil(b/2) bits and Y floor(b/2); for odd b this gives a rectangular grid.
// Bits enter a shift accumulator LSB first (v[0] first, tones in ascending
// order) and leave as bytes, bit 0 first. Bits left over at the end of a
// symbol (fewer than 8) are discarded.
//
// Interface: valid/ready on both sides. One tone is accepted per cycle while
// fewer than 8 bits wait; one byte leaves per cycle. The table is written with
// cfg_we/cfg_tone/cfg_bits and resets to 0 bits on every tone.
// The pilot tone, the 16-bit limit and the bit interleaving of the coordinates
// follow the receiver description; the slicer scale, the rectangular grid for
// odd b and the bit order are this design's own choices.
module bit_decoder #(
  parameter int unsigned N          = 256,
  parameter int unsigned DW         = 16,
  parameter int unsigned UNIT_SHIFT = 4,
  parameter int unsigned NTONE      = 128,
  parameter int unsigned PILOT      = 64
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cfg_we,
  input  logic [$clog2(NTONE)-1:0]    cfg_tone,
  input  logic [4:0]                  cfg_bits,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [DW-1:0]        in_re,
  input  logic signed [DW-1:0]        in_im,
  input  logic [$clog2(N)-1:0]        in_idx,
  input  logic                        in_last,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [7:0]                  out_data,
  output logic                        frame_done   // pulses when a symbol's last byte has been produced
);
  logic [4:0]  btab [NTONE];
  logic [31:0] acc;
  logic [5:0]  acnt;
  logic        flush;

  logic [4:0]  b;
  logic [15:0] v;

  // Nearest odd grid point index q (point = 2q+1), clamped to 'nb' bits.
  function automatic logic [7:0] slice(input logic signed [DW-1:0] c, input logic [3:0] nb);
    logic signed [DW-1:0] q;
    logic signed [DW-1:0] lim;
    q   = c >>> (UNIT_SHIFT + 1);
    lim = DW'(1) <<< (nb - 1);
    if (nb == 0)         q = '0;
    else if (q >= lim)   q = lim - 1'b1;
    else if (q < -lim)   q = -lim;
    return q[7:0];
  endfunction

  always_comb begin
    logic [3:0] bx, by;
    logic [7:0] xi, yi;
    int t;
    if (in_idx == '0 || 32'(in_idx) >= NTONE || 32'(in_idx) == PILOT) b = '0;
    else b = btab[in_idx[$clog2(NTONE)-1:0]];
    bx = 4'((5'(b) + 5'd1) >> 1);
    by = 4'(b >> 1);
    t  = 0;
    xi = slice(in_re, bx);
    yi = slice(in_im, by);
    v  = '0;
    for (int jj = 0; jj < 16; jj++) begin
      if (jj < b) begin
        t = int'(b) - 1 - jj;
        if (t % 2 == 0) v[jj] = xi[(int'(bx) - 1 - t / 2) & 7];
        else            v[jj] = yi[(int'(by) - 1 - (t - 1) / 2) & 7];
      end
    end
  end

  assign in_ready  = (acnt < 6'd8) && !flush;
  assign out_valid = acnt >= 6'd8;
  assign out_data  = acc[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTONE; k++) btab[k] <= '0;
      acc        <= '0;
      acnt       <= '0;
      flush      <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (cfg_we) btab[cfg_tone] <= (cfg_bits > 5'd16) ? 5'd16 : cfg_bits;
      if (in_valid && in_ready) begin
        acc   <= acc | (32'(v) << acnt);
        acnt  <= acnt + 6'(b);
        flush <= in_last;
      end else if (out_valid && out_ready) begin
        acc  <= acc >> 8;
        acnt <= acnt - 6'd8;
      end else if (flush) begin
        acc        <= '0;
        acnt       <= '0;
        flush      <= 1'b0;
        frame_done <= 1'b1;
      end
    end
  end
endmodule
