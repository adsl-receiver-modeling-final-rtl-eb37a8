// adsl_pkg: constants and arithmetic helpers shared by the ADSL receiver blocks.
//
// Frame geometry (16-sample cyclic prefix, 256-point FFT, 69-frame superframe
// with the last frame a synchronisation frame, 68 data frames, tone 64 as pilot)
// follows the G.Lite receiver this RTL implements. The GF(256) field used by the
// Reed-Solomon decoder is generated by x^8+x^4+x^3+x^2+1 (0x11D), the field of
// the ADSL standards; the arithmetic below is plain combinational logic:
// gf_mul is a shift-and-add product, gf_inv raises to the power 254.
package adsl_pkg;

  localparam int unsigned CP_LEN        = 16;   // cyclic prefix samples
  localparam int unsigned FFT_N         = 256;  // samples per symbol
  localparam int unsigned SF_PERIOD     = 69;   // frames per superframe
  localparam int unsigned DATA_FRAMES   = 68;   // data frames per superframe
  localparam int unsigned PILOT_TONE    = 64;   // carries no data
  localparam int unsigned MAX_BITS      = 16;   // bits per tone
  localparam int unsigned NUM_TONES     = 128;  // tones 0..127 of the downstream band
  localparam int unsigned RS_NMAX       = 255;  // longest RS codeword
  localparam int unsigned RS_RMAX       = 16;   // most parity bytes
  localparam int unsigned D_MAX         = 16;   // deepest interleaving
  localparam logic [8:0]  GF_POLY       = 9'h11D;
  localparam logic [7:0]  CRC8_POLY     = 8'h1D; // x^8+x^4+x^3+x^2+1, x^8 implied

  // Product of two GF(256) elements.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ GF_POLY[7:0]) : (aa << 1);
    end
    return p;
  endfunction

  // Inverse of a GF(256) element (a^254); returns 0 for 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] sq;
    logic [7:0] r;
    sq = gf_mul(a, a);          // a^2
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gf_mul(sq, sq);      // a^4 .. a^128
      r  = gf_mul(r, sq);
    end
    return r;                   // a^(2+4+...+128) = a^254
  endfunction

  // alpha^e for 0 <= e < 255, alpha = 2.
  function automatic logic [7:0] gf_pow_alpha(input int unsigned e);
    logic [7:0] r;
    logic [7:0] base;
    r    = 8'h01;
    base = 8'h02;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) r = gf_mul(r, base);
      base = gf_mul(base, base);
    end
    return r;
  endfunction

endpackage
