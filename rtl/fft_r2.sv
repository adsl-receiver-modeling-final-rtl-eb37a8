// fft_r2: N-point FFT of one real-valued DMT symbol (N = 256 by default).
//
// Iterative in-place radix-2 decimation-in-time FFT with one butterfly unit.
// Phase LOAD accepts N real samples and stores sample n at the bit-reversed
// address of n. Phase COMPUTE runs log2(N) stages of N/2 butterflies, one per
// cycle: X0 = (A + W*B)/2, X1 = (A - W*B)/2 with W = exp(-j*2*pi*t/N), so the
// result is the DFT scaled by 1/N and cannot overflow. Phase UNLOAD streams the
// N complex bins in natural order (out_idx = bin number, out_last on bin N-1).
// Twiddles are Q2.14 values of cos/sin computed at elaboration time.
//
// Timing: N load cycles, log2(N)*N/2 compute cycles, N unload cycles per symbol
// (256 + 1024 + 256 at N = 256); in_ready is low outside LOAD.
// The 256-point size follows the receiver; the architecture, the fixed-point
// formats and the 1/N scaling are this design's own choices.
module fft_r2 #(
  parameter int unsigned N  = 256,
  parameter int unsigned DW = 16,
  parameter int unsigned TW = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [DW-1:0]   in_data,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [DW-1:0]   out_re,
  output logic signed [DW-1:0]   out_im,
  output logic [$clog2(N)-1:0]   out_idx,
  output logic                   out_last
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned AW = L;

  typedef logic signed [TW-1:0] tw_t [N/2];
  function automatic tw_t mk_tw(input bit sine);
    tw_t r;
    for (int i = 0; i < N/2; i++) begin
      real ang;
      real v;
      ang  = 6.283185307179586 * i / N;
      v    = sine ? -$sin(ang) : $cos(ang);
      r[i] = TW'($rtoi(v * (2.0 ** (TW - 2)) + ((v >= 0.0) ? 0.5 : -0.5)));
    end
    return r;
  endfunction
  localparam tw_t W_RE = mk_tw(1'b0);
  localparam tw_t W_IM = mk_tw(1'b1);

  typedef enum logic [1:0] {S_LOAD, S_COMP, S_UNLOAD} state_t;
  state_t state;

  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];

  logic [AW-1:0]        cnt;     // load / unload index, butterfly index in a stage
  logic [$clog2(L)-1:0] stage;

  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] a);
    for (int i = 0; i < AW; i++) bitrev[i] = a[AW-1-i];
  endfunction

  // Butterfly addressing for butterfly j = cnt[AW-2:0] of stage s.
  logic [AW-1:0]   i0, i1, half, j, pos, tidx;
  logic signed [DW-1:0] ar, ai, br, bi;
  logic signed [TW-1:0] wr, wi;
  logic signed [DW+TW:0] pr, pi;     // W*B before scaling
  logic signed [DW+1:0]  tr, ti;     // W*B in data format, one guard bit
  logic signed [DW+2:0]  s0r, s0i, s1r, s1i;
  logic signed [DW-1:0]  x0r, x0i, x1r, x1i;

  function automatic logic signed [DW-1:0] sat_half(input logic signed [DW+2:0] v);
    logic signed [DW+2:0] h;
    h = (v + 1) >>> 1;
    if (h > (DW+3)'((2 ** (DW - 1)) - 1))  return {1'b0, {(DW-1){1'b1}}};
    if (h < -(DW+3)'(2 ** (DW - 1)))       return {1'b1, {(DW-1){1'b0}}};
    return h[DW-1:0];
  endfunction

  always_comb begin
    half = AW'(1) << stage;
    j    = {1'b0, cnt[AW-2:0]};
    pos  = j & (half - 1'b1);
    i0   = ((j >> stage) << (stage + 1)) | pos;
    i1   = i0 | half;
    tidx = pos << (AW'(L - 1) - AW'(stage));
    ar = mem_re[i0];  ai = mem_im[i0];
    br = mem_re[i1];  bi = mem_im[i1];
    wr = W_RE[tidx[AW-2:0]];
    wi = W_IM[tidx[AW-2:0]];
    pr = (DW+TW+1)'(br) * (DW+TW+1)'(wr) - (DW+TW+1)'(bi) * (DW+TW+1)'(wi);
    pi = (DW+TW+1)'(br) * (DW+TW+1)'(wi) + (DW+TW+1)'(bi) * (DW+TW+1)'(wr);
    tr = (DW+2)'((pr + (DW+TW+1)'(1 << (TW - 3))) >>> (TW - 2));
    ti = (DW+2)'((pi + (DW+TW+1)'(1 << (TW - 3))) >>> (TW - 2));
    s0r = (DW+3)'(ar) + (DW+3)'(tr);
    s0i = (DW+3)'(ai) + (DW+3)'(ti);
    s1r = (DW+3)'(ar) - (DW+3)'(tr);
    s1i = (DW+3)'(ai) - (DW+3)'(ti);
    x0r = sat_half(s0r);  x0i = sat_half(s0i);
    x1r = sat_half(s1r);  x1i = sat_half(s1i);
  end

  assign in_ready  = state == S_LOAD;
  assign out_valid = state == S_UNLOAD;
  assign out_re    = mem_re[cnt];
  assign out_im    = mem_im[cnt];
  assign out_idx   = cnt;
  assign out_last  = cnt == AW'(N - 1);

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_re[bitrev(cnt)] <= in_data;
      mem_im[bitrev(cnt)] <= '0;
    end else if (state == S_COMP) begin
      mem_re[i0] <= x0r;  mem_im[i0] <= x0i;
      mem_re[i1] <= x1r;  mem_im[i1] <= x1i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            state <= S_COMP;
            stage <= '0;
          end
        end
        S_COMP: begin
          if (cnt[AW-2:0] == {(AW-1){1'b1}}) begin
            cnt <= '0;
            if (stage == $bits(stage)'(L - 1)) state <= S_UNLOAD;
            else                stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end
  // Handshake rule: an offered output stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_idx));

endmodule
