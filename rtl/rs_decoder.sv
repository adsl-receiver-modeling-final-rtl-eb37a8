// rs_decoder: Reed-Solomon decoder over GF(256) for shortened codewords.
//
// A codeword has N bytes (N <= 255): K = N - R data bytes followed by R parity
// bytes (R even, 0..16). The code's generator polynomial has the roots
// alpha^0 .. alpha^(R-1) in the field built on x^8+x^4+x^3+x^2+1; the first byte
// of the codeword is the coefficient of x^(N-1). Up to R/2 byte errors are
// corrected. Decoding runs as a sequence of phases on one stored codeword:
//   LOAD   N cycles  store the bytes, form the R syndromes by Horner's rule
//   BM     R cycles  Berlekamp-Massey iteration for the error locator Lambda(x)
//   OMEGA  R cycles  error evaluator Omega(x) = S(x)*Lambda(x) mod x^R
//   CHIEN  N cycles  test every position for a root of Lambda; Forney's formula
//                    e = Omega(x) / (odd part of Lambda)(x) gives the error value
//   OUT    K cycles  stream the K data bytes with the corrections applied
// If the number of roots found differs from the degree of Lambda, or exceeds
// R/2, the codeword is uncorrectable: it is passed on unchanged and dec_fail is
// set. R = 0 skips straight from LOAD to OUT.
//
// Interface: valid/ready byte streams; in_ready is high only in LOAD. cfg_n and
// cfg_r are sampled when a codeword starts. dec_done pulses at the end of CHIEN
// (or LOAD when R = 0) with dec_nerr / dec_fail valid until the next codeword.
// The code size, the R/2 correction limit and the use of Berlekamp's iterative
// algorithm follow the receiver description; the field, the root convention and
// the phase-sequential organisation are this design's choices (those of the ADSL
// standard for field and roots).
module rs_decoder
  import adsl_pkg::*;
#(
  parameter int unsigned NMAX = 255,
  parameter int unsigned RMAX = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 cfg_n,
  input  logic [$clog2(RMAX+1)-1:0]  cfg_r,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [7:0]                 in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [7:0]                 out_data,
  output logic                       out_last,
  output logic                       dec_done,
  output logic [$clog2(RMAX+1)-1:0]  dec_nerr,
  output logic                       dec_fail
);
  localparam int unsigned TMAX = RMAX / 2;
  localparam int unsigned RW   = $clog2(RMAX + 1);

  typedef enum logic [2:0] {S_LOAD, S_BM, S_OMEGA, S_CHIEN, S_OUT} state_t;
  state_t state;

  logic [7:0] cw [NMAX];
  logic [7:0] n_q;
  logic [RW-1:0] r_q;
  logic [7:0] k;                 // byte position
  logic [RW-1:0] r;              // BM / OMEGA step

  logic [7:0] syn  [RMAX];
  logic [7:0] lam  [RMAX+1];
  logic [7:0] bx   [RMAX+1];     // x^m * B(x)
  logic [7:0] omg  [RMAX];
  logic [7:0] bdis;              // previous nonzero discrepancy
  logic [RW-1:0] llen;           // current LFSR length L

  logic [7:0] lt [RMAX+1];       // Chien terms Lambda_i * x^i
  logic [7:0] wt [RMAX];         // Chien terms Omega_i * x^i
  logic [7:0] epos [TMAX];
  logic [7:0] eval [TMAX];
  logic [RW-1:0] nroot;
  logic          fail_q;

  // Constant multipliers alpha^j (syndromes) and alpha^-i (Chien stepping).
  function automatic logic [7:0] alpha_pow(input int e);
    return gf_pow_alpha(32'((e % 255 + 255) % 255));
  endfunction

  // Sum_i lam_i * syn_{r-i}: the BM discrepancy, or Omega_r in phase OMEGA.
  logic [7:0] conv;
  always_comb begin
    conv = '0;
    for (int i = 0; i <= RMAX; i++)
      if (i <= int'(r) && int'(r) - i < RMAX) conv ^= gf_mul(lam[i], syn[(int'(r) - i) % RMAX]);
  end

  // BM update.
  logic [7:0] scale;
  logic [7:0] lam_nx [RMAX+1];
  always_comb begin
    scale = gf_mul(conv, gf_inv(bdis));
    for (int i = 0; i <= RMAX; i++) lam_nx[i] = lam[i] ^ gf_mul(scale, bx[i]);
  end

  // Chien evaluation at the current position.
  logic [7:0] lsum, lodd, wsum, evalue;
  always_comb begin
    lsum = '0;
    lodd = '0;
    wsum = '0;
    for (int i = 0; i <= RMAX; i++) begin
      lsum ^= lt[i];
      if (i % 2 == 1) lodd ^= lt[i];
    end
    for (int i = 0; i < RMAX; i++) wsum ^= wt[i];
    evalue = gf_mul(wsum, gf_inv(lodd));
  end

  // Correction of the byte being output.
  logic [7:0] corr;
  always_comb begin
    corr = '0;
    if (!fail_q)
      for (int e = 0; e < TMAX; e++)
        if (e < int'(nroot) && epos[e] == k) corr ^= eval[e];
  end

  assign in_ready  = state == S_LOAD;
  assign out_valid = state == S_OUT;
  assign out_data  = cw[k] ^ corr;
  assign out_last  = k == n_q - 8'(r_q) - 1'b1;

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) cw[k] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      n_q      <= '0;
      r_q      <= '0;
      k        <= '0;
      r        <= '0;
      bdis     <= 8'h01;
      llen     <= '0;
      nroot    <= '0;
      fail_q   <= 1'b0;
      dec_done <= 1'b0;
      dec_nerr <= '0;
      dec_fail <= 1'b0;
      for (int i = 0; i < RMAX; i++) begin
        syn[i] <= '0;
        omg[i] <= '0;
        wt[i]  <= '0;
      end
      for (int i = 0; i <= RMAX; i++) begin
        lam[i] <= '0;
        bx[i]  <= '0;
        lt[i]  <= '0;
      end
      for (int e = 0; e < TMAX; e++) begin
        epos[e] <= '0;
        eval[e] <= '0;
      end
    end else begin
      dec_done <= 1'b0;
      case (state)
        S_LOAD: if (in_valid) begin
          if (k == '0) begin
            // first byte: latch the configuration, restart the syndromes
            n_q <= cfg_n;
            r_q <= cfg_r;
            for (int j = 0; j < RMAX; j++) syn[j] <= in_data;
          end else begin
            for (int j = 0; j < RMAX; j++) syn[j] <= gf_mul(syn[j], alpha_pow(j)) ^ in_data;
          end
          if ((k == '0 && cfg_n == 8'd1) || (k != '0 && k == n_q - 1'b1)) begin
            k      <= '0;
            r      <= '0;
            nroot  <= '0;
            fail_q <= 1'b0;
            bdis   <= 8'h01;
            llen   <= '0;
            for (int i = 0; i <= RMAX; i++) begin
              lam[i] <= (i == 0) ? 8'h01 : 8'h00;
              bx[i]  <= (i == 1) ? 8'h01 : 8'h00;
            end
            if ((k == '0 ? cfg_r : r_q) == '0) begin
              state    <= S_OUT;
              dec_done <= 1'b1;
              dec_nerr <= '0;
              dec_fail <= 1'b0;
            end else begin
              state <= S_BM;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_BM: begin
          if (conv == '0) begin
            for (int i = 0; i <= RMAX; i++) bx[i] <= (i == 0) ? 8'h00 : bx[i-1];
          end else if ({llen, 1'b0} <= (RW+1)'(r)) begin
            for (int i = 0; i <= RMAX; i++) begin
              lam[i] <= lam_nx[i];
              bx[i]  <= (i == 0) ? 8'h00 : lam[i-1];
            end
            llen <= r + 1'b1 - llen;
            bdis <= conv;
          end else begin
            for (int i = 0; i <= RMAX; i++) begin
              lam[i] <= lam_nx[i];
              bx[i]  <= (i == 0) ? 8'h00 : bx[i-1];
            end
          end
          if (r == r_q - 1'b1) begin
            r     <= '0;
            state <= S_OMEGA;
          end else begin
            r <= r + 1'b1;
          end
        end
        S_OMEGA: begin
          omg[r[$clog2(RMAX)-1:0]] <= conv;
          if (r == r_q - 1'b1) begin
            state <= S_CHIEN;
            k     <= n_q - 1'b1;
            for (int i = 0; i <= RMAX; i++) lt[i] <= lam[i];
            for (int i = 0; i < RMAX; i++) wt[i] <= (i < int'(r)) ? omg[i] : (i == int'(r) ? conv : 8'h00);
          end else begin
            r <= r + 1'b1;
          end
        end
        S_CHIEN: begin
          // x = alpha^-(n-1-k): a root marks an error in byte k
          if (lsum == '0) begin
            if (nroot < RW'(TMAX)) begin
              epos[nroot[$clog2(TMAX)-1:0]] <= k;
              eval[nroot[$clog2(TMAX)-1:0]] <= evalue;
            end
            nroot <= nroot + 1'b1;
          end
          for (int i = 0; i <= RMAX; i++) lt[i] <= gf_mul(lt[i], alpha_pow(-i));
          for (int i = 0; i < RMAX; i++)  wt[i] <= gf_mul(wt[i], alpha_pow(-i));
          if (k == '0) begin
            automatic logic [RW-1:0] nr;
            automatic logic          bad;
            nr  = nroot + RW'(lsum == '0);
            bad = (nr != llen) || ({llen, 1'b0} > (RW+1)'(r_q)) || (nr > RW'(TMAX));
            fail_q   <= bad;
            dec_fail <= bad;
            dec_nerr <= bad ? '0 : nr;
            dec_done <= 1'b1;
            state    <= S_OUT;
          end else begin
            k <= k - 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          if (out_last) begin
            k     <= '0;
            state <= S_LOAD;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
  // Configuration rule: R even, at most RMAX, and below N.
  a_cfg_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                state == S_LOAD && in_valid && k == '0 |->
                                !cfg_r[0] && cfg_r <= RW'(RMAX) && cfg_n > 8'(cfg_r));

  // Handshake rule: an offered output stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
