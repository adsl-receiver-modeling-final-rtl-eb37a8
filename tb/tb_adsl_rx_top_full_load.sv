// tb_adsl_rx_top_full_load: the whole receiver at the heaviest bit loading.
//
// Same transmitter, line and checks as tb_adsl_rx_top, in one configuration:
// N=251, R=16, D=16, S=1, so that 2008 bits are spread over the 126 data tones
// with up to 16 bits on a tone (almost all of them carry 16). The time signal of
// such a symbol peaks near 2^18 at the default constellation unit of 16 LSBs;
// the receiver's default 24-bit samples hold it. All parameters keep their
// defaults. A 64-byte burst, spread by the interleaver into
// correctable errors, and one corrupted CRC byte are injected. Each byte is
// compared with the user data; sync drops, stalls, corrections and the CRC
// pass and error are counted and must occur.
module tb_adsl_rx_top_full_load;
  localparam int U = 4;            // constellation unit 2^U, as in the receiver default
  localparam int DW = 24;          // the receiver's default sample width
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic teq_we = 0; logic [3:0] teq_addr = 0; logic signed [15:0] teq_coef = 0;
  logic bt_we = 0; logic [6:0] bt_tone = 0; logic [4:0] bt_bits = 0;
  logic [7:0] cfg_n = 127; logic [4:0] cfg_r = 16; logic [4:0] cfg_d = 16; logic [2:0] cfg_log2s = 0;
  logic s_valid = 0, s_ready;
  logic signed [DW-1:0] s_data = 0;
  logic m_valid, m_ready = 1, m_crc_byte, m_sof;
  logic [7:0] m_data;
  logic sync_dropped, rs_done, rs_fail, crc_check, crc_error;
  logic [4:0] rs_nerr;
  logic [6:0] m_frame;
  logic sym_done;
  logic [7:0] crc_value;
  int n_sym = 0;
  always @(posedge clk) if (rst_n && sym_done) n_sym++;

  adsl_rx_top dut (.*);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_stall = 0, n_rs_corr = 0, n_rs_fail = 0, n_crc_ok = 0, n_crc_err = 0;
  int n_cw = 0;
  always @(posedge clk) if (rst_n) begin
    if (sync_dropped) n_sync++;
    if (s_valid && !s_ready) n_stall++;
    if (rs_done) n_cw++;
    if (rs_done && !rs_fail && rs_nerr != 0) n_rs_corr++;
    if (rs_done && rs_fail) n_rs_fail++;
    if (crc_check && !crc_error) n_crc_ok++;
    if (crc_check && crc_error) n_crc_err++;
  end

  // ---------------- GF(256) and CRC for the transmitter ----------------
  int gexp [512];
  int glog [256];
  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction
  function automatic logic [7:0] crc_step(logic [7:0] c, logic [7:0] d);
    logic [8:0] r;
    r = {1'b0, c};
    for (int b = 0; b < 8; b++) begin
      r = {r[7:0], 1'b0};
      if (r[8] ^ d[b]) r = r ^ 9'h11D;
      r[8] = 1'b0;
    end
    return r[7:0];
  endfunction

  real cos_t [256];
  real sin_t [256];

  // ---------------- receiver-side comparison ----------------
  logic [7:0] user [];
  bit         dont_care [];
  int         nrx;
  int         cur_fb = 1;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    if (nrx < user.size() && !dont_care[nrx]) begin
      checks++;
      if (m_data != user[nrx]) begin
        failures++;
        if (failures < 10) $display("byte %0d: got %h exp %h", nrx, m_data, user[nrx]);
      end
      checks++;
      if (m_sof != (nrx % cur_fb == 0) || m_frame != 7'((nrx / cur_fb) % 68) ||
          m_crc_byte != (nrx % (68 * cur_fb) == 0)) begin
        failures++;
        if (failures < 10) $display("byte %0d: frame markers wrong", nrx);
      end
    end
    nrx++;
  end

  task automatic run(input int n, input int r, input int d, input int log2s, input int nsf,
                     input int burst_pos, input int burst_len, input int bad_pos, input int bad_len,
                     input int bad_crc_sf, input int exp_crc_err, input int exp_rs_fail);
    int s, k, fb, bpf, nbytes, ncw, nframes, total_bits;
    int btab [128];
    logic [7:0] scr [];
    logic [7:0] cw [];
    logic [7:0] z [];
    real x [256];
    real prev_x;
    int g [17];
    int sym0, sync0, stall0, corr0, fail0, ok0, err0, cw0;
    logic [22:0] sreg;

    s = 1 << log2s;
    k = n - r;
    fb = k / s;
    bpf = n / s;
    nframes = nsf * 68;
    nbytes = nframes * fb;
    ncw = nbytes / k;
    total_bits = bpf * 8;

    // user data with CRC bytes
    user = new[nbytes];
    dont_care = new[nbytes];
    begin
      logic [7:0] c;
      c = 0;
      for (int i = 0; i < nbytes; i++) begin
        dont_care[i] = 0;
        if (i % (68 * fb) == 0) begin
          user[i] = (i == 0) ? 8'h00 : c;
          if (i / (68 * fb) == bad_crc_sf) user[i] = ~c;
          c = 0;
        end else begin
          user[i] = 8'($urandom);
          c = crc_step(c, user[i]);
        end
      end
    end
    // scrambler
    scr = new[nbytes];
    sreg = 0;
    for (int i = 0; i < nbytes; i++)
      for (int b = 0; b < 8; b++) begin
        scr[i][b] = user[i][b] ^ sreg[17] ^ sreg[22];
        sreg = {sreg[21:0], scr[i][b]};
      end
    // RS encoder
    for (int i = 0; i <= 16; i++) g[i] = 0;
    g[0] = 1;
    for (int i = 0; i < r; i++)
      for (int j = i + 1; j >= 1; j--) g[j] = g[j] ^ mul(g[j-1], gexp[i]);
    cw = new[ncw * n];
    for (int c = 0; c < ncw; c++) begin
      int par [16];
      int fbk;
      for (int j = 0; j < 16; j++) par[j] = 0;
      for (int i = 0; i < k; i++) begin
        cw[c * n + i] = scr[c * k + i];
        if (r > 0) begin
          fbk = scr[c * k + i] ^ par[0];
          for (int j = 0; j < r - 1; j++) par[j] = par[j+1] ^ mul(fbk, g[j+1]);
          par[r-1] = mul(fbk, g[r]);
        end
      end
      for (int j = 0; j < r; j++) cw[c * n + k + j] = 8'(par[j]);
    end
    // interleaver
    z = new[ncw * n];
    foreach (z[i]) z[i] = 8'($urandom);
    foreach (cw[i]) if (i + (d - 1) * (i % n) < ncw * n) z[i + (d - 1) * (i % n)] = cw[i];
    // channel byte errors
    for (int i = 0; i < burst_len; i++) z[burst_pos + i] = z[burst_pos + i] ^ 8'($urandom_range(1, 255));
    for (int i = 0; i < bad_len; i++) z[bad_pos + i] = z[bad_pos + i] ^ 8'($urandom_range(1, 255));
    if (bad_len > 0) begin
      // the codeword hit beyond repair (interleaving off in this use): its data
      // and the descrambler's three-byte error spread are not compared
      int c;
      c = bad_pos / n;
      for (int i = c * k; i < (c + 1) * k + 3 && i < nbytes; i++) dont_care[i] = 1;
    end
    // bit loading: total_bits over 126 tones, at most 16 per tone
    for (int t = 0; t < 128; t++) btab[t] = 0;
    for (int i = 0; i < total_bits; i++) begin
      int t;
      do t = $urandom_range(1, 127); while (t == 64 || btab[t] >= 16);
      btab[t]++;
    end

    // reset and configure
    rst_n = 0;
    cfg_n = 8'(n); cfg_r = 5'(r); cfg_d = 5'(d); cfg_log2s = 3'(log2s);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    nrx = 0;
    cur_fb = fb;
    sym0 = n_sym; sync0 = n_sync; stall0 = n_stall; corr0 = n_rs_corr; fail0 = n_rs_fail;
    ok0 = n_crc_ok; err0 = n_crc_err; cw0 = n_cw;
    @(posedge clk); #1;
    for (int t = 0; t < 16; t++) begin
      teq_we = 1; teq_addr = 4'(t);
      teq_coef = 16'($rtoi(20480.0 * ((t % 2 == 1) ? -1.0 : 1.0) / real'(1 << t) + ((t % 2 == 1) ? -0.5 : 0.5)));
      @(posedge clk); #1;
    end
    teq_we = 0;
    for (int t = 0; t < 128; t++) begin
      bt_we = 1; bt_tone = 7'(t); bt_bits = 5'(btab[t]);
      @(posedge clk); #1;
    end
    bt_we = 0;

    // transmit
    prev_x = 0.0;
    for (int sf = 0; sf < nsf; sf++)
      for (int f = 0; f < 69; f++) begin
        real xr [128];
        real xi [128];
        for (int t = 0; t < 128; t++) begin xr[t] = 0.0; xi[t] = 0.0; end
        if (f == 68) begin
          for (int t = 1; t < 128; t++) begin     // sync frame: random QPSK
            xr[t] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
            xi[t] = ($urandom_range(0, 1) != 0) ? 1.0 : -1.0;
          end
        end else begin
          int fr;
          logic [31:0] acc;
          int acnt, pos;
          fr = sf * 68 + f;
          acc = 0; acnt = 0; pos = fr * bpf;
          for (int t = 1; t < 128; t++) begin
            int b, bx, by, xb, yb, xq, yq;
            logic [15:0] v;
            b = btab[t];
            if (t == 64) begin xr[t] = 1.0; xi[t] = 1.0; continue; end
            while (acnt < b) begin acc = acc | (32'(z[pos]) << acnt); pos++; acnt += 8; end
            v = 16'(acc & ((1 << b) - 1));
            acc = acc >> b; acnt -= b;
            bx = (b + 1) / 2; by = b / 2; xb = 0; yb = 0;
            for (int q = 0; q < b; q++)
              if (q % 2 == 0) xb = (xb << 1) | v[b-1-q];
              else            yb = (yb << 1) | v[b-1-q];
            xq = (bx > 0 && xb >= (1 << (bx - 1))) ? xb - (1 << bx) : xb;
            yq = (by > 0 && yb >= (1 << (by - 1))) ? yb - (1 << by) : yb;
            xr[t] = (bx > 0) ? real'(2 * xq + 1) : 0.0;
            xi[t] = (by > 0) ? real'(2 * yq + 1) : 0.0;
          end
        end
        for (int t = 0; t < 256; t++) begin
          real acc_r;
          acc_r = 0.0;
          for (int q = 1; q < 128; q++)
            acc_r += 2.0 * (xr[q] * cos_t[(q * t) % 256] - xi[q] * sin_t[(q * t) % 256]);
          x[t] = acc_r * real'(1 << U);
        end
        for (int t = 0; t < 272; t++) begin
          real xv, yv;
          xv = x[(t < 16) ? 240 + t : t - 16];
          yv = 0.8 * xv + 0.4 * prev_x;
          prev_x = xv;
          s_valid = 1;
          s_data = DW'($rtoi(yv + ((yv >= 0.0) ? 0.5 : -0.5)));
          m_ready = ($urandom_range(0, 15) != 0);
          #1;
          while (!s_ready) begin @(posedge clk); #1; m_ready = ($urandom_range(0, 15) != 0); #1; end
          @(posedge clk); #1;
        end
      end
    s_valid = 0;
    m_ready = 1;
    repeat (4000) @(posedge clk);

    $display("config N=%0d R=%0d D=%0d S=%0d: %0d bytes out of %0d, %0d codewords, sync drops %0d, stalls %0d, RS corrected %0d failed %0d, CRC ok %0d err %0d",
             n, r, d, s, nrx, nbytes, n_cw - cw0, n_sync - sync0, n_stall - stall0,
             n_rs_corr - corr0, n_rs_fail - fail0, n_crc_ok - ok0, n_crc_err - err0);
    // everything but the tail held back by the interleaver must have arrived
    checks++;
    if (nrx < nbytes - (d - 1) * (n - 1) - 2 * n) begin failures++; $display("too few bytes"); end
    checks++;
    if (n_sym - sym0 != nsf * 68) begin failures++; $display("%0d symbols demapped", n_sym - sym0); end
    checks++;
    if (n_sync - sync0 != nsf) begin failures++; $display("sync drops"); end
    checks++;
    if (n_crc_ok - ok0 + n_crc_err - err0 != nsf - 1) begin failures++; $display("CRC check count"); end
    checks++;
    if (n_crc_err - err0 != exp_crc_err) begin failures++; $display("CRC error count"); end
    checks++;
    if (n_rs_fail - fail0 != exp_rs_fail) begin failures++; $display("RS failure count"); end
  endtask

  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x; gexp[i + 255] = x; glog[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    for (int t = 0; t < 256; t++) begin
      cos_t[t] = $cos(6.283185307179586 * t / 256.0);
      sin_t[t] = $sin(6.283185307179586 * t / 256.0);
    end
    // a 64-byte burst in superframe 0, spread by D = 16; bad CRC byte in superframe 2
    run(251, 16, 16, 0, 3, 2000, 64, 0, 0, 2, 1, 0);
    checks++;
    if (n_sync == 0)    begin failures++; $display("no sync frame dropped"); end
    checks++;
    if (n_stall == 0)   begin failures++; $display("no input stall"); end
    checks++;
    if (n_rs_corr == 0) begin failures++; $display("no RS correction"); end
    checks++;
    if (n_crc_ok == 0)  begin failures++; $display("no CRC pass"); end
    checks++;
    if (n_crc_err == 0) begin failures++; $display("no CRC error"); end
    $display("mechanisms: sync drops %0d, stalls %0d, RS corrections %0d, RS failures %0d, CRC pass %0d, CRC error %0d",
             n_sync, n_stall, n_rs_corr, n_rs_fail, n_crc_ok, n_crc_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
