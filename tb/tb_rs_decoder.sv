// tb_rs_decoder: self-checking test of the Reed-Solomon decoder.
// Codewords are built here by a systematic encoder (division by
// g(x) = prod_{i=0}^{R-1} (x + alpha^i) over GF(256) with x^8+x^4+x^3+x^2+1,
// using log/antilog tables of its own). Random byte errors are added at random
// positions, data and parity alike. With at most R/2 errors the decoder must
// return the original data bytes and report the error count; with more errors
// (R >= 8) it must flag the codeword as uncorrectable and pass it unchanged.
// Several (N, R) pairs, R = 0 included, and random output back-pressure.
module tb_rs_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] cfg_n = 255; logic [4:0] cfg_r = 16;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_last, dec_done, dec_fail;
  logic [7:0] in_data = 0, out_data;
  logic [4:0] dec_nerr;

  rs_decoder dut (.*);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gexp [512];
  int glog [256];
  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  int corrected = 0, flagged = 0;

  task automatic one(input int n, input int r, input int nerr);
    int k, g [17], par [16], cw [255], rx [255], fb;
    bit used [255];
    int got_nerr;
    bit got_fail;
    k = n - r;
    // generator polynomial, g[0] = leading coefficient 1
    for (int i = 0; i <= 16; i++) g[i] = 0;
    g[0] = 1;
    for (int i = 0; i < r; i++)                      // multiply by (x + alpha^i)
      for (int j = i + 1; j >= 1; j--) g[j] = g[j] ^ mul(g[j-1], gexp[i]);
    for (int i = 0; i < 16; i++) par[i] = 0;
    for (int i = 0; i < k; i++) begin
      cw[i] = $urandom_range(0, 255);
      if (r > 0) begin
        fb = cw[i] ^ par[0];
        for (int j = 0; j < r - 1; j++) par[j] = par[j+1] ^ mul(fb, g[j+1]);
        par[r-1] = mul(fb, g[r]);
      end
    end
    for (int j = 0; j < r; j++) cw[k + j] = par[j];
    for (int i = 0; i < n; i++) begin rx[i] = cw[i]; used[i] = 0; end
    for (int e = 0; e < nerr; e++) begin
      int p;
      do p = $urandom_range(0, n - 1); while (used[p]);
      used[p] = 1;
      rx[p] = cw[p] ^ $urandom_range(1, 255);
    end
    @(posedge clk); #1;
    cfg_n = 8'(n); cfg_r = 5'(r);
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_data = 8'(rx[i]);
      #1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    in_valid = 0;
    while (!dec_done) begin @(posedge clk); #1; end
    got_nerr = dec_nerr; got_fail = dec_fail;
    for (int i = 0; i < k; i++) begin
      forever begin
        out_ready = ($urandom_range(0, 3) != 0);
        if (out_valid && out_ready) break;
        @(posedge clk); #1;
      end
      checks++;
      if (nerr <= r / 2) begin
        if (out_data != 8'(cw[i]) || out_last != (i == k - 1)) begin
          failures++;
          if (failures < 10) $display("N=%0d R=%0d e=%0d byte %0d got %h exp %h", n, r, nerr, i, out_data, cw[i]);
        end
      end else if (out_data != 8'(rx[i])) begin
        failures++; $display("uncorrectable codeword altered at %0d", i);
      end
      @(posedge clk); #1;
    end
    out_ready = 1;
    checks++;
    if (nerr <= r / 2) begin
      if (got_fail || got_nerr != nerr) begin failures++; $display("N=%0d R=%0d: nerr %0d fail %0d, exp %0d", n, r, got_nerr, got_fail, nerr); end
      else if (nerr > 0) corrected++;
    end else begin
      if (!got_fail) begin failures++; $display("N=%0d R=%0d e=%0d not flagged", n, r, nerr); end
      else flagged++;
    end
  endtask


  initial begin
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i] = x; gexp[i + 255] = x; glog[x] = i;
      x = x << 1;
      if (x & 256) x = x ^ 'h11D;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int t = 0; t <= 8; t++) one(255, 16, t);
    one(255, 16, 9);
    one(255, 16, 12);
    for (int t = 0; t <= 2; t++) one(60, 4, t);
    for (int t = 0; t <= 4; t++) one(101, 8, t);
    one(101, 8, 6);
    one(32, 2, 1);
    one(32, 2, 0);
    one(20, 0, 0);
    for (int t = 0; t < 20; t++) one($urandom_range(40, 255), 16, $urandom_range(0, 8));
    $display("corrected codewords %0d, flagged %0d", corrected, flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
