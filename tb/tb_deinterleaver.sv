// tb_deinterleaver: self-checking test of the convolutional de-interleaver.
// For several (N, D) pairs (N odd, D a power of two, as in ADSL) a byte stream
// u is interleaved here: u[m] goes to position m + (D-1)*(m mod N); unfilled
// positions get random bytes. The de-interleaver must return u in order from
// its first output byte, with out_first on every block start, and must produce
// its first output exactly after (D-1)*(N-1) fill bytes. Output back-pressure
// is random.
module tb_deinterleaver;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] cfg_n = 15; logic [4:0] cfg_d = 4;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_first;
  logic [7:0] in_data = 0, out_data;

  deinterleaver dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] u [];
  logic [7:0] z [];
  int nout, nin, first_in, nacc;

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
    checks++;
    if (nout == 0) first_in = nacc;
    if (out_data != u[nout] || out_first != (nout % int'(cfg_n) == 0)) begin
      failures++;
      if (failures < 10) $display("N=%0d D=%0d out %0d: got %h exp %h", cfg_n, cfg_d, nout, out_data, u[nout]);
    end
    nout++;
    end
    if (in_valid && in_ready) nacc++;
  end

  task automatic run(input int n, input int d, input int blocks);
    int len, fill;
    len = n * blocks;
    fill = (d - 1) * (n - 1);
    u = new[len];
    z = new[len + (d - 1) * n];
    foreach (z[i]) z[i] = 8'($urandom);
    foreach (u[i]) begin
      u[i] = 8'($urandom);
      z[i + (d - 1) * (i % n)] = u[i];
    end
    rst_n = 0;
    cfg_n = 8'(n); cfg_d = 5'(d);
    nout = 0; nin = 0; nacc = 0; first_in = -1;
    @(posedge clk); rst_n = 1; @(posedge clk);
    while (nout < len - fill) begin
      in_valid  <= (nin < len);
      in_data   <= z[nin];
      out_ready <= ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (in_valid && in_ready) nin++;
    end
    in_valid <= 0;
    checks++;
    // the first output appears in the cycle after input byte number 'fill' (0-based)
    if (first_in != fill + 1) begin failures++; $display("first output after %0d inputs, exp %0d", first_in, fill + 1); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(15, 4, 40);
    run(9, 2, 30);
    run(7, 1, 10);
    run(255, 16, 24);
    run(63, 8, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
