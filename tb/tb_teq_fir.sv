// tb_teq_fir: self-checking test of the TEQ FIR filter.
// Loads random taps, streams random samples with random output back-pressure
// and compares every output with a reference convolution computed here
// (rounded, saturated). Also checks the one-cycle latency of the first output.
module tb_teq_fir;
  localparam int NT = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [2:0] cfg_addr = 0; logic signed [15:0] cfg_coef = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [15:0] in_data = 0, out_data;

  teq_fir #(.NTAPS(NT)) dut (.*);

  logic signed [15:0] coefs [NT];
  logic signed [15:0] xs [$];
  int nout = 0;

  function automatic logic signed [15:0] ref_out(int n);
    longint acc = 0;
    longint s;
    for (int k = 0; k < NT; k++) if (n - k >= 0) acc += longint'(xs[n-k]) * longint'(coefs[k]);
    s = (acc + (1 << 13)) >>> 14;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    return 16'(s);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (out_data !== ref_out(nout)) begin
      failures++;
      if (failures < 10) $display("mismatch %0d: got %0d exp %0d", nout, out_data, ref_out(nout));
    end
    nout++;
  end

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int k = 0; k < NT; k++) begin
      coefs[k] = (k == 0) ? 16'sd12000 : 16'($signed($urandom_range(0, 16000)) - 8000);
      cfg_we <= 1; cfg_addr <= 3'(k); cfg_coef <= coefs[k];
      @(posedge clk);
    end
    cfg_we <= 0;
    // latency check: single sample, output ready
    out_ready <= 1;
    xs.push_back(16'sd1000);
    in_valid <= 1; in_data <= 16'sd1000;
    @(posedge clk); in_valid <= 0; sent = 1;
    #1; checks++;
    if (!out_valid) begin failures++; $display("latency: no output one cycle after input"); end
    while (sent < 2000 || nout < sent) begin
      out_ready <= ($urandom_range(0, 3) != 0);
      if (sent < 2000 && (!in_valid || in_ready)) begin
        logic signed [15:0] v;
        v = 16'($urandom_range(0, 65535));
        if (sent % 7 == 0) v = 16'sd32767;   // drive saturation
        in_valid <= 1; in_data <= v;
      end
      @(posedge clk);
      if (in_valid && in_ready) begin xs.push_back(in_data); sent++; end
      if (sent >= 2000) in_valid <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
