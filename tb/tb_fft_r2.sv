// tb_fft_r2: self-checking test of the FFT.
// Feeds random and single-tone real symbols to a 16-point and to the default
// 256-point instance, compares every output bin with a double-precision DFT
// scaled by 1/N computed here (tolerance of a few LSBs for fixed-point
// rounding), and checks the load/compute/unload cycle counts.
module tb_fft_r2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 256-point instance
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_last;
  logic signed [15:0] in_data = 0, out_re, out_im;
  logic [7:0] out_idx;
  fft_r2 dut (.*);

  // 16-point instance
  logic s_in_valid = 0, s_in_ready, s_out_valid, s_out_last;
  logic signed [15:0] s_in_data = 0, s_out_re, s_out_im;
  logic [3:0] s_out_idx;
  fft_r2 #(.N(16)) dut_s (.clk, .rst_n, .in_valid(s_in_valid), .in_ready(s_in_ready),
    .in_data(s_in_data), .out_valid(s_out_valid), .out_ready(1'b1), .out_re(s_out_re),
    .out_im(s_out_im), .out_idx(s_out_idx), .out_last(s_out_last));

  real xs [256];
  real ref_re [256];
  real ref_im [256];

  task automatic make_ref(input int n);
    for (int k = 0; k < n; k++) begin
      ref_re[k] = 0.0; ref_im[k] = 0.0;
      for (int t = 0; t < n; t++) begin
        ref_re[k] += xs[t] * $cos(6.283185307179586 * k * t / n) / n;
        ref_im[k] -= xs[t] * $sin(6.283185307179586 * k * t / n) / n;
      end
    end
  endtask

  function automatic bit close(real a, logic signed [15:0] b, real tol);
    real d;
    d = a - real'(b);
    return (d < tol) && (d > -tol);
  endfunction

  task automatic run_big(input int mode);
    int t0, t1, cyc;
    for (int t = 0; t < 256; t++) begin
      if (mode == 0) xs[t] = real'($signed($urandom_range(0, 40000)) - 20000);
      else xs[t] = $rtoi(12000.0 * $cos(6.283185307179586 * 37 * t / 256) + 0.5);
    end
    make_ref(256);
    for (int t = 0; t < 256; t++) begin
      in_valid <= 1; in_data <= 16'($rtoi(xs[t]));
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    cyc = 0;
    #1;
    while (!out_valid) begin @(posedge clk); #1; cyc++; end
    // compute phase is 8 stages of 128 butterflies
    checks++;
    if (cyc != 1024) begin failures++; $display("compute took %0d cycles", cyc + 1); end
    for (int k = 0; k < 256; k++) begin
      out_ready = ($urandom_range(0, 3) != 0);
      while (!out_ready) begin @(posedge clk); #1; out_ready = ($urandom_range(0, 3) != 0); end
      checks++;
      if (!out_valid || out_idx != 8'(k) || out_last != (k == 255) ||
          !close(ref_re[k], out_re, 3.0) || !close(ref_im[k], out_im, 3.0)) begin
        failures++;
        if (failures < 10) $display("bin %0d: got %0d %0d exp %f %f", k, out_re, out_im, ref_re[k], ref_im[k]);
      end
      @(posedge clk);
      #1;
    end
    out_ready = 0;
    checks++;
    if (!in_ready) begin failures++; $display("not back in load"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // small instance
    for (int t = 0; t < 16; t++) xs[t] = real'($signed($urandom_range(0, 2000)) - 1000);
    make_ref(16);
    for (int t = 0; t < 16; t++) begin
      s_in_valid <= 1; s_in_data <= 16'($rtoi(xs[t]));
      @(posedge clk);
    end
    s_in_valid <= 0;
    #1;
    while (!s_out_valid) begin @(posedge clk); #1; end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (s_out_idx != 4'(k) || !close(ref_re[k], s_out_re, 2.0) || !close(ref_im[k], s_out_im, 2.0)) begin
        failures++; $display("small bin %0d: got %0d %0d exp %f %f", k, s_out_re, s_out_im, ref_re[k], ref_im[k]);
      end
      @(posedge clk);
      #1;
    end
    run_big(0);
    run_big(1);
    run_big(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
