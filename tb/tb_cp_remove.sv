// tb_cp_remove: self-checking test of cyclic-prefix removal.
// Streams numbered samples with random gaps and back-pressure through a small
// configuration (CP 4, symbol 16) and the default one (CP 16, symbol 256), and
// checks that exactly the non-prefix samples come out, in order, with out_sof
// on the first sample of each symbol.
module tb_cp_remove;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0, out_sof;
  logic signed [15:0] in_data = 0, out_data;
  logic in_ready2, out_valid2, out_sof2;
  logic signed [15:0] out_data2;

  cp_remove #(.CP_LEN(4), .SYM_LEN(16)) dut (.*);
  cp_remove dut2 (.clk, .rst_n, .in_valid, .in_ready(in_ready2), .in_data,
                  .out_valid(out_valid2), .out_ready, .out_data(out_data2), .out_sof(out_sof2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample n of the input carries value n; expected output m
  int exp_small = 0, exp_big = 0;
  function automatic int kept(int m, int cp, int sym);
    return (m / sym) * (cp + sym) + cp + (m % sym);
  endfunction
  always @(posedge clk) if (rst_n && out_ready) begin
    if (out_valid) begin
      checks++;
      if (out_data != 16'(kept(exp_small, 4, 16)) || out_sof != (exp_small % 16 == 0)) begin
        failures++; $display("small: got %0d exp %0d", out_data, kept(exp_small, 4, 16));
      end
      exp_small++;
    end
    if (out_valid2) begin
      checks++;
      if (out_data2 != 16'(kept(exp_big, 16, 256)) || out_sof2 != (exp_big % 256 == 0)) begin
        failures++; $display("big: got %0d exp %0d", out_data2, kept(exp_big, 16, 256));
      end
      exp_big++;
    end
  end

  initial begin
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < 3 * 272) begin
      in_valid  <= ($urandom_range(0, 3) != 0);
      out_ready <= 1'b1;
      in_data   <= 16'(n);
      @(posedge clk);
      if (in_valid && in_ready && in_ready2) n++;
      else if (in_valid && (in_ready != in_ready2)) begin
        failures++; $display("ready differs with out_ready high");
      end
    end
    in_valid <= 0;
    @(posedge clk);
    checks++;
    if (exp_small != 3 * 272 / 20 * 16 + (3 * 272 % 20 > 4 ? 3 * 272 % 20 - 4 : 0)) begin
      failures++; $display("small count %0d", exp_small);
    end
    checks++;
    if (exp_big != 3 * 256) begin failures++; $display("big count %0d", exp_big); end
    // back-pressure: a kept sample is not accepted while out_ready is low
    out_ready <= 0; in_valid <= 1;
    @(posedge clk); #1;
    checks++;
    if (in_ready2 != (dut2.cnt < 16)) begin failures++; $display("ready under back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
