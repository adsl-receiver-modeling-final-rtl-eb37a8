// tb_descrambler: self-checking test of the descrambler.
// Random bytes are scrambled here bit by bit (bit 0 of each byte first) with
// d'(n) = d(n) ^ d'(n-18) ^ d'(n-23) and fed to the descrambler under random
// input gaps and output back-pressure; the output must equal the original data.
// A second pass starts the scrambler from a random state: the descrambler must
// resynchronise by itself, i.e. match from the fourth byte on.
module tb_descrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [7:0] in_data = 0, out_data;

  descrambler dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] orig [$];
  int nout = 0, skip = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [7:0] e;
    e = orig.pop_front();
    if (nout >= skip) begin
      checks++;
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("byte %0d got %h exp %h", nout, out_data, e);
      end
    end
    nout++;
  end

  bit sreg [$];   // scrambled history, most recent at the back
  task automatic run(input int nbytes, input bit rand_start);
    sreg.delete();
    for (int i = 0; i < 23; i++) sreg.push_back(rand_start ? 1'($urandom) : 1'b0);
    for (int b = 0; b < nbytes; b++) begin
      logic [7:0] d, s;
      d = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        s[i] = d[i] ^ sreg[sreg.size() - 18] ^ sreg[sreg.size() - 23];
        sreg.push_back(s[i]);
        void'(sreg.pop_front());
      end
      orig.push_back(d);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = s;
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      while (!(in_valid && in_ready)) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 3) != 0);
        out_ready = ($urandom_range(0, 3) != 0);
        #1;
      end
      @(posedge clk); #1;
    end
    in_valid = 0;
    out_ready = 1;
    repeat (3) begin @(posedge clk); #1; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    skip = 0;
    run(2000, 1'b0);
    checks++;
    if (orig.size() != 0) begin failures++; $display("missing output"); end
    // restart with an unknown scrambler state
    rst_n = 0; #1; rst_n = 1;
    nout = 0; skip = 3;
    run(500, 1'b1);
    checks++;
    if (orig.size() != 0) begin failures++; $display("missing output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
