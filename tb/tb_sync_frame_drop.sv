// tb_sync_frame_drop: self-checking test of the sync-frame drop.
// A small instance (frames of 8 samples, period 5) and the default one
// (256 samples, period 69) see numbered samples; the test checks that the last
// frame of every period is removed, that all others pass in order with correct
// out_sof / out_frame, and that sync_dropped pulses once per period.
module tb_sync_frame_drop;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_sof, sync_dropped;
  logic signed [15:0] in_data = 0, out_data;
  logic [2:0] out_frame;
  logic in_ready2, out_valid2, out_sof2, sync_dropped2;
  logic signed [15:0] out_data2;
  logic [6:0] out_frame2;

  sync_frame_drop #(.FRAME_LEN(8), .PERIOD(5)) dut (.*);
  sync_frame_drop dut2 (.clk, .rst_n, .in_valid, .in_ready(in_ready2), .in_data,
    .out_valid(out_valid2), .out_ready, .out_data(out_data2), .out_sof(out_sof2),
    .out_frame(out_frame2), .sync_dropped(sync_dropped2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int kept(int m, int fl, int p);
    return (m / (fl * (p - 1))) * fl * p + (m % (fl * (p - 1)));
  endfunction
  int e1 = 0, e2 = 0, d1 = 0, d2 = 0;
  always @(posedge clk) if (rst_n) begin
    if (sync_dropped)  d1++;
    if (sync_dropped2) d2++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_data != 16'(kept(e1, 8, 5)) || out_sof != (e1 % 8 == 0) || out_frame != 3'((e1 / 8) % 4)) begin
        failures++; $display("small: got %0d exp %0d", out_data, kept(e1, 8, 5));
      end
      e1++;
    end
    if (out_valid2 && out_ready) begin
      checks++;
      if (out_data2 != 16'(kept(e2, 256, 69)) || out_sof2 != (e2 % 256 == 0) || out_frame2 != 7'((e2 / 256) % 68)) begin
        failures++; $display("big: got %0d exp %0d", out_data2, kept(e2, 256, 69));
      end
      e2++;
    end
  end

  initial begin
    int n = 0;
    localparam int TOTAL = 2 * 69 * 256;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (n < TOTAL) begin
      in_valid <= ($urandom_range(0, 7) != 0);
      in_data  <= 16'(n);
      @(posedge clk);
      if (in_valid) n++;
    end
    in_valid <= 0;
    repeat (2) @(posedge clk);
    checks++; if (e2 != 2 * 68 * 256) begin failures++; $display("big count %0d", e2); end
    checks++; if (d2 != 2) begin failures++; $display("big drops %0d", d2); end
    checks++; if (d1 != TOTAL / 40) begin failures++; $display("small drops %0d", d1); end
    checks++; if (e1 != TOTAL / 40 * 32 + ((TOTAL % 40 > 32) ? 32 : TOTAL % 40)) begin failures++; $display("small count %0d", e1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
