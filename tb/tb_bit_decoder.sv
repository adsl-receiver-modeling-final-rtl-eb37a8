// tb_bit_decoder: self-checking test of the constellation demapper.
// A random bit-loading table (0..16 bits per tone, including a nonzero entry
// for the pilot tone 64, which must be ignored) is written; then random symbols
// are built here by an independent constellation encoder: each tone's bits are
// split X/Y alternately from the MSB, each coordinate becomes the odd grid point
// 2q+1 scaled by 2^UNIT_SHIFT, plus noise below half a grid step; bins outside
// tones 1..127 get random values. The decoded bytes are compared with the
// expected bit stream (tones in order, LSB first, leftover bits dropped).
module tb_bit_decoder;
  localparam int U = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we = 0; logic [6:0] cfg_tone = 0; logic [4:0] cfg_bits = 0;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 1, frame_done;
  logic signed [15:0] in_re = 0, in_im = 0;
  logic [7:0] in_idx = 0, out_data;

  bit_decoder dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int btab [128];
  logic [7:0] expq [$];
  int frames_done = 0;

  always @(posedge clk) if (rst_n) begin
    if (frame_done) frames_done++;
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected byte %h", out_data); end
      else begin
        logic [7:0] e;
        e = expq.pop_front();
        if (e != out_data) begin
          failures++;
          if (failures < 10) $display("byte got %h exp %h", out_data, e);
        end
      end
    end
  end

  // coordinate from a signed grid index q with noise
  function automatic logic signed [15:0] coord(int q, int noise);
    return 16'((2 * q + 1) * (1 << U) + noise);
  endfunction

  task automatic send_symbol(input bit edge_noise);
    logic [31:0] acc = 0;
    int acnt = 0;
    for (int k = 0; k < 256; k++) begin
      int b, bx, by, xq, yq, xbits, ybits;
      logic [15:0] v;
      b = (k >= 1 && k < 128 && k != 64) ? btab[k] : 0;
      bx = (b + 1) / 2; by = b / 2;
      v = 16'($urandom) & 16'((1 << b) - 1);
      xbits = 0; ybits = 0;
      for (int t = 0; t < b; t++) begin   // t counts from the MSB of v
        if (t % 2 == 0) xbits = (xbits << 1) | v[b-1-t];
        else            ybits = (ybits << 1) | v[b-1-t];
      end
      xq = (bx > 0 && xbits >= (1 << (bx - 1))) ? xbits - (1 << bx) : xbits;
      yq = (by > 0 && ybits >= (1 << (by - 1))) ? ybits - (1 << by) : ybits;
      if (k >= 1 && k < 128 && k != 64) begin
        int nx, ny;
        nx = $signed($urandom_range(0, 2 * (1 << U) - 2)) - ((1 << U) - 1);
        ny = $signed($urandom_range(0, 2 * (1 << U) - 2)) - ((1 << U) - 1);
        // push outer points further out: the slicer must clamp
        if (edge_noise && bx > 0 && xq == (1 << (bx - 1)) - 1) nx = 5 * (1 << U);
        if (edge_noise && by > 0 && yq == -(1 << (by - 1)))   ny = -5 * (1 << U);
        in_re <= (bx == 0) ? 16'($signed($urandom_range(0, 400)) - 200) : coord(xq, nx);
        in_im <= (by == 0) ? 16'($signed($urandom_range(0, 400)) - 200) : coord(yq, ny);
        acc = acc | (32'(v) << acnt);
        acnt += b;
        while (acnt >= 8) begin
          expq.push_back(acc[7:0]);
          acc = acc >> 8; acnt -= 8;
        end
      end else begin
        in_re <= 16'($urandom); in_im <= 16'($urandom);
      end
      in_valid <= 1; in_idx <= 8'(k); in_last <= (k == 255);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
  endtask

  initial begin
    int total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 128; k++) begin
      btab[k] = (k == 0) ? 0 : $urandom_range(0, 16);
      if (k == 64) btab[k] = 9;
      if (k == 1) btab[k] = 16;
      if (k == 2) btab[k] = 15;
      cfg_we <= 1; cfg_tone <= 7'(k); cfg_bits <= 5'(btab[k]);
      @(posedge clk);
    end
    cfg_we <= 0;
    send_symbol(1'b0);
    send_symbol(1'b1);
    // back-pressure on the byte output
    fork
      send_symbol(1'b0);
      repeat (2000) begin out_ready <= ($urandom_range(0, 1) != 0); @(posedge clk); end
    join
    out_ready <= 1;
    repeat (200) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d bytes missing", expq.size()); end
    checks++;
    if (frames_done != 3) begin failures++; $display("frame_done count %0d", frames_done); end
    total = 0;
    for (int k = 1; k < 128; k++) if (k != 64) total += btab[k];
    $display("bits per symbol %0d", total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
