// tb_crc8_check: self-checking test of the superframe CRC check.
// Superframes of 68 frames are generated here for two frame sizes. The CRC of
// each superframe (all bytes except its first, generator x^8+x^4+x^3+x^2+1,
// bit 0 of each byte first, computed here by polynomial long division) is put
// into the first byte of the next superframe, except in chosen superframes
// where it is corrupted or where a data byte is flipped. crc_check must pulse
// once per superframe after the first, with crc_error exactly where expected;
// the data must pass unchanged with correct frame markers.
module tb_crc8_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] cfg_frame_bytes = 5;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, out_crc_byte, out_sof, crc_check, crc_error;
  logic [7:0] in_data = 0, out_data, crc_value;
  logic [6:0] out_frame;

  crc8_check dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CRC by long division of M(x) * x^8 by G(x); message bits in transmit order
  function automatic logic [7:0] crc_ref(logic [7:0] msg [$]);
    bit bits [$];
    logic [8:0] rem;
    foreach (msg[i]) for (int b = 0; b < 8; b++) bits.push_back(msg[i][b]);
    for (int i = 0; i < 8; i++) bits.push_back(1'b0);
    rem = '0;
    foreach (bits[i]) begin
      rem = {rem[7:0], bits[i]};
      if (rem[8]) rem = rem ^ 9'h11D;
    end
    return rem[7:0];
  endfunction

  int nchk = 0, nerr = 0;
  always @(posedge clk) if (rst_n && crc_check) begin
    nchk++;
    if (crc_error) nerr++;
  end

  task automatic run(input int fb, input int nsf, input int bad_crc_sf, input int bad_data_sf);
    logic [7:0] prev_crc;
    int exp_err;
    rst_n = 0; #1; rst_n = 1;
    cfg_frame_bytes = 8'(fb);
    nchk = 0; nerr = 0; exp_err = 0;
    prev_crc = 8'h5A;
    @(posedge clk); #1;
    for (int sf = 0; sf < nsf; sf++) begin
      logic [7:0] msg [$];
      for (int f = 0; f < 68; f++)
        for (int b = 0; b < fb; b++) begin
          logic [7:0] d;
          if (f == 0 && b == 0) d = (sf == bad_crc_sf) ? ~prev_crc : prev_crc;
          else begin d = 8'($urandom); msg.push_back(d); end
          in_valid = 1; in_data = d;
          // a flipped byte after the CRC was formed: the check must catch it
          if (sf == bad_data_sf && f == 30 && b == 1) in_data = d ^ 8'h10;
          out_ready = ($urandom_range(0, 4) != 0);
          while (!out_ready) begin @(posedge clk); #1; out_ready = ($urandom_range(0, 4) != 0); end
          checks++;
          if (!out_valid || out_data != in_data || out_crc_byte != (f == 0 && b == 0) ||
              out_sof != (b == 0) || out_frame != 7'(f)) begin
            failures++; $display("stream mismatch sf %0d f %0d b %0d", sf, f, b);
          end
          @(posedge clk); #1;
        end
      if (sf > 0 && sf == bad_crc_sf) exp_err++;
      if (sf == bad_data_sf && sf + 1 < nsf) exp_err++;
      prev_crc = crc_ref(msg);
    end
    in_valid = 0;
    repeat (2) begin @(posedge clk); #1; end
    checks++;
    if (nchk != nsf - 1) begin failures++; $display("%0d checks, exp %0d", nchk, nsf - 1); end
    checks++;
    if (nerr != exp_err) begin failures++; $display("%0d errors, exp %0d", nerr, exp_err); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(5, 4, 2, -1);
    run(3, 4, -1, 1);
    run(30, 3, -1, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
