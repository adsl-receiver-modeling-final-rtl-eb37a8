// crc8_check: superframe CRC check.
//
// A superframe carries DATA_FRAMES (68) data frames of cfg_frame_bytes bytes.
// The first byte of frame 0 holds the 8-bit CRC of the previous superframe;
// the CRC of a superframe covers all its other bytes. The block computes the
// CRC with generator x^8+x^4+x^3+x^2+1, register cleared at the start of each
// superframe, bits taken bit 0 first. When the first byte of the next superframe
// arrives it is compared with the computed value: crc_check pulses and
// crc_error tells whether they differ. The first superframe after reset has no
// predecessor, so its CRC byte is not checked.
//
// Interface: the byte stream passes straight through (valid/ready combinational);
// out_crc_byte marks the CRC byte, out_sof the first byte of every data frame,
// out_frame gives the frame number. cfg_frame_bytes must be stable after reset.
// The 68-frame span, the CRC position and the comparison follow the receiver
// description; the polynomial is the ADSL one and the bit order is this design's
// choice.
module crc8_check
  import adsl_pkg::*;
#(
  parameter int unsigned FRAMES = 68
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [7:0]                    cfg_frame_bytes,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [7:0]                    in_data,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [7:0]                    out_data,
  output logic                          out_crc_byte,
  output logic                          out_sof,
  output logic [$clog2(FRAMES)-1:0]     out_frame,
  output logic                          crc_check,
  output logic                          crc_error,
  output logic [7:0]                    crc_value
);
  logic [7:0]                 bcnt;
  logic [$clog2(FRAMES)-1:0]  fcnt;
  logic [7:0]                 crc;
  logic [7:0]                 crc_nx;
  logic                       have_prev;
  logic                       first;

  function automatic logic [7:0] crc_byte(input logic [7:0] c, input logic [7:0] d);
    logic [7:0] x;
    x = c;
    for (int b = 0; b < 8; b++) begin
      if (x[7] ^ d[b]) x = {x[6:0], 1'b0} ^ CRC8_POLY;
      else             x = {x[6:0], 1'b0};
    end
    return x;
  endfunction

  assign first        = bcnt == '0 && fcnt == '0;
  assign crc_nx       = crc_byte(crc, in_data);
  assign out_valid    = in_valid;
  assign in_ready     = out_ready;
  assign out_data     = in_data;
  assign out_crc_byte = first;
  assign out_sof      = bcnt == '0;
  assign out_frame    = fcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcnt      <= '0;
      fcnt      <= '0;
      crc       <= '0;
      have_prev <= 1'b0;
      crc_check <= 1'b0;
      crc_error <= 1'b0;
      crc_value <= '0;
    end else begin
      crc_check <= 1'b0;
      if (in_valid && out_ready) begin
        if (first) begin
          if (have_prev) begin
            crc_check <= 1'b1;
            crc_error <= in_data != crc;
          end
          crc_value <= crc;
          crc       <= '0;
        end else begin
          crc <= crc_nx;
        end
        if (bcnt == cfg_frame_bytes - 1'b1) begin
          bcnt <= '0;
          if (fcnt == $bits(fcnt)'(FRAMES - 1)) begin
            fcnt      <= '0;
            have_prev <= 1'b1;
          end else begin
            fcnt <= fcnt + 1'b1;
          end
        end else begin
          bcnt <= bcnt + 1'b1;
        end
      end
    end
  end
endmodule
