// adsl_decoder: the byte-level half of the receiver ("Decoder" in the block
// diagram): bit decoder -> de-interleaver -> Reed-Solomon decoder ->
// descrambler -> CRC check.
//
// Input is the stream of 256 complex FFT bins per DMT symbol (bin order, last
// bin flagged); output is the stream of user bytes with frame markers and the
// superframe CRC result. All internal links are valid/ready, so a slow consumer
// or a busy RS decoder stalls the bins at in_ready. Configuration (bit table,
// N, R, D, log2 S) is static after reset; a data frame holds (N-R)/S bytes.
// The composition and order follow the receiver block diagram; the handshakes
// and the frame-length arithmetic are this design's own.
module adsl_decoder
  import adsl_pkg::*;
#(
  parameter int unsigned DW         = 16,
  parameter int unsigned UNIT_SHIFT = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bt_we,
  input  logic [6:0]           bt_tone,
  input  logic [4:0]           bt_bits,
  input  logic [7:0]           cfg_n,
  input  logic [4:0]           cfg_r,
  input  logic [4:0]           cfg_d,
  input  logic [2:0]           cfg_log2s,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  logic [7:0]           in_idx,
  input  logic                 in_last,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic [7:0]           m_data,
  output logic                 m_crc_byte,
  output logic                 m_sof,
  output logic [6:0]           m_frame,
  output logic                 sym_done,   // pulse: all bytes of a symbol demapped
  output logic                 rs_done,
  output logic [4:0]           rs_nerr,
  output logic                 rs_fail,
  output logic                 crc_check,
  output logic                 crc_error,
  output logic [7:0]           crc_value
);
  logic       b_valid, b_ready;
  logic [7:0] b_data;
  logic       i_valid, i_ready;
  logic [7:0] i_data;
  logic       r_valid, r_ready;
  logic [7:0] r_data;
  logic       d_valid, d_ready;
  logic [7:0] d_data;
  logic [7:0] frame_bytes;

  assign frame_bytes = (cfg_n - {3'b000, cfg_r}) >> cfg_log2s;

  bit_decoder #(.N(FFT_N), .DW(DW), .UNIT_SHIFT(UNIT_SHIFT), .NTONE(NUM_TONES), .PILOT(PILOT_TONE)) u_bd (
    .clk, .rst_n,
    .cfg_we(bt_we), .cfg_tone(bt_tone), .cfg_bits(bt_bits),
    .in_valid, .in_ready, .in_re, .in_im, .in_idx, .in_last,
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data), .frame_done(sym_done));

  deinterleaver #(.NMAX(RS_NMAX), .DMAX(D_MAX)) u_di (
    .clk, .rst_n, .cfg_n(cfg_n), .cfg_d(cfg_d),
    .in_valid(b_valid), .in_ready(b_ready), .in_data(b_data),
    .out_valid(i_valid), .out_ready(i_ready), .out_data(i_data), .out_first());

  rs_decoder #(.NMAX(RS_NMAX), .RMAX(RS_RMAX)) u_rs (
    .clk, .rst_n, .cfg_n(cfg_n), .cfg_r(cfg_r),
    .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data), .out_last(),
    .dec_done(rs_done), .dec_nerr(rs_nerr), .dec_fail(rs_fail));

  descrambler u_ds (
    .clk, .rst_n,
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data));

  crc8_check #(.FRAMES(DATA_FRAMES)) u_crc (
    .clk, .rst_n, .cfg_frame_bytes(frame_bytes),
    .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data),
    .out_crc_byte(m_crc_byte), .out_sof(m_sof), .out_frame(m_frame),
    .crc_check(crc_check), .crc_error(crc_error), .crc_value(crc_value));
endmodule
