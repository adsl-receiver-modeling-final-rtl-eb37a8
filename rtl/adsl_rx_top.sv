// adsl_rx_top: G.Lite ADSL downstream receiver data path.
//
// Digitised line samples go through the chain
//   TEQ (FIR) -> cyclic-prefix removal -> sync-frame drop -> 256-point FFT ->
//   bit decoder -> de-interleaver -> Reed-Solomon decoder -> descrambler -> CRC
// where the last five form adsl_decoder (the "Decoder" of the block diagram)
// and come out as user bytes. Every block hands data on with valid/ready, so
// the slow FFT simply back-pressures the sample input (s_ready low) while it
// computes; one DMT symbol needs about 1550 clock cycles at the FFT.
//
// Configuration is static after start-up, as the receiver is assumed to have
// finished its training: TEQ taps (teq_we/teq_addr/teq_coef), the bit-loading
// table (bt_we/bt_tone/bt_bits), the RS codeword length cfg_n (also the
// interleaving block), the parity byte count cfg_r, the interleave depth cfg_d
// and log2 of the frames per codeword, cfg_log2s. A data frame then holds
// (cfg_n - cfg_r) >> cfg_log2s bytes; the CRC block counts 68 such frames per
// superframe. Sample input must start at the first cyclic-prefix sample of the
// first frame of a superframe. Status: rs_done/rs_nerr/rs_fail per codeword,
// crc_check/crc_error per superframe, sync_dropped per dropped sync frame.
// The block order follows the receiver block diagram, with the sync-frame drop
// right after the cyclic-prefix removal; the handshakes and widths are this
// design's own. The 24-bit default sample width (DW) leaves room for the
// heaviest loading, 16 bits on every tone, whose time signal peaks near 2^18
// at the default constellation unit of 16 LSBs; the decoder, which sees only
// the 1/256-scaled bins, keeps its own 16-bit default but is built at DW here.
module adsl_rx_top
  import adsl_pkg::*;
#(
  parameter int unsigned DW         = 24,
  parameter int unsigned NTAPS      = 16,
  parameter int unsigned UNIT_SHIFT = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  logic                     teq_we,
  input  logic [$clog2(NTAPS)-1:0] teq_addr,
  input  logic signed [15:0]       teq_coef,
  input  logic                     bt_we,
  input  logic [6:0]               bt_tone,
  input  logic [4:0]               bt_bits,
  input  logic [7:0]               cfg_n,
  input  logic [4:0]               cfg_r,
  input  logic [4:0]               cfg_d,
  input  logic [2:0]               cfg_log2s,
  // digitised line samples
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic signed [DW-1:0]     s_data,
  // decoded user bytes
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic [7:0]               m_data,
  output logic                     m_crc_byte,
  output logic                     m_sof,
  output logic [6:0]               m_frame,      // data frame number in the superframe
  // status
  output logic                     sync_dropped,
  output logic                     sym_done,     // pulse: a data symbol has been demapped
  output logic                     rs_done,
  output logic [4:0]               rs_nerr,
  output logic                     rs_fail,
  output logic                     crc_check,
  output logic                     crc_error,
  output logic [7:0]               crc_value     // CRC computed over the previous superframe
);
  // TEQ -> CP removal
  logic                 t_valid, t_ready;
  logic signed [DW-1:0] t_data;
  // CP removal -> SF drop
  logic                 c_valid, c_ready;
  logic signed [DW-1:0] c_data;
  // SF drop -> FFT
  logic                 f_valid, f_ready;
  logic signed [DW-1:0] f_data;
  // FFT -> bit decoder
  logic                 x_valid, x_ready, x_last;
  logic signed [DW-1:0] x_re, x_im;
  logic [7:0]           x_idx;
  teq_fir #(.NTAPS(NTAPS), .DW(DW)) u_teq (
    .clk, .rst_n,
    .cfg_we(teq_we), .cfg_addr(teq_addr), .cfg_coef(teq_coef),
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data));

  cp_remove #(.CP_LEN(CP_LEN), .SYM_LEN(FFT_N), .DW(DW)) u_cp (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data), .out_sof());

  sync_frame_drop #(.FRAME_LEN(FFT_N), .PERIOD(SF_PERIOD), .DW(DW)) u_sf (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .out_sof(), .out_frame(), .sync_dropped(sync_dropped));

  fft_r2 #(.N(FFT_N), .DW(DW)) u_fft (
    .clk, .rst_n,
    .in_valid(f_valid), .in_ready(f_ready), .in_data(f_data),
    .out_valid(x_valid), .out_ready(x_ready), .out_re(x_re), .out_im(x_im),
    .out_idx(x_idx), .out_last(x_last));

  adsl_decoder #(.DW(DW), .UNIT_SHIFT(UNIT_SHIFT)) u_dec (
    .clk, .rst_n,
    .bt_we, .bt_tone, .bt_bits, .cfg_n, .cfg_r, .cfg_d, .cfg_log2s,
    .in_valid(x_valid), .in_ready(x_ready), .in_re(x_re), .in_im(x_im),
    .in_idx(x_idx), .in_last(x_last),
    .m_valid, .m_ready, .m_data, .m_crc_byte, .m_sof, .m_frame,
    .sym_done, .rs_done, .rs_nerr, .rs_fail, .crc_check, .crc_error, .crc_value);

endmodule
