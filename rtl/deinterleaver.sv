// deinterleaver: convolutional byte de-interleaver.
//
// The transmitter delays byte i (i = 0..N-1) of each N-byte interleaving block
// by (D-1)*i bytes. This block delays it by the complement (D-1)*(N-1-i), so that
// every byte sees the same total delay (D-1)*(N-1) and the original order comes
// back. All bytes live in one ring buffer: each input byte is written at the
// write pointer, and the output byte for block position i is read
// (D-1)*(N-1-i) bytes behind it (the input itself when that distance is 0).
// The first (D-1)*(N-1) input bytes only fill the buffer and produce no output,
// so the first output byte is byte 0 of the first block and block alignment is
// kept for the Reed-Solomon decoder.
//
// Interface: valid/ready byte streams; one byte in, one byte out per cycle after
// the fill, with one cycle of latency (registered synchronous read).
// cfg_n (block length, 1..NMAX) and cfg_d (depth, 1..DMAX) must be held stable
// after reset. The buffer holds DEPTH = 2^ceil(log2((DMAX-1)*(NMAX-1)+1)) bytes,
// 4096 at D = 16, N = 255. The delay rule follows the receiver description;
// the ring-buffer organisation is this design's own.
module deinterleaver #(
  parameter int unsigned NMAX  = 255,
  parameter int unsigned DMAX  = 16,
  parameter int unsigned DEPTH = 2 ** $clog2((DMAX - 1) * (NMAX - 1) + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(NMAX+1)-1:0]  cfg_n,
  input  logic [$clog2(DMAX+1)-1:0]  cfg_d,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [7:0]                 in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [7:0]                 out_data,
  output logic                       out_first    // output byte is byte 0 of a block
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned NW = $clog2(NMAX + 1);

  logic [7:0]    mem [DEPTH];
  logic [PW-1:0] wptr;
  logic [PW:0]   filled;     // inputs absorbed before the first output
  logic [NW-1:0] idx;        // block position of the next output byte
  logic [PW:0]   fill_len;
  logic [PW:0]   off;
  logic          active;

  assign fill_len = (PW+1)'((cfg_d - 1'b1)) * (PW+1)'((cfg_n - 1'b1));
  assign off      = (PW+1)'((cfg_d - 1'b1)) * ((PW+1)'(cfg_n) - (PW+1)'(1) - (PW+1)'(idx));
  assign active   = filled >= fill_len;
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      mem[wptr] <= in_data;
      if (off == '0) out_data <= in_data;
      else           out_data <= mem[wptr - off[PW-1:0]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      filled    <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        wptr <= wptr + 1'b1;
        if (!active) begin
          filled    <= filled + 1'b1;
          out_valid <= 1'b0;
        end else begin
          out_valid <= 1'b1;
          out_first <= idx == '0;
          idx       <= (idx == cfg_n - 1'b1) ? '0 : idx + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
  // Handshake rule: an offered output stays unchanged until it is taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
