// xmodem_crc_top: CRC computation for Xmodem file transfer, both ends plus the
// CRC circuits they are built from.
//
// Contents, each with its own ports:
//   u_sender    xmodem_tx: file stream in, Xmodem packets out, ACK/NAK/'C' in
//   u_receiver  xmodem_rx: Xmodem packets in, ACK/NAK/'C' out, checked data out
//               (both use a byte-parallel CCITT CRC16 engine, one byte a clock)
//   u_crc32     crc_parallel as a 32-bit-parallel CRC32 engine
//               (x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1),
//               four bytes a clock, the CRC unloaded 16 bits a clock
//   u_serial16  crc16_lfsr_serial: the bit-serial CCITT CRC16 circuit
//   u_lfsr      crc_lfsr_prog: the bit-serial division register with a
//               programmable polynomial
// The sender and the receiver are the two ends of a serial link; they are not
// wired to each other here, so either can talk to a remote partner. Connect
// s_line_* to r_line_in_* and r_line_* to s_reply_* for a local loop.
//
// Timing: everything is synchronous to clk; reset is synchronous and active
// high, except the two serial circuits, which have their own asynchronous
// clears. TIMEOUT_CYCLES is the receiver's 3 s silence limit in clocks.
module xmodem_crc_top
  import xmodem_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 150_000_000,
  parameter int unsigned LFSR_K         = 16
) (
  input  logic              clk,
  input  logic              reset,

  // sender
  input  logic              s_start,
  input  logic              s_crc_capable,
  input  logic              s_use_1k,
  input  logic [7:0]        s_file_byte,
  input  logic              s_file_valid,
  input  logic              s_file_last,
  output logic              s_file_ready,
  output logic [7:0]        s_line_byte,
  output logic              s_line_valid,
  input  logic              s_line_ready,
  input  logic [7:0]        s_reply_byte,
  input  logic              s_reply_valid,
  output check_mode_e       s_mode,
  output logic              s_busy,
  output logic              s_done,
  output logic [15:0]       s_pkt_count,
  output logic [15:0]       s_resend_count,

  // receiver
  input  logic              r_start,
  input  logic [7:0]        r_line_in_byte,
  input  logic              r_line_in_valid,
  output logic [7:0]        r_line_byte,
  output logic              r_line_valid,
  input  logic              r_line_ready,
  output logic [7:0]        r_out_byte,
  output logic              r_out_valid,
  input  logic              r_out_ready,
  output check_mode_e       r_mode,
  output logic              r_busy,
  output logic              r_done,
  output logic [15:0]       r_pkt_count,

  // CRC32, four bytes per clock
  input  logic              c32_init,
  input  logic              c32_calc,
  input  logic              c32_d_valid,
  input  logic [31:0]       c32_d,
  output logic [31:0]       c32_crc_reg,
  output logic [15:0]       c32_crc,

  // bit-serial CCITT CRC16
  input  logic              s16_cr,
  input  logic              s16_in,
  output logic [15:0]       s16_d,

  // bit-serial division register, programmable polynomial
  input  logic              lp_cr,
  input  logic              lp_in,
  input  logic [LFSR_K-1:0] lp_g,
  output logic [LFSR_K-1:0] lp_d
);

  xmodem_tx u_sender (
    .clk          (clk),
    .reset        (reset),
    .start        (s_start),
    .crc_capable  (s_crc_capable),
    .use_1k       (s_use_1k),
    .in_byte      (s_file_byte),
    .in_valid     (s_file_valid),
    .in_last      (s_file_last),
    .in_ready     (s_file_ready),
    .tx_byte      (s_line_byte),
    .tx_valid     (s_line_valid),
    .tx_ready     (s_line_ready),
    .rx_byte      (s_reply_byte),
    .rx_valid     (s_reply_valid),
    .mode         (s_mode),
    .busy         (s_busy),
    .done         (s_done),
    .pkt_count    (s_pkt_count),
    .resend_count (s_resend_count)
  );

  xmodem_rx #(
    .TIMEOUT_CYCLES (TIMEOUT_CYCLES)
  ) u_receiver (
    .clk       (clk),
    .reset     (reset),
    .start     (r_start),
    .rx_byte   (r_line_in_byte),
    .rx_valid  (r_line_in_valid),
    .tx_byte   (r_line_byte),
    .tx_valid  (r_line_valid),
    .tx_ready  (r_line_ready),
    .out_byte  (r_out_byte),
    .out_valid (r_out_valid),
    .out_ready (r_out_ready),
    .mode      (r_mode),
    .busy      (r_busy),
    .done      (r_done),
    .pkt_count (r_pkt_count)
  );

  crc_parallel #(
    .CRC_W  (32),
    .DATA_W (32),
    .OUT_W  (16),
    .POLY   (POLY_CRC32)
  ) u_crc32 (
    .clk     (clk),
    .reset   (reset),
    .init    (c32_init),
    .calc    (c32_calc),
    .d_valid (c32_d_valid),
    .d       (c32_d),
    .crc_reg (c32_crc_reg),
    .crc     (c32_crc)
  );

  crc16_lfsr_serial u_serial16 (
    .clk (clk),
    .cr  (s16_cr),
    .in  (s16_in),
    .d   (s16_d)
  );

  crc_lfsr_prog #(
    .K (LFSR_K)
  ) u_lfsr (
    .clk (clk),
    .cr  (lp_cr),
    .in  (lp_in),
    .g   (lp_g),
    .d   (lp_d)
  );

endmodule
