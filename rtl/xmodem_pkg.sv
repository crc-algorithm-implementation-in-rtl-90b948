// xmodem_pkg: control characters, packet sizes and CRC constants shared by the
// Xmodem sender, receiver and the CRC engines.
//
// The character codes are those of the Xmodem protocol: a packet starts with SOH
// (128-byte data field) or STX (1024-byte data field, Xmodem-1K), the receiver
// answers ACK or NAK, asks for CRC mode with the letter 'C' (decimal 67), the
// file ends with EOT sent alone, and a short last packet is padded with SUB
// (decimal 26). The CRC of Xmodem is CCITT CRC16, x^16 + x^12 + x^5 + 1.
package xmodem_pkg;

  localparam logic [7:0] SOH    = 8'h01;
  localparam logic [7:0] STX    = 8'h02;
  localparam logic [7:0] EOT    = 8'h04;
  localparam logic [7:0] ACK    = 8'h06;
  localparam logic [7:0] NAK    = 8'h15;
  localparam logic [7:0] SUB    = 8'h1A;  // padding character, 26 decimal
  localparam logic [7:0] CHAR_C = 8'h43;  // 'C', 67 decimal: request CRC mode

  localparam int unsigned BLK_SHORT = 128;   // Xmodem data field, bytes
  localparam int unsigned BLK_LONG  = 1024;  // Xmodem-1K data field, bytes

  // Generator polynomials without their top term (x^r).
  localparam logic [15:0] POLY_CRC16_CCITT = 16'h1021;        // 0x11021
  localparam logic [31:0] POLY_CRC32       = 32'h04C1_1DB7;   // 0x104C11DB7

  // Error-check mode negotiated at the start of a transfer.
  typedef enum logic {
    MODE_CHECKSUM = 1'b0,  // 8-bit arithmetic sum of the data bytes
    MODE_CRC      = 1'b1   // CCITT CRC16, sent high byte first
  } check_mode_e;

endpackage
