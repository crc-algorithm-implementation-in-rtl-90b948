// crc16_lfsr_serial: bit-serial CCITT CRC16 circuit, G(x) = x^16 + x^12 + x^5 + 1,
// the general division register specialised to a fixed polynomial.
//
// Sixteen flip-flops r0..r15 form a shift register towards r15. The feedback
// bit r15 is XORed into the input of r0 (with the serial input), of r5 (with
// r4) and of r12 (with r11); every other stage copies its lower neighbour.
// After clearing, the message is shifted in high-order bit first and followed
// by 16 zero bits; the register then holds the CRC, d[15] being the
// coefficient of x^15. A 128-byte Xmodem data field therefore needs
// 1024 + 16 = 1040 clocks, the cost that the byte-parallel engine removes.
//
// Interface: one bit on in per clock; cr clears the register asynchronously
// (active high); d[j] is stage r_j. The polarity and asynchronous action of
// cr are choices of this design.
module crc16_lfsr_serial (
  input  logic        clk,
  input  logic        cr,
  input  logic        in,
  output logic [15:0] d
);

  logic [15:0] r;
  logic        fb;

  assign fb = r[15];

  always_ff @(posedge clk or posedge cr) begin
    if (cr) begin
      r <= '0;
    end else begin
      r[0]     <= in ^ fb;
      r[4:1]   <= r[3:0];
      r[5]     <= r[4] ^ fb;
      r[11:6]  <= r[10:5];
      r[12]    <= r[11] ^ fb;
      r[15:13] <= r[14:12];
    end
  end

  assign d = r;

endmodule
