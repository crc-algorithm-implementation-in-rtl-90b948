// crc_parallel: word-parallel CRC engine. One clock folds a whole DATA_W-bit
// word into the CRC register; afterwards the CRC is unloaded OUT_W bits per
// clock. With the defaults it is the byte-parallel CCITT CRC16 of Xmodem
// (one byte per clock, 128 clocks for a 128-byte packet instead of 1040);
// with CRC_W = 32, DATA_W = 32, OUT_W = 16 and POLY = 32'h04C11DB7 it is the
// four-byte-parallel CRC32.
//
// How it works: the next register value is the serial recurrence applied
// DATA_W times in one combinational step (a loop unrolled by synthesis into
// an XOR network). Each step uses the direct form
//     fb = r_{W-1} ^ m;   r <= {r[W-2:0], 0} ^ (fb ? POLY : 0),
// which yields M(x)*x^W mod G(x) without shifting W zero bits in afterwards.
//
// Interface (names as in the published simulation of the engine):
//   reset    synchronous, active high: crc_reg <= INIT, crc <= 0
//   init     synchronous start of a new message: same effect as reset
//   d_valid  d holds a word this clock
//   calc     with d_valid: fold d in (crc_reg <= next, crc <= top OUT_W bits
//            of next); without calc, d_valid unloads: crc_reg shifts left by
//            OUT_W bits and crc shows the next OUT_W-bit piece
//   crc_reg  the CRC register, valid the clock after the last word
//   crc      the CRC piece on its way out, high piece first
// DATA_LSB_FIRST feeds d[0] first instead of d[DATA_W-1]; OUT_INV_REV presents
// crc bit-reversed and inverted. Both are 0 for Xmodem; both set to 1 give the
// Ethernet-style convention of the published CRC16 and CRC32 waveforms (a byte
// 8'hC4 into a cleared CRC16 register gives crc_reg = 16'h1401 and crc = 8'hD7,
// then 8'h7F and 8'hFF while unloading).
//
// The polynomials, word widths and the init/calc/d_valid/crc_reg/crc interface
// follow the document; the direct form, the reset/init values and the two
// bit-order parameters are choices of this design.
module crc_parallel #(
  parameter int unsigned        CRC_W          = 16,
  parameter int unsigned        DATA_W         = 8,
  parameter int unsigned        OUT_W          = 8,
  parameter logic [CRC_W-1:0]   POLY           = 16'h1021,
  parameter logic [CRC_W-1:0]   INIT           = '0,
  parameter bit                 DATA_LSB_FIRST = 1'b0,
  parameter bit                 OUT_INV_REV    = 1'b0
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              init,
  input  logic              calc,
  input  logic              d_valid,
  input  logic [DATA_W-1:0] d,
  output logic [CRC_W-1:0]  crc_reg,
  output logic [OUT_W-1:0]  crc
);

  logic [CRC_W-1:0] next_crc;

  // DATA_W serial steps in one clock.
  always_comb begin
    logic [CRC_W-1:0] r;
    logic             fb;
    r = crc_reg;
    for (int i = 0; i < DATA_W; i++) begin
      fb = r[CRC_W-1] ^ (DATA_LSB_FIRST ? d[i] : d[DATA_W-1-i]);
      r  = {r[CRC_W-2:0], 1'b0} ^ (fb ? POLY : '0);
    end
    next_crc = r;
  end

  function automatic logic [OUT_W-1:0] present(input logic [OUT_W-1:0] piece);
    logic [OUT_W-1:0] rev;
    for (int i = 0; i < OUT_W; i++) rev[i] = piece[OUT_W-1-i];
    return OUT_INV_REV ? ~rev : piece;
  endfunction

  always_ff @(posedge clk) begin
    if (reset || init) begin
      crc_reg <= INIT;
      crc     <= '0;
    end else if (d_valid && calc) begin
      crc_reg <= next_crc;
      crc     <= present(next_crc[CRC_W-1 -: OUT_W]);
    end else if (d_valid) begin
      crc_reg <= crc_reg << OUT_W;
      crc     <= present(crc_reg[CRC_W-OUT_W-1 -: OUT_W]);
    end
  end

  initial begin
    assert (CRC_W % OUT_W == 0 && OUT_W < CRC_W)
      else $error("crc_parallel: OUT_W must divide CRC_W and be smaller");
  end

endmodule
