// tb_crc_parallel: self-checking test of the word-parallel CRC engine in four
// configurations.
//
//  a. defaults (Xmodem CRC16, one byte per clock): "123456789" gives 16'h31C3
//     in 9 clocks; random 128-byte data fields match a bit-serial reference and
//     take 128 clocks; unloading shows the high byte then the low byte on crc;
//     init and reset clear the register; d_valid low holds it.
//  b. CRC16 with d[0] first and inverted, bit-reversed output: byte 8'hC4 into
//     a cleared register gives crc_reg 16'h1401 and crc 8'hD7, then unloading
//     gives 16'h0100 / 8'h7F and 16'h0000 / 8'hFF (the published CRC16 trace).
//  c. CRC32, 32-bit words, 16-bit unload, same conventions as b: a word that
//     leaves crc_reg = 32'h1373A5E7 must unload as 16'h3137, 16'h185A and then
//     16'hFFFF (the published CRC32 trace). The word was chosen here by
//     solving the CRC equations for that register value.
//  d. CRC32, 32-bit words, high bit first: random messages match the bit-serial
//     reference, one word per clock.
//  e. the other standard generators, one byte per clock, "123456789" with a
//     zero initial value and no reflection: CRC8 x^8+x^5+x^4+1 gives 8'hA2,
//     CRC12 x^12+x^11+x^3+x^2+1 gives 12'hEFB, ANSI CRC16 x^16+x^15+x^2+1
//     gives 16'hFEE8, CRC32 gives 32'h89A1897F (values computed with a
//     bit-serial software model).
module tb_crc_parallel;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // a. default instance
  logic        a_reset, a_init, a_calc, a_dv;
  logic [7:0]  a_d, a_crc;
  logic [15:0] a_reg;
  crc_parallel dut_a (.clk(clk), .reset(a_reset), .init(a_init), .calc(a_calc),
                      .d_valid(a_dv), .d(a_d), .crc_reg(a_reg), .crc(a_crc));

  // b. published CRC16 convention
  logic        b_init, b_calc, b_dv;
  logic [7:0]  b_d, b_crc;
  logic [15:0] b_reg;
  crc_parallel #(.DATA_LSB_FIRST(1'b1), .OUT_INV_REV(1'b1)) dut_b (
    .clk(clk), .reset(a_reset), .init(b_init), .calc(b_calc),
    .d_valid(b_dv), .d(b_d), .crc_reg(b_reg), .crc(b_crc));

  // c. published CRC32 convention
  logic        c_init, c_calc, c_dv;
  logic [31:0] c_d, c_reg;
  logic [15:0] c_crc;
  crc_parallel #(.CRC_W(32), .DATA_W(32), .OUT_W(16), .POLY(32'h04C11DB7),
                 .DATA_LSB_FIRST(1'b1), .OUT_INV_REV(1'b1)) dut_c (
    .clk(clk), .reset(a_reset), .init(c_init), .calc(c_calc),
    .d_valid(c_dv), .d(c_d), .crc_reg(c_reg), .crc(c_crc));

  // d. CRC32, high bit first
  logic        e_init, e_dv;
  logic [31:0] e_d, e_reg;
  logic [15:0] e_crc;
  crc_parallel #(.CRC_W(32), .DATA_W(32), .OUT_W(16), .POLY(32'h04C11DB7)) dut_d (
    .clk(clk), .reset(a_reset), .init(e_init), .calc(1'b1),
    .d_valid(e_dv), .d(e_d), .crc_reg(e_reg), .crc(e_crc));

  // e. other generators, byte input
  logic        g_init, g_dv;
  logic [7:0]  g_d;
  logic [7:0]  g8_reg;   logic [3:0]  g8_crc;
  logic [11:0] g12_reg;  logic [3:0]  g12_crc;
  logic [15:0] g16_reg;  logic [7:0]  g16_crc;
  logic [31:0] g32_reg;  logic [7:0]  g32_crc;
  crc_parallel #(.CRC_W(8), .OUT_W(4), .POLY(8'h31)) dut_g8 (
    .clk(clk), .reset(a_reset), .init(g_init), .calc(1'b1), .d_valid(g_dv), .d(g_d),
    .crc_reg(g8_reg), .crc(g8_crc));
  crc_parallel #(.CRC_W(12), .OUT_W(4), .POLY(12'h80D)) dut_g12 (
    .clk(clk), .reset(a_reset), .init(g_init), .calc(1'b1), .d_valid(g_dv), .d(g_d),
    .crc_reg(g12_reg), .crc(g12_crc));
  crc_parallel #(.CRC_W(16), .OUT_W(8), .POLY(16'h8005)) dut_g16 (
    .clk(clk), .reset(a_reset), .init(g_init), .calc(1'b1), .d_valid(g_dv), .d(g_d),
    .crc_reg(g16_reg), .crc(g16_crc));
  crc_parallel #(.CRC_W(32), .OUT_W(8), .POLY(32'h04C11DB7)) dut_g32 (
    .clk(clk), .reset(a_reset), .init(g_init), .calc(1'b1), .d_valid(g_dv), .d(g_d),
    .crc_reg(g32_reg), .crc(g32_crc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bit-serial reference: message bits high first, r bits, generator g
  function automatic logic [31:0] ref_serial(input int r, input logic [31:0] g,
                                             input bit msg[$]);
    logic [31:0] c = '0;
    logic [31:0] top = 32'h1 << (r - 1);
    logic [31:0] mask = (r == 32) ? 32'hFFFF_FFFF : ((32'h1 << r) - 1);
    foreach (msg[i]) begin
      bit fb = ((c & top) != 0) ^ msg[i];
      c = (c << 1) & mask;
      if (fb) c ^= g;
    end
    return c;
  endfunction

  initial begin
    bit          msg[$];
    logic [7:0]  bytes[$];
    int          cycles;
    static string s = "123456789";

    a_reset = 1'b1; a_init = 1'b0; a_calc = 1'b0; a_dv = 1'b0; a_d = '0;
    b_init = 1'b0; b_calc = 1'b0; b_dv = 1'b0; b_d = '0;
    c_init = 1'b0; c_calc = 1'b0; c_dv = 1'b0; c_d = '0;
    e_init = 1'b0; e_dv = 1'b0; e_d = '0;
    g_init = 1'b0; g_dv = 1'b0; g_d = '0;
    @(posedge clk); #1;
    a_reset = 1'b0;
    check(a_reg == 16'h0 && a_crc == 8'h0 && b_reg == 16'h0 && c_reg == 32'h0,
          "reset clears registers");

    // ---- a: check value, one byte per clock ----
    a_calc = 1'b1; a_dv = 1'b1; cycles = 0;
    for (int i = 0; i < s.len(); i++) begin
      a_d = s[i];
      @(posedge clk); #1; cycles++;
    end
    a_dv = 1'b0;
    check(a_reg == 16'h31C3, $sformatf("check value: got %h", a_reg));
    check(cycles == 9, "check value in 9 clocks");
    check(a_crc == 8'h31, $sformatf("crc shows high byte: %h", a_crc));
    repeat (3) @(posedge clk); #1;
    check(a_reg == 16'h31C3, "d_valid low holds the register");
    // unload
    a_calc = 1'b0; a_dv = 1'b1;
    @(posedge clk); #1;
    check(a_crc == 8'hC3 && a_reg == 16'hC300, $sformatf("unload 1: %h %h", a_crc, a_reg));
    @(posedge clk); #1;
    check(a_crc == 8'h00 && a_reg == 16'h0000, $sformatf("unload 2: %h %h", a_crc, a_reg));
    a_dv = 1'b0;

    // random Xmodem data fields
    for (int t = 0; t < 8; t++) begin
      a_init = 1'b1; @(posedge clk); #1; a_init = 1'b0;
      check(a_reg == 16'h0, "init clears");
      bytes = {}; msg = {};
      for (int i = 0; i < 128; i++) begin
        bytes.push_back(8'($urandom));
        for (int b = 7; b >= 0; b--) msg.push_back(bytes[i][b]);
      end
      a_calc = 1'b1; cycles = 0;
      foreach (bytes[i]) begin
        a_dv = 1'b1; a_d = bytes[i];
        @(posedge clk); #1; cycles++;
        if ($urandom % 4 == 0) begin   // idle clocks in between
          a_dv = 1'b0; a_d = 8'($urandom);
          @(posedge clk); #1;
        end
      end
      a_dv = 1'b0;
      check(a_reg == 16'(ref_serial(16, 32'h1021, msg)),
            $sformatf("packet %0d: got %h want %h", t, a_reg, ref_serial(16, 32'h1021, msg)));
      check(cycles == 128, "128 data clocks per packet");
    end

    // ---- b: published CRC16 trace ----
    b_init = 1'b1; @(posedge clk); #1; b_init = 1'b0;
    b_d = 8'hC4; b_calc = 1'b1; b_dv = 1'b1;
    @(posedge clk); #1;
    check(b_reg == 16'h1401 && b_crc == 8'hD7, $sformatf("trace16 calc: %h %h", b_reg, b_crc));
    b_calc = 1'b0;
    @(posedge clk); #1;
    check(b_reg == 16'h0100 && b_crc == 8'h7F, $sformatf("trace16 unload 1: %h %h", b_reg, b_crc));
    @(posedge clk); #1;
    check(b_reg == 16'h0000 && b_crc == 8'hFF, $sformatf("trace16 unload 2: %h %h", b_reg, b_crc));
    b_dv = 1'b0;

    // ---- c: published CRC32 trace ----
    c_init = 1'b1; @(posedge clk); #1; c_init = 1'b0;
    c_d = 32'hE648_F041; c_calc = 1'b1; c_dv = 1'b1;
    @(posedge clk); #1;
    check(c_reg == 32'h1373_A5E7 && c_crc == 16'h3137, $sformatf("trace32 calc: %h %h", c_reg, c_crc));
    c_calc = 1'b0; c_d = '0;
    @(posedge clk); #1;
    check(c_reg == 32'hA5E7_0000 && c_crc == 16'h185A, $sformatf("trace32 unload 1: %h %h", c_reg, c_crc));
    @(posedge clk); #1;
    check(c_reg == 32'h0 && c_crc == 16'hFFFF, $sformatf("trace32 unload 2: %h %h", c_reg, c_crc));
    c_dv = 1'b0;

    // ---- d: CRC32, four bytes per clock ----
    e_init = 1'b1; @(posedge clk); #1; e_init = 1'b0;
    e_dv = 1'b1; e_d = 32'h3132_3334; @(posedge clk); #1;
    e_d = 32'h3536_3738; @(posedge clk); #1; e_dv = 1'b0;
    check(e_reg == 32'h20E7_79A2, $sformatf("CRC32 of \"12345678\": %h", e_reg));
    for (int t = 0; t < 8; t++) begin
      int words = 1 + $urandom % 40;
      e_init = 1'b1; @(posedge clk); #1; e_init = 1'b0;
      msg = {};
      for (int w = 0; w < words; w++) begin
        e_d = $urandom; e_dv = 1'b1;
        for (int b = 31; b >= 0; b--) msg.push_back(e_d[b]);
        @(posedge clk); #1;
      end
      e_dv = 1'b0;
      check(e_reg == ref_serial(32, 32'h04C11DB7, msg),
            $sformatf("CRC32 message %0d: got %h want %h", t, e_reg, ref_serial(32, 32'h04C11DB7, msg)));
      check(e_crc == e_reg[31:16], "CRC32 crc shows the high half");
    end

    // ---- e: other generators ----
    g_init = 1'b1; @(posedge clk); #1; g_init = 1'b0;
    for (int i = 0; i < s.len(); i++) begin
      g_d = s[i]; g_dv = 1'b1;
      @(posedge clk); #1;
    end
    g_dv = 1'b0;
    check(g8_reg == 8'hA2, $sformatf("CRC8 check value %h", g8_reg));
    check(g8_crc == 4'hA, "CRC8 crc shows the high nibble");
    check(g12_reg == 12'hEFB, $sformatf("CRC12 check value %h", g12_reg));
    check(g16_reg == 16'hFEE8, $sformatf("ANSI CRC16 check value %h", g16_reg));
    check(g32_reg == 32'h89A1_897F, $sformatf("CRC32 bytewise check value %h", g32_reg));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
