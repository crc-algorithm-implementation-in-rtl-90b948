// tb_crc_lfsr_prog: self-checking test of the programmable bit-serial CRC
// division register.
//
// 1. K = 3, G = x^3 + x + 1 (taps 3'b011), message 11100110 shifted in high
//    bit first: the register must step through 001 011 111 101 001 011 111 101,
//    the worked division of this message, ending with remainder 101.
// 2. K = 16 with the CCITT taps 16'h1021: the ASCII string "123456789" followed
//    by 16 zero bits must leave 16'h31C3, the published check value of the
//    Xmodem CRC.
// 3. K = 16 with random taps and random messages: the result must equal a
//    long division done here on the message polynomial, M(x)*x^16 mod G(x).
// 4. The asynchronous clear empties the register between clock edges.
module tb_crc_lfsr_prog;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- small instance: the worked example ----
  logic       cr3, in3;
  logic [2:0] g3, d3;
  crc_lfsr_prog #(.K(3)) dut3 (.clk(clk), .cr(cr3), .in(in3), .g(g3), .d(d3));

  // ---- 16-bit instance ----
  logic        cr16, in16;
  logic [15:0] g16, d16;
  crc_lfsr_prog #(.K(16)) dut16 (.clk(clk), .cr(cr16), .in(in16), .g(g16), .d(d16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // remainder of M(x) * x^16 divided by x^16 + g, by polynomial long division
  function automatic logic [15:0] ref_rem(input logic [15:0] g, input bit msg[$]);
    logic [16:0] acc;
    bit          bits[$];
    bits = msg;
    for (int i = 0; i < 16; i++) bits.push_back(1'b0);
    acc = '0;
    foreach (bits[i]) begin
      acc = {acc[15:0], bits[i]};
      if (acc[16]) acc = acc ^ {1'b1, g};
    end
    return acc[15:0];
  endfunction

  task automatic shift16(input bit msg[$]);
    foreach (msg[i]) begin
      in16 = msg[i];
      @(posedge clk); #1;
    end
    in16 = 1'b0;
    repeat (16) begin @(posedge clk); #1; end
  endtask

  initial begin
    static logic [2:0] expect3[8] = '{3'b001, 3'b011, 3'b111, 3'b101,
                                      3'b001, 3'b011, 3'b111, 3'b101};
    static logic [7:0] m3 = 8'b1110_0110;
    static string      s  = "123456789";
    bit msg[$];

    cr3 = 1'b1; cr16 = 1'b1; in3 = 1'b0; in16 = 1'b0; g3 = 3'b011; g16 = 16'h1021;
    @(posedge clk); #1;
    cr3 = 1'b0; cr16 = 1'b0;
    check(d3 == 3'b000 && d16 == 16'h0, "cleared after CR");

    // 1. worked example
    for (int i = 0; i < 8; i++) begin
      in3 = m3[7-i];
      @(posedge clk); #1;
      check(d3 == expect3[i], $sformatf("example step %0d: got %b want %b", i, d3, expect3[i]));
    end

    // 2. check value
    cr16 = 1'b1; #1; cr16 = 1'b0;
    check(d16 == 16'h0, "asynchronous clear");
    msg = {};
    for (int c = 0; c < s.len(); c++)
      for (int b = 7; b >= 0; b--) msg.push_back(s[c][b]);
    shift16(msg);
    check(d16 == 16'h31C3, $sformatf("CCITT check value: got %h", d16));

    // 3. random polynomials and messages
    for (int t = 0; t < 40; t++) begin
      g16 = 16'($urandom) | 16'h1;
      msg = {};
      for (int i = 0; i < 8 + ($urandom % 120); i++) msg.push_back(1'($urandom));
      cr16 = 1'b1; #1; cr16 = 1'b0;
      shift16(msg);
      check(d16 == ref_rem(g16, msg),
            $sformatf("random %0d: g=%h got %h want %h", t, g16, d16, ref_rem(g16, msg)));
    end

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
