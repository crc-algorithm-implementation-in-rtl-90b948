// tb_crc16_lfsr_serial: self-checking test of the bit-serial CCITT CRC16
// circuit.
//
// 1. "123456789" plus 16 zero bits gives 16'h31C3, the Xmodem check value.
// 2. Random 128-byte Xmodem data fields plus 16 zero bits give the CRC of a
//    bytewise reference computed here, and take exactly 1024 + 16 = 1040
//    clocks after the clear.
// 3. The clear input empties the register.
module tb_crc16_lfsr_serial;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        cr, in;
  logic [15:0] d;
  crc16_lfsr_serial dut (.clk(clk), .cr(cr), .in(in), .d(d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Bytewise Xmodem CRC: crc ^= byte << 8, then eight conditional shifts.
  function automatic logic [15:0] ref_crc(input logic [7:0] data[$]);
    logic [15:0] c = '0;
    foreach (data[i]) begin
      c ^= {data[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  // returns the number of clocks used
  task automatic run(input logic [7:0] data[$], output int cycles);
    cr = 1'b1; #1; cr = 1'b0;
    cycles = 0;
    foreach (data[i])
      for (int b = 7; b >= 0; b--) begin
        in = data[i][b];
        @(posedge clk); #1; cycles++;
      end
    in = 1'b0;
    repeat (16) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    logic [7:0] data[$];
    int         cycles;
    static string s = "123456789";

    cr = 1'b1; in = 1'b0;
    @(posedge clk); #1;
    cr = 1'b0;
    check(d == 16'h0, "clear");

    data = {};
    for (int i = 0; i < s.len(); i++) data.push_back(s[i]);
    run(data, cycles);
    check(d == 16'h31C3, $sformatf("check value: got %h", d));
    check(cycles == 9 * 8 + 16, "check value clock count");

    for (int t = 0; t < 6; t++) begin
      data = {};
      for (int i = 0; i < 128; i++) data.push_back(8'($urandom));
      run(data, cycles);
      check(d == ref_crc(data), $sformatf("packet %0d: got %h want %h", t, d, ref_crc(data)));
      check(cycles == 1040, $sformatf("packet %0d took %0d clocks, want 1040", t, cycles));
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
