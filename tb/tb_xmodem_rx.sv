// tb_xmodem_rx: self-checking test of the Xmodem receiver. The testbench
// plays the sender, byte by byte, with random gaps, random back-pressure on
// the receiver's replies and on its data output, and a short timeout
// (TIMEOUT_CYCLES = 300).
//
// Sequence: 'C' after start; good 128-byte packet 1 (delivered, ACK); packet 2
// with a bad CRC high byte, then low byte (NAK, nothing delivered); packet 2 again (ACK, delivered);
// packet 2 a third time (duplicate: ACK, nothing delivered); a 1024-byte STX
// packet 3 (ACK); packet 4 with a bad block-number complement (NAK); silence
// (NAK after one timeout); packet 4 cut short (NAK after the timeout);
// packet 4 good; EOT (ACK, done). Then a second transfer in which the sender
// stays silent: 'C' three times at timeout intervals, then NAK and checksum
// mode; a checksum packet is accepted, one with a bad sum refused.
module tb_xmodem_rx;
  import xmodem_pkg::*;
  import xm_ref_pkg::*;

  localparam int TMO = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic        reset, start;
  logic [7:0]  rx_byte, tx_byte, out_byte;
  logic        rx_valid, tx_valid, tx_ready, out_valid, out_ready;
  check_mode_e mode;
  logic        busy, done;
  logic [15:0] pkt_count;

  xmodem_rx #(.TIMEOUT_CYCLES(TMO)) dut (.*);

  // capture of replies and delivered data
  logic [7:0] reply_q[$];
  longint     reply_t[$];
  logic [7:0] out_q[$];
  always @(posedge clk) begin
    if (!reset && tx_valid && tx_ready) begin reply_q.push_back(tx_byte); reply_t.push_back(cyc); end
    if (!reset && out_valid && out_ready) out_q.push_back(out_byte);
  end
  always @(negedge clk) begin
    tx_ready  <= ($urandom % 4) != 0;
    out_ready <= ($urandom % 3) != 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic [7:0] b);
    rx_byte = b; rx_valid = 1'b1;
    @(posedge clk); #1;
    rx_valid = 1'b0; rx_byte = 8'($urandom);
    repeat ($urandom % 3) begin @(posedge clk); #1; end
  endtask

  task automatic get_reply(output logic [7:0] b, output longint t);
    int n = 0;
    while (reply_q.size() == 0 && n < 20 * TMO) begin @(posedge clk); #1; n++; end
    if (reply_q.size() == 0) begin b = 8'hEE; t = cyc; end
    else begin b = reply_q.pop_front(); t = reply_t.pop_front(); end
  endtask

  task automatic expect_reply(input logic [7:0] want, input string what);
    logic [7:0] b; longint t;
    get_reply(b, t);
    check(b == want, $sformatf("%s: reply %h, want %h", what, b, want));
  endtask

  // kinds: 0 good, 1 bad check (high CRC byte), 2 bad complement, 3 cut short,
  // 4 bad low CRC byte
  task automatic send_packet(input logic [7:0] blk, input logic [7:0] data[$],
                             input check_mode_e m, input int kind);
    logic [15:0] c = crc16(data);
    logic [7:0]  s = sum8(data);
    send(data.size() == 1024 ? STX : SOH);
    send(blk);
    send(kind == 2 ? ~blk ^ 8'h10 : ~blk);
    foreach (data[i]) begin
      if (kind == 3 && i == data.size() / 2) return;
      send(data[i]);
    end
    if (kind == 1) begin c ^= 16'h0100; s ^= 8'h01; end
    if (kind == 4) c ^= 16'h0001;
    if (m == MODE_CRC) begin send(c[15:8]); send(c[7:0]); end
    else send(s);
  endtask

  function automatic void rand_data(ref logic [7:0] d[$], input int n);
    d = {};
    for (int i = 0; i < n; i++) d.push_back(8'($urandom));
  endfunction

  task automatic expect_delivered(input logic [7:0] data[$], input string what);
    int n = 0;
    while (out_q.size() < data.size() && n < 10000) begin @(posedge clk); #1; n++; end
    check(out_q.size() == data.size(), $sformatf("%s: %0d bytes delivered", what, out_q.size()));
    check(out_q == data, $sformatf("%s: delivered data differs (%h %h / %h %h)", what, out_q[0], data[0], out_q[1], data[1]));
    out_q = {};
  endtask

  initial begin
    logic [7:0] p1[$], p2[$], p3[$], p4[$];
    logic [7:0] b;
    longint     t0, t1;

    reset = 1'b1; start = 1'b0; rx_valid = 1'b0; rx_byte = '0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;
    check(!busy && !done, "idle after reset");
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    expect_reply(CHAR_C, "initiation");
    check(mode == MODE_CRC, "CRC mode requested");

    rand_data(p1, 128);
    send_packet(8'd1, p1, MODE_CRC, 0);
    expect_delivered(p1, "packet 1");
    expect_reply(ACK, "packet 1");

    rand_data(p2, 128);
    send_packet(8'd2, p2, MODE_CRC, 1);
    expect_reply(NAK, "packet 2 bad CRC");
    check(out_q.size() == 0, "bad packet not delivered");
    send_packet(8'd2, p2, MODE_CRC, 4);
    expect_reply(NAK, "packet 2 bad CRC low byte");
    check(out_q.size() == 0, "bad packet not delivered");
    send_packet(8'd2, p2, MODE_CRC, 0);
    expect_delivered(p2, "packet 2");
    expect_reply(ACK, "packet 2");
    send_packet(8'd2, p2, MODE_CRC, 0);
    expect_reply(ACK, "packet 2 duplicate");
    check(out_q.size() == 0, "duplicate not delivered");

    rand_data(p3, 1024);
    send_packet(8'd3, p3, MODE_CRC, 0);
    expect_delivered(p3, "1K packet 3");
    expect_reply(ACK, "1K packet 3");

    rand_data(p4, 128);
    send_packet(8'd4, p4, MODE_CRC, 2);
    get_reply(b, t0);
    check(b == NAK, "packet 4 bad complement: NAK");
    get_reply(b, t1);
    check(b == NAK, "NAK after silence");
    check(t1 - t0 >= TMO && t1 - t0 <= TMO + 8,
          $sformatf("silence NAK after %0d clocks, want about %0d", t1 - t0, TMO));
    send_packet(8'd4, p4, MODE_CRC, 3);
    expect_reply(NAK, "packet 4 cut short");
    send_packet(8'd4, p4, MODE_CRC, 0);
    expect_delivered(p4, "packet 4");
    expect_reply(ACK, "packet 4");
    check(pkt_count == 16'd4, $sformatf("packet count %0d", pkt_count));

    send(EOT);
    expect_reply(ACK, "EOT");
    repeat (3) @(posedge clk); #1;
    check(done && !busy, "done after EOT");

    // ---- second transfer: sender ignores 'C' ----
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
    get_reply(b, t0);
    check(b == CHAR_C, "second transfer: first C");
    for (int i = 0; i < 2; i++) begin
      get_reply(b, t1);
      check(b == CHAR_C, $sformatf("C repeated after timeout %0d", i + 1));
      check(t1 - t0 >= TMO && t1 - t0 <= TMO + 8,
            $sformatf("timeout interval %0d clocks, want about %0d", t1 - t0, TMO));
      t0 = t1;
    end
    get_reply(b, t1);
    check(b == NAK, "fallback NAK after third timeout");
    check(t1 - t0 >= TMO && t1 - t0 <= TMO + 8, "third timeout interval");
    check(mode == MODE_CHECKSUM, "checksum mode after fallback");

    rand_data(p1, 128);
    send_packet(8'd1, p1, MODE_CHECKSUM, 0);
    expect_delivered(p1, "checksum packet 1");
    expect_reply(ACK, "checksum packet 1");
    rand_data(p2, 128);
    send_packet(8'd2, p2, MODE_CHECKSUM, 1);
    expect_reply(NAK, "checksum packet 2 bad sum");
    send_packet(8'd2, p2, MODE_CHECKSUM, 0);
    expect_delivered(p2, "checksum packet 2");
    expect_reply(ACK, "checksum packet 2");
    send(EOT);
    expect_reply(ACK, "checksum EOT");
    repeat (3) @(posedge clk); #1;
    check(done, "second transfer done");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
