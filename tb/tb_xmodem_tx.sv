// tb_xmodem_tx: self-checking test of the Xmodem sender. The testbench plays
// the receiver: it collects the sender's line bytes (with random
// back-pressure), parses packets and answers with 'C', NAK or ACK. The file
// is offered with random gaps.
//
// Transfer 1 (CRC capable, 128-byte packets, 300-byte file): 'C' starts it;
// packet 1 is checked and NAKed, its resend must be identical; packets 2 and
// 3 follow, the last padded with SUB; EOT is NAKed once and resent; ACK ends.
// Transfer 2 (no CRC support, 1K packets, 1024-byte file): 'C' is ignored,
// NAK starts checksum mode; one STX packet, then EOT at once because the file
// ended exactly on the block boundary.
// Transfer 3 (CRC capable, 1K packets, 1500-byte file): two STX packets with
// CRC, the second padded.
module tb_xmodem_tx;
  import xmodem_pkg::*;
  import xm_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        reset, start, crc_capable, use_1k;
  logic [7:0]  in_byte, tx_byte, rx_byte;
  logic        in_valid, in_last, in_ready, tx_valid, tx_ready, rx_valid;
  check_mode_e mode;
  logic        busy, done;
  logic [15:0] pkt_count, resend_count;

  xmodem_tx dut (.*);

  // line capture
  logic [7:0] line_q[$];
  always @(posedge clk)
    if (!reset && tx_valid && tx_ready) line_q.push_back(tx_byte);
  always @(negedge clk) tx_ready <= ($urandom % 3) != 0;

  // file source: changes only at the falling edge, so the sender samples a
  // stable byte; a byte taken at a rising edge is dropped at the next falling one
  logic [7:0] file_q[$];
  logic       taken;
  always @(posedge clk) taken = !reset && in_valid && in_ready;
  always @(negedge clk) begin
    if (taken) begin
      void'(file_q.pop_front());
      taken = 1'b0;
      in_valid = 1'b0;
    end
    if (reset) in_valid = 1'b0;
    else if (!in_valid) in_valid = (file_q.size() > 0) && ($urandom % 4 != 0);
    in_byte = (file_q.size() > 0) ? file_q[0] : 8'h00;
    in_last = (file_q.size() == 1);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reply(input logic [7:0] b);
    rx_byte = b; rx_valid = 1'b1;
    @(posedge clk); #1;
    rx_valid = 1'b0;
  endtask

  task automatic get_byte(output logic [7:0] b);
    int n = 0;
    while (line_q.size() == 0 && n < 5000) begin @(posedge clk); #1; n++; end
    b = (line_q.size() > 0) ? line_q.pop_front() : 8'hEE;
  endtask

  task automatic expect_packet(input logic [7:0] blk, input logic [7:0] data[$],
                               input check_mode_e m, input string what);
    logic [7:0] b, got[$];
    logic [15:0] c;
    get_byte(b);
    check(b == (data.size() == 1024 ? STX : SOH), $sformatf("%s: header %h", what, b));
    get_byte(b); check(b == blk, $sformatf("%s: block %h", what, b));
    get_byte(b); check(b == ~blk, $sformatf("%s: complement %h", what, b));
    got = {};
    for (int i = 0; i < data.size(); i++) begin get_byte(b); got.push_back(b); end
    check(got == data, $sformatf("%s: data differs", what));
    foreach (got[i]) if (got[i] != data[i]) begin $display("  first diff at %0d: %h want %h", i, got[i], data[i]); break; end
    if (m == MODE_CRC) begin
      c = crc16(data);
      get_byte(b); check(b == c[15:8], $sformatf("%s: CRC high %h want %h", what, b, c[15:8]));
      get_byte(b); check(b == c[7:0],  $sformatf("%s: CRC low %h want %h", what, b, c[7:0]));
    end else begin
      get_byte(b); check(b == sum8(data), $sformatf("%s: checksum %h", what, b));
    end
    repeat (10) @(posedge clk); #1;
    check(line_q.size() == 0, $sformatf("%s: nothing after the packet", what));
  endtask

  // the data field of block k (1-based) of file f, padded with SUB
  function automatic void field(ref logic [7:0] out[$], input logic [7:0] f[$],
                                input int k, input int len);
    out = {};
    for (int i = 0; i < len; i++)
      out.push_back(((k - 1) * len + i < f.size()) ? f[(k - 1) * len + i] : SUB);
  endfunction

  task automatic start_transfer(input bit crc_ok, input bit one_k, input int nbytes,
                                ref logic [7:0] f[$]);
    f = {};
    for (int i = 0; i < nbytes; i++) f.push_back(8'($urandom));
    file_q = f;
    crc_capable = crc_ok; use_1k = one_k;
    start = 1'b1; @(posedge clk); #1; start = 1'b0;
  endtask

  initial begin
    logic [7:0] f[$], d[$], b;

    reset = 1'b1; start = 1'b0; rx_valid = 1'b0; rx_byte = '0;
    crc_capable = 1'b1; use_1k = 1'b0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;

    // ---- transfer 1 ----
    start_transfer(1'b1, 1'b0, 300, f);
    repeat (50) @(posedge clk); #1;
    check(line_q.size() == 0, "silent before the receiver asks");
    reply(CHAR_C);
    field(d, f, 1, 128);
    expect_packet(8'd1, d, MODE_CRC, "T1 packet 1");
    check(mode == MODE_CRC, "T1 CRC mode");
    reply(NAK);
    expect_packet(8'd1, d, MODE_CRC, "T1 packet 1 resent");
    reply(ACK);
    field(d, f, 2, 128);
    expect_packet(8'd2, d, MODE_CRC, "T1 packet 2");
    reply(ACK);
    field(d, f, 3, 128);
    check(d[43] == f[299] && d[44] == SUB && d[127] == SUB, "T1 last field padded");
    expect_packet(8'd3, d, MODE_CRC, "T1 packet 3");
    reply(ACK);
    get_byte(b); check(b == EOT, $sformatf("T1 EOT %h", b));
    reply(NAK);
    get_byte(b); check(b == EOT, "T1 EOT resent");
    reply(ACK);
    repeat (3) @(posedge clk); #1;
    check(done && pkt_count == 16'd3 && resend_count == 16'd1,
          $sformatf("T1 done, %0d packets, %0d resends", pkt_count, resend_count));

    // ---- transfer 2 ----
    start_transfer(1'b0, 1'b1, 1024, f);
    reply(CHAR_C);
    repeat (50) @(posedge clk); #1;
    check(line_q.size() == 0, "T2 'C' ignored without CRC support");
    reply(NAK);
    field(d, f, 1, 1024);
    expect_packet(8'd1, d, MODE_CHECKSUM, "T2 1K checksum packet");
    check(mode == MODE_CHECKSUM, "T2 checksum mode");
    reply(ACK);
    get_byte(b); check(b == EOT, "T2 EOT after a full last packet");
    reply(ACK);
    repeat (3) @(posedge clk); #1;
    check(done, "T2 done");

    // ---- transfer 3 ----
    start_transfer(1'b1, 1'b1, 1500, f);
    reply(CHAR_C);
    field(d, f, 1, 1024);
    expect_packet(8'd1, d, MODE_CRC, "T3 1K packet 1");
    reply(ACK);
    field(d, f, 2, 1024);
    expect_packet(8'd2, d, MODE_CRC, "T3 1K packet 2");
    reply(ACK);
    get_byte(b); check(b == EOT, "T3 EOT");
    reply(ACK);
    repeat (3) @(posedge clk); #1;
    check(done, "T3 done");

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
