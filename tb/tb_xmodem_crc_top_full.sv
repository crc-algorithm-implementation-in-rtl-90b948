// tb_xmodem_crc_top_full: the whole design at its default parameters (receiver
// timeout of 150,000,000 clocks, 1024-byte packet buffers). The sender is looped
// to the receiver through a fault-free channel and two complete file transfers
// run in CRC mode: 300 bytes in 128-byte SOH packets and 1100 bytes in
// 1024-byte STX packets, each checked byte for byte against the file plus SUB
// padding and ended with EOT. No timeout is needed, so the default timeout
// does not lengthen the run. The CRC32 engine and the serial circuits are
// exercised once as well.
module tb_xmodem_crc_top_full;
  import xmodem_pkg::*;
  import xm_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic reset;
  logic s_start, s_crc_capable, s_use_1k;
  logic [7:0] s_file_byte, s_line_byte, s_reply_byte;
  logic s_file_valid, s_file_last, s_file_ready, s_line_valid, s_line_ready, s_reply_valid;
  check_mode_e s_mode, r_mode;
  logic s_busy, s_done, r_busy, r_done;
  logic [15:0] s_pkt_count, s_resend_count, r_pkt_count;
  logic r_start;
  logic [7:0] r_line_in_byte, r_line_byte, r_out_byte;
  logic r_line_in_valid, r_line_valid, r_line_ready, r_out_valid, r_out_ready;
  logic c32_init, c32_calc, c32_d_valid;
  logic [31:0] c32_d, c32_crc_reg;
  logic [15:0] c32_crc;
  logic s16_cr, s16_in, lp_cr, lp_in;
  logic [15:0] s16_d, lp_g, lp_d;

  xmodem_crc_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- channel ----------------
  int  corrupt_at;      // index of the sender byte to corrupt, -1 none
  int  drop_reply_at;   // index of the receiver reply to drop, -1 none
  int  s_count, r_count;
  int  n_corrupted, n_dropped;
  int  n_c, n_nak, n_ack;
  always @(posedge clk) begin
    r_line_in_valid <= 1'b0;
    s_reply_valid   <= 1'b0;
    if (!reset && s_line_valid && s_line_ready) begin
      r_line_in_valid <= 1'b1;
      r_line_in_byte  <= (s_count == corrupt_at) ? s_line_byte ^ 8'h20 : s_line_byte;
      if (s_count == corrupt_at) n_corrupted++;
      s_count++;
    end
    if (!reset && r_line_valid && r_line_ready) begin
      if (r_line_byte == CHAR_C) n_c++;
      if (r_line_byte == NAK)    n_nak++;
      if (r_line_byte == ACK)    n_ack++;
      if (r_count == drop_reply_at) n_dropped++;
      else begin
        s_reply_valid <= 1'b1;
        s_reply_byte  <= r_line_byte;
      end
      r_count++;
    end
  end
  always @(negedge clk) begin
    s_line_ready <= ($urandom % 3) != 0;
    r_line_ready <= ($urandom % 2) != 0;
    r_out_ready  <= ($urandom % 4) != 0;
  end

  // ---------------- file source and sink ----------------
  logic [7:0] file_q[$], out_q[$];
  logic       taken;
  always @(posedge clk) begin
    taken = !reset && s_file_valid && s_file_ready;
    if (!reset && r_out_valid && r_out_ready) out_q.push_back(r_out_byte);
  end
  always @(negedge clk) begin
    if (taken) begin
      void'(file_q.pop_front());
      taken = 1'b0;
      s_file_valid = 1'b0;
    end
    if (reset) s_file_valid = 1'b0;
    else if (!s_file_valid) s_file_valid = (file_q.size() > 0) && ($urandom % 5 != 0);
    s_file_byte = (file_q.size() > 0) ? file_q[0] : 8'h00;
    s_file_last = (file_q.size() == 1);
  end

  // ---------------- mechanism counters ----------------
  int m_crc_xfer, m_sum_xfer, m_fallback, m_resend, m_dup, m_1k, m_pad, m_eot;
  int m_crc32, m_serial16, m_lfsr;

  task automatic transfer(input bit crc_ok, input bit one_k, input int nbytes,
                          input int corrupt, input int drop, input string what);
    logic [7:0] f[$], want[$];
    int len = one_k ? 1024 : 128;
    int n = 0;
    int c0, ack0;
    c0 = n_c; ack0 = n_ack;
    f = {};
    for (int i = 0; i < nbytes; i++) f.push_back(8'($urandom));
    want = f;
    while (want.size() % len != 0) want.push_back(SUB);
    out_q = {};
    s_count = 0; r_count = 0; corrupt_at = corrupt; drop_reply_at = drop;
    file_q = f;
    s_crc_capable = crc_ok; s_use_1k = one_k;
    s_start = 1'b1; @(posedge clk); #1; s_start = 1'b0;
    repeat (5) @(posedge clk); #1;
    r_start = 1'b1; @(posedge clk); #1; r_start = 1'b0;
    while (!(s_done && r_done) && n < 400000) begin @(posedge clk); #1; n++; end
    check(s_done && r_done, $sformatf("%s: both ends done", what));
    check(out_q == want, $sformatf("%s: delivered %0d bytes, want %0d, equal %0d",
                                   what, out_q.size(), want.size(), out_q == want));
    check(r_pkt_count == 16'(want.size() / len), $sformatf("%s: receiver packets %0d", what, r_pkt_count));
    check(s_pkt_count == 16'(want.size() / len), $sformatf("%s: sender packets %0d", what, s_pkt_count));
    check(r_mode == (crc_ok ? MODE_CRC : MODE_CHECKSUM), $sformatf("%s: receiver mode", what));
    check(s_mode == r_mode, $sformatf("%s: modes agree", what));
    if (crc_ok) m_crc_xfer++; else m_sum_xfer++;
    if (!crc_ok && n_c - c0 == 3) m_fallback++;
    m_resend += s_resend_count;
    // a duplicate: the sender resent a packet the receiver had acknowledged
    if (drop >= 0) m_dup += (n_ack - ack0) - (r_pkt_count + 1);
    if (one_k) m_1k += r_pkt_count;
    if (nbytes % len != 0) m_pad++;
    m_eot++;
  endtask

  // CRC32 engine against the bit-serial reference
  task automatic run_crc32();
    logic [31:0] ref_c;
    int words = 1 + $urandom % 20;
    c32_init = 1'b1; @(posedge clk); #1; c32_init = 1'b0;
    ref_c = '0;
    c32_calc = 1'b1;
    for (int w = 0; w < words; w++) begin
      c32_d = $urandom; c32_d_valid = 1'b1;
      for (int b = 31; b >= 0; b--) begin
        bit fb = ref_c[31] ^ c32_d[b];
        ref_c = {ref_c[30:0], 1'b0} ^ (fb ? 32'h04C11DB7 : 32'h0);
      end
      @(posedge clk); #1;
    end
    c32_d_valid = 1'b0;
    check(c32_crc_reg == ref_c, $sformatf("CRC32 %h want %h", c32_crc_reg, ref_c));
    c32_calc = 1'b0; c32_d_valid = 1'b1;
    @(posedge clk); #1;
    c32_d_valid = 1'b0;
    check(c32_crc == ref_c[15:0], "CRC32 unloaded low half");
    m_crc32++;
  endtask

  // both serial circuits on one 128-byte data field
  task automatic run_serial();
    logic [7:0] data[$];
    int clocks = 0;
    for (int i = 0; i < 128; i++) data.push_back(8'($urandom));
    lp_g = 16'h1021;
    s16_cr = 1'b1; lp_cr = 1'b1; #1; s16_cr = 1'b0; lp_cr = 1'b0;
    foreach (data[i])
      for (int b = 7; b >= 0; b--) begin
        s16_in = data[i][b]; lp_in = data[i][b];
        @(posedge clk); #1; clocks++;
      end
    s16_in = 1'b0; lp_in = 1'b0;
    repeat (16) begin @(posedge clk); #1; clocks++; end
    check(s16_d == crc16(data), $sformatf("serial CRC16 %h want %h", s16_d, crc16(data)));
    check(lp_d == crc16(data), $sformatf("programmable LFSR %h want %h", lp_d, crc16(data)));
    check(clocks == 1040, "serial CRC takes 1040 clocks per packet");
    m_serial16++; m_lfsr++;
  endtask

  initial begin
    reset = 1'b1; s_start = 1'b0; r_start = 1'b0; s_crc_capable = 1'b1; s_use_1k = 1'b0;
    c32_init = 1'b0; c32_calc = 1'b0; c32_d_valid = 1'b0; c32_d = '0;
    s16_cr = 1'b1; s16_in = 1'b0; lp_cr = 1'b1; lp_in = 1'b0; lp_g = '0;
    corrupt_at = -1; drop_reply_at = -1; s_count = 0; r_count = 0;
    n_corrupted = 0; n_dropped = 0; n_c = 0; n_nak = 0; n_ack = 0;
    {m_crc_xfer, m_sum_xfer, m_fallback, m_resend, m_dup, m_1k, m_pad, m_eot} = '0;
    {m_crc32, m_serial16, m_lfsr} = '0;
    repeat (3) @(posedge clk); #1;
    reset = 1'b0;

    transfer(1'b1, 1'b0, 300, -1, -1, "CRC 128-byte");
    transfer(1'b1, 1'b1, 1100, -1, -1, "CRC 1K");
    run_crc32();
    run_serial();

    $display("mechanisms: crc_xfer=%0d stx_1k=%0d padding=%0d eot=%0d",
             m_crc_xfer, m_1k, m_pad, m_eot);
    check(m_crc_xfer == 2 && m_1k > 0 && m_pad == 2 && m_eot == 2, "all transfers ran");
    check(s_resend_count == 0 && n_nak == 0, "no NAK on a clean channel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
