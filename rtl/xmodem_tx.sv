// xmodem_tx: Xmodem sender with CRC16 or 8-bit checksum error checking.
//
// After start it waits for the receiver: 'C' selects CRC mode (only when
// crc_capable is high; a sender without CRC support ignores 'C'), NAK selects
// checksum mode. It then loads up to one data field (128 bytes, or 1024 with
// use_1k) from the file stream into a packet buffer, padding a short last
// field with SUB, and sends
//     SOH|STX, block number, 255 - block number, data field,
//     CRC high byte, CRC low byte        (CRC mode)
//     8-bit sum of the data bytes        (checksum mode)
// The CRC is computed on the fly by a byte-parallel CCITT CRC16 engine
// (crc_parallel) as the data bytes leave, so it is ready right after the last
// one. ACK moves on to the next block number; NAK (or 'C' in CRC mode, which
// a receiver sends when it missed the first packet) repeats the packet from
// the buffer. When the file is exhausted it sends EOT alone, repeats it on
// NAK, and finishes on ACK (done goes high). Block numbers start at 1 and wrap.
//
// Interface: synchronous active-high reset. File input in_byte/in_valid/in_ready
// with in_last on the final byte of the file. Line output tx_byte/tx_valid is
// held until tx_ready; line input rx_byte/rx_valid carries the receiver's
// replies. A data byte is sent at most every second clock (the buffer read is
// registered). No timeout: the receiver's NAK on silence drives retries.
//
// From the document: C/NAK mode choice, SOH/STX block sizes, SUB padding,
// EOT, the CRC16 polynomial and the byte-parallel CRC. This design's own
// choices: the block-number pair (standard Xmodem framing), the stream
// interfaces and the absence of a sender timeout.
module xmodem_tx
  import xmodem_pkg::*;
#(
  parameter int unsigned BUF_BYTES = BLK_LONG
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  input  logic        crc_capable,
  input  logic        use_1k,
  // file to send
  input  logic [7:0]  in_byte,
  input  logic        in_valid,
  input  logic        in_last,
  output logic        in_ready,
  // line to the receiver
  output logic [7:0]  tx_byte,
  output logic        tx_valid,
  input  logic        tx_ready,
  // line from the receiver
  input  logic [7:0]  rx_byte,
  input  logic        rx_valid,
  // status
  output check_mode_e mode,
  output logic        busy,
  output logic        done,
  output logic [15:0] pkt_count,
  output logic [15:0] resend_count
);

  localparam int unsigned IW = $clog2(BUF_BYTES + 1);
  localparam int unsigned AW = $clog2(BUF_BYTES);

  typedef enum logic [3:0] {
    T_IDLE, T_WAIT_INIT, T_FILL, T_HDR, T_BLK, T_NBLK, T_DATA, T_CHK_HI,
    T_CHK_LO, T_WAIT_ACK, T_EOT, T_WAIT_EOT_ACK, T_DONE
  } tx_state_e;

  tx_state_e     state;
  logic [7:0]    blk;
  logic          eof;            // the file's last byte has been taken
  logic [IW-1:0] len, idx;
  logic [7:0]    sum;
  logic [7:0]    buffer [BUF_BYTES];
  logic [7:0]    rd_q;           // registered buffer read of buffer[idx]
  logic          rd_ok;          // rd_q holds buffer[idx]

  logic          slot;           // the line output can take a byte this clock
  logic          crc_init, crc_step;
  logic [15:0]   crc_val;
  logic [7:0]    crc_piece_unused;

  assign slot = !tx_valid || tx_ready;

  crc_parallel #(
    .CRC_W (16), .DATA_W (8), .OUT_W (8), .POLY (POLY_CRC16_CCITT)
  ) u_crc (
    .clk     (clk),
    .reset   (reset),
    .init    (crc_init),
    .calc    (1'b1),
    .d_valid (crc_step),
    .d       (rd_q),
    .crc_reg (crc_val),
    .crc     (crc_piece_unused)
  );

  assign crc_init = (state == T_HDR);
  assign crc_step = (state == T_DATA) && slot && rd_ok;

  assign in_ready = (state == T_FILL) && !eof && (idx != len);
  assign busy     = (state != T_IDLE) && (state != T_DONE);
  assign done     = (state == T_DONE);

  always_ff @(posedge clk) begin
    rd_q  <= buffer[idx[AW-1:0]];
    rd_ok <= (state == T_DATA) && !(slot && rd_ok);
    if (state == T_FILL && !eof && idx != len && in_valid)
      buffer[idx[AW-1:0]] <= in_byte;
    else if (state == T_FILL && eof && idx != len)
      buffer[idx[AW-1:0]] <= SUB;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= T_IDLE;
      mode         <= MODE_CRC;
      blk          <= 8'd1;
      eof          <= 1'b0;
      len          <= '0;
      idx          <= '0;
      sum          <= '0;
      tx_byte      <= '0;
      tx_valid     <= 1'b0;
      pkt_count    <= '0;
      resend_count <= '0;
    end else begin
      if (tx_valid && tx_ready) tx_valid <= 1'b0;

      unique case (state)
        T_IDLE, T_DONE: begin
          if (start) begin
            blk          <= 8'd1;
            eof          <= 1'b0;
            pkt_count    <= '0;
            resend_count <= '0;
            state        <= T_WAIT_INIT;
          end
        end

        T_WAIT_INIT: begin
          if (rx_valid && rx_byte == CHAR_C && crc_capable) begin
            mode  <= MODE_CRC;
            idx   <= '0;
            len   <= use_1k ? IW'(BLK_LONG) : IW'(BLK_SHORT);
            state <= T_FILL;
          end else if (rx_valid && rx_byte == NAK) begin
            mode  <= MODE_CHECKSUM;
            idx   <= '0;
            len   <= use_1k ? IW'(BLK_LONG) : IW'(BLK_SHORT);
            state <= T_FILL;
          end
        end

        T_FILL: begin
          if (eof && idx == '0) begin
            state <= T_EOT;                         // nothing left to send
          end else if (idx == len) begin
            state <= T_HDR;
          end else if (eof) begin
            idx <= idx + 1'b1;                      // SUB padding
          end else if (in_valid) begin
            idx <= idx + 1'b1;
            if (in_last) eof <= 1'b1;
          end
        end

        T_HDR: begin
          if (slot) begin
            tx_byte  <= (len == IW'(BLK_LONG)) ? STX : SOH;
            tx_valid <= 1'b1;
            sum      <= '0;
            state    <= T_BLK;
          end
        end

        T_BLK: if (slot) begin tx_byte <= blk;  tx_valid <= 1'b1; state <= T_NBLK; end

        T_NBLK: begin
          if (slot) begin
            tx_byte  <= ~blk;
            tx_valid <= 1'b1;
            idx      <= '0;
            state    <= T_DATA;
          end
        end

        T_DATA: begin
          if (slot && rd_ok) begin
            tx_byte  <= rd_q;
            tx_valid <= 1'b1;
            sum      <= sum + rd_q;
            idx      <= idx + 1'b1;
            if (idx == len - 1'b1) state <= T_CHK_HI;
          end
        end

        T_CHK_HI: begin
          if (slot) begin
            tx_byte  <= (mode == MODE_CRC) ? crc_val[15:8] : sum;
            tx_valid <= 1'b1;
            state    <= (mode == MODE_CRC) ? T_CHK_LO : T_WAIT_ACK;
          end
        end

        T_CHK_LO: begin
          if (slot) begin
            tx_byte  <= crc_val[7:0];
            tx_valid <= 1'b1;
            state    <= T_WAIT_ACK;
          end
        end

        T_WAIT_ACK: begin
          if (rx_valid && rx_byte == ACK) begin
            blk       <= blk + 8'd1;
            pkt_count <= pkt_count + 16'd1;
            idx       <= '0;
            len       <= use_1k ? IW'(BLK_LONG) : IW'(BLK_SHORT);
            state     <= T_FILL;
          end else if (rx_valid && (rx_byte == NAK || (rx_byte == CHAR_C && mode == MODE_CRC))) begin
            resend_count <= resend_count + 16'd1;
            state        <= T_HDR;
          end
        end

        T_EOT: begin
          if (slot) begin
            tx_byte  <= EOT;
            tx_valid <= 1'b1;
            state    <= T_WAIT_EOT_ACK;
          end
        end

        T_WAIT_EOT_ACK: begin
          if (rx_valid && rx_byte == ACK)      state <= T_DONE;
          else if (rx_valid && rx_byte == NAK) state <= T_EOT;
        end

        default: state <= T_IDLE;
      endcase
    end
  end

  a_tx_hold: assert property (@(posedge clk) disable iff (reset)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_byte));

endmodule
