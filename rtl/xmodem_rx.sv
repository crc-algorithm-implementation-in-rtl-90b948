// xmodem_rx: Xmodem receiver with CRC16 or 8-bit checksum error checking.
//
// After start it asks the sender for CRC mode by sending 'C'. If nothing
// arrives within TIMEOUT_CYCLES (3 s at the default clock) it sends 'C' again;
// at the third timeout it falls back to checksum mode and sends NAK, and then
// repeats NAK on every further timeout. Each packet is
//     SOH|STX, block number, 255 - block number, 128|1024 data bytes,
//     CRC high byte, CRC low byte        (CRC mode)
//     8-bit sum of the data bytes        (checksum mode)
// The data bytes are written into a packet buffer and folded, one byte per
// clock, into a byte-parallel CCITT CRC16 engine (crc_parallel) and into the
// running sum. A packet whose block-number pair and check are good and whose
// number is the expected one is streamed out of the buffer on out_* and then
// acknowledged with ACK; a good repeat of the previous packet (its ACK was
// lost) is acknowledged and dropped; anything else is answered with NAK, as is
// a silence of TIMEOUT_CYCLES in the middle of a packet or between packets.
// EOT, sent alone, is acknowledged and ends the transfer (done goes high).
// Padding bytes of the last packet are delivered like data; the sink drops them.
//
// Interface: synchronous active-high reset. Line input rx_byte/rx_valid is
// one byte per strobe with no back-pressure; line output tx_byte/tx_valid is
// held until tx_ready. Delivered data out_byte/out_valid is held until
// out_ready. pkt_count counts delivered packets.
//
// From the document: 'C' initiation, the 3 s timeout, fallback after three
// timeouts, ACK/NAK, SOH/STX block sizes, EOT, the CRC16 polynomial and the
// byte-parallel CRC. This design's own choices: the block-number pair and
// duplicate handling (standard Xmodem framing), the buffer-then-deliver
// interface, NAK on timeouts after the first packet, and the clock rate.
module xmodem_rx
  import xmodem_pkg::*;
#(
  parameter int unsigned TIMEOUT_CYCLES = 150_000_000,  // 3 s at 50 MHz
  parameter int unsigned C_TRIES        = 3,            // timeouts before fallback
  parameter int unsigned BUF_BYTES      = BLK_LONG
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        start,
  // line from the sender
  input  logic [7:0]  rx_byte,
  input  logic        rx_valid,
  // line to the sender
  output logic [7:0]  tx_byte,
  output logic        tx_valid,
  input  logic        tx_ready,
  // received file data
  output logic [7:0]  out_byte,
  output logic        out_valid,
  input  logic        out_ready,
  // status
  output check_mode_e mode,
  output logic        busy,
  output logic        done,
  output logic [15:0] pkt_count
);

  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);
  localparam int unsigned IW = $clog2(BUF_BYTES + 1);

  typedef enum logic [3:0] {
    R_IDLE, R_SEND, R_WAIT_HDR, R_BLK, R_NBLK, R_DATA, R_CHK_HI, R_CHK_LO,
    R_VERIFY, R_DRAIN, R_DONE
  } rx_state_e;

  rx_state_e        state, ret_state;
  logic [TW-1:0]    timer;
  logic             timeout;
  logic [1:0]       tries;
  logic             started;       // a packet header has been seen
  logic [7:0]       blk, nblk, expected;
  logic [IW-1:0]    len, idx;
  logic [7:0]       chk_hi, chk_lo, sum;
  logic [7:0]       buffer [BUF_BYTES];

  // CRC engine control
  logic             crc_init, crc_step;
  logic [15:0]      crc_val;
  logic [7:0]       crc_piece_unused;

  crc_parallel #(
    .CRC_W (16), .DATA_W (8), .OUT_W (8), .POLY (POLY_CRC16_CCITT)
  ) u_crc (
    .clk     (clk),
    .reset   (reset),
    .init    (crc_init),
    .calc    (1'b1),
    .d_valid (crc_step),
    .d       (rx_byte),
    .crc_reg (crc_val),
    .crc     (crc_piece_unused)
  );

  assign crc_init = (state == R_WAIT_HDR) && rx_valid && (rx_byte == SOH || rx_byte == STX);
  assign crc_step = (state == R_DATA) && rx_valid;

  // Silence timer: restarts on every received byte and whenever a reply is sent.
  assign timeout = (timer == TW'(TIMEOUT_CYCLES - 1));

  logic check_ok;
  assign check_ok = (blk == ~nblk) &&
                    ((mode == MODE_CRC) ? (crc_val == {chk_hi, chk_lo}) : (sum == chk_hi));

  assign busy = (state != R_IDLE) && (state != R_DONE);
  assign done = (state == R_DONE);

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= R_IDLE;
      ret_state <= R_IDLE;
      timer     <= '0;
      tries     <= '0;
      started   <= 1'b0;
      mode      <= MODE_CRC;
      blk       <= '0;
      nblk      <= '0;
      expected  <= 8'd1;
      len       <= '0;
      idx       <= '0;
      chk_hi    <= '0;
      chk_lo    <= '0;
      sum       <= '0;
      tx_byte   <= '0;
      tx_valid  <= 1'b0;
      out_byte  <= '0;
      out_valid <= 1'b0;
      pkt_count <= '0;
    end else begin
      if (tx_valid && tx_ready) tx_valid <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;

      if (rx_valid || state == R_SEND || state == R_IDLE || state == R_DONE) timer <= '0;
      else if (!timeout) timer <= timer + 1'b1;

      unique case (state)
        R_IDLE, R_DONE: begin
          if (start) begin
            mode      <= MODE_CRC;
            tries     <= '0;
            started   <= 1'b0;
            expected  <= 8'd1;
            pkt_count <= '0;
            tx_byte   <= CHAR_C;
            tx_valid  <= 1'b1;
            state     <= R_SEND;
            ret_state <= R_WAIT_HDR;
          end
        end

        // wait until the reply byte has been taken by the line
        R_SEND: begin
          if (!tx_valid || tx_ready) state <= ret_state;
        end

        R_WAIT_HDR: begin
          if (rx_valid) begin
            if (rx_byte == SOH || rx_byte == STX) begin
              len     <= (rx_byte == STX) ? IW'(BLK_LONG) : IW'(BLK_SHORT);
              started <= 1'b1;
              idx     <= '0;
              sum     <= '0;
              state   <= R_BLK;
            end else if (rx_byte == EOT) begin
              tx_byte   <= ACK;
              tx_valid  <= 1'b1;
              state     <= R_SEND;
              ret_state <= R_DONE;
            end
          end else if (timeout) begin
            tx_valid  <= 1'b1;
            state     <= R_SEND;
            ret_state <= R_WAIT_HDR;
            if (!started && mode == MODE_CRC) begin
              if (tries == 2'(C_TRIES - 1)) begin
                mode    <= MODE_CHECKSUM;   // fall back and ask with NAK
                tx_byte <= NAK;
              end else begin
                tries   <= tries + 1'b1;
                tx_byte <= CHAR_C;
              end
            end else begin
              tx_byte <= NAK;
            end
          end
        end

        R_BLK:  if (rx_valid) begin blk  <= rx_byte; state <= R_NBLK; end
        R_NBLK: if (rx_valid) begin nblk <= rx_byte; state <= R_DATA; end

        R_DATA: begin
          if (rx_valid) begin
            buffer[idx[$clog2(BUF_BYTES)-1:0]] <= rx_byte;
            sum <= sum + rx_byte;
            idx <= idx + 1'b1;
            if (idx == len - 1'b1) state <= R_CHK_HI;
          end
        end

        R_CHK_HI: begin
          if (rx_valid) begin
            chk_hi <= rx_byte;
            state  <= (mode == MODE_CRC) ? R_CHK_LO : R_VERIFY;
          end
        end

        R_CHK_LO: if (rx_valid) begin chk_lo <= rx_byte; state <= R_VERIFY; end

        R_VERIFY: begin
          tx_valid  <= 1'b1;
          state     <= R_SEND;
          ret_state <= R_WAIT_HDR;
          if (check_ok && blk == expected) begin
            tx_valid <= 1'b0;          // ACK only after delivery
            idx      <= '0;
            state    <= R_DRAIN;
          end else if (check_ok && blk == expected - 8'd1) begin
            tx_byte  <= ACK;           // repeat of an acknowledged packet
          end else begin
            tx_byte  <= NAK;
          end
        end

        R_DRAIN: begin
          if (!out_valid || out_ready) begin
            if (idx != len) begin
              out_byte  <= buffer[idx[$clog2(BUF_BYTES)-1:0]];
              out_valid <= 1'b1;
              idx       <= idx + 1'b1;
            end else begin
              expected  <= expected + 8'd1;
              pkt_count <= pkt_count + 16'd1;
              tx_byte   <= ACK;
              tx_valid  <= 1'b1;
              state     <= R_SEND;
              ret_state <= R_WAIT_HDR;
            end
          end
        end

        default: state <= R_IDLE;
      endcase

      // silence in the middle of a packet: give up on it and ask again
      if (timeout && !rx_valid &&
          (state inside {R_BLK, R_NBLK, R_DATA, R_CHK_HI, R_CHK_LO})) begin
        tx_byte   <= NAK;
        tx_valid  <= 1'b1;
        state     <= R_SEND;
        ret_state <= R_WAIT_HDR;
      end
    end
  end

  // line output handshake: a byte is held until taken
  a_tx_hold: assert property (@(posedge clk) disable iff (reset)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_byte));
  a_out_hold: assert property (@(posedge clk) disable iff (reset)
    out_valid && !out_ready |=> out_valid && $stable(out_byte));

endmodule
