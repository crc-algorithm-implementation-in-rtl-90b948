# Byte-parallel CRC for Xmodem file transfer

Xmodem sends a file as a series of packets. Each packet carries a check
value, and the receiver answers each packet with ACK (accept) or NAK (send it
again). The original 8-bit checksum lets about one damaged packet in 256
through. CRC Xmodem replaces it with the 16-bit CCITT CRC,
G(x) = x^16 + x^12 + x^5 + 1. In hardware, the textbook CRC circuit is a
linear feedback shift register (LFSR) that takes one message bit per clock.
It also needs 16 extra clocks of zeros at the end. A 128-byte packet therefore
costs 1024 + 16 = 1040 clocks.

This RTL computes the CRC a whole byte per clock (128 clocks per packet), or
a whole 32-bit word per clock for CRC32. The byte-parallel engine is then used
at both ends of an Xmodem link. The sender and the receiver are complete
state machines. They handle the 'C' handshake that selects CRC mode, the
fallback to checksum mode, 128- and 1024-byte packets, retransmission, padding
and end of file.

All code is synthesizable SystemVerilog (IEEE 1800-2017) in `rtl/`. The
self-checking testbenches are in `tb/`.

## Files

| file | what it is |
|---|---|
| `rtl/xmodem_pkg.sv` | control characters, block sizes, polynomials, `check_mode_e` |
| `rtl/crc_lfsr_prog.sv` | bit-serial division register, polynomial chosen at run time |
| `rtl/crc16_lfsr_serial.sv` | bit-serial CCITT CRC16 register with fixed taps |
| `rtl/crc_parallel.sv` | word-parallel CRC engine (CRC16 by bytes, CRC32 by words, any polynomial) |
| `rtl/xmodem_rx.sv` | Xmodem receiver |
| `rtl/xmodem_tx.sv` | Xmodem sender |
| `rtl/xmodem_crc_top.sv` | top level holding all of the above |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_xmodem_crc_top_full` |
| `tb/xm_ref_pkg.sv` | software reference CRC16 and checksum used by the testbenches |

## The CRC arithmetic

Treat the message bits as the coefficients of a polynomial M(x), with the
first bit sent as the highest power. The CRC is the remainder
R(x) = M(x)·x^r mod G(x), where r is the degree of G. The arithmetic is
modulo 2, so subtraction is XOR. The sender appends R, which makes the whole
frame divisible by G.

A division register holds only the low r bits of the running remainder. The
x^r term of G is never stored: whenever it would matter, the top bit is 1 and
the subtraction clears it. Two ways of feeding the register give the same
result.

**Augmented form** (the two serial circuits). The message enters at the bottom
stage r0. The top stage r_{r-1} is the feedback, and it is XORed into every
stage whose coefficient G_j is 1:

    r_j <= G_j ? (r_{r-1} ^ r_{j-1}) : r_{j-1},     r_{-1} = input bit

This register divides exactly what it is fed. The message alone leaves
M mod G. The message followed by r zero bits leaves the CRC. The zeros are the
16 extra clocks mentioned above.

A small worked case is G = x^3 + x + 1 (taps `011`) with message `11100110`.
From 000 the register goes 001, 011, 111, 101, 001, 011, 111, 101. The
`crc_lfsr_prog` testbench checks every one of these steps.

**Direct form** (the parallel engine). The message bit is XORed with the top
bit before feedback, and nothing enters at the bottom:

    fb = r_{r-1} ^ m;   r <= {r[r-2:0], 0} ^ (fb ? G : 0)

This gives M·x^r mod G as soon as the last message bit is in. There is no
zero flush. It is the same quotient arithmetic as the augmented form with the
r zeros folded in.

**Going parallel.** The next register value after W bits is a fixed XOR
function of the old register and the W input bits. `crc_parallel` writes it
as a loop that repeats the direct-form step W times inside one `always_comb`.
Synthesis unrolls the loop into a flat XOR network. No hand-derived equations
are needed, and any CRC_W, DATA_W or POLY works.

Check values for "123456789" (zero initial value, no reflection), as used by
the tests:

| generator | POLY (without top term) | result |
|---|---|---|
| CCITT CRC16 (Xmodem) x^16+x^12+x^5+1 | `16'h1021` | `16'h31C3` |
| CRC8 x^8+x^5+x^4+1 | `8'h31` | `8'hA2` |
| CRC12 x^12+x^11+x^3+x^2+1 | `12'h80D` | `12'hEFB` |
| ANSI CRC16 x^16+x^15+x^2+1 | `16'h8005` | `16'hFEE8` |
| CRC32 (x^32+x^26+…+x+1) | `32'h04C11DB7` | `32'h89A1897F` |

## Serial circuits

`crc_lfsr_prog #(K)` is the general division register. It has K flip-flops.
In front of each flip-flop, a selector driven by `g[j]` picks either the
lower neighbour or the lower neighbour XOR the top-stage feedback. Because
`g` is a port, the polynomial can change between messages. The ports are
`clk`, `in` (one bit per clock), `cr` (asynchronous clear, active high) and
`d` (the stage outputs).

`crc16_lfsr_serial` is the same register with the CCITT polynomial fixed.
There are only three XORs, in front of r0, r5 and r12; every other stage is a
plain shift. After `cr`, shift in the message high bit first and then 16
zeros. `d` then holds the CRC, with `d[15]` as the x^15 coefficient. Neither
circuit has a shift enable: it shifts on every clock.

## The word-parallel engine `crc_parallel`

| parameter | default | meaning |
|---|---|---|
| `CRC_W` | 16 | CRC width r |
| `DATA_W` | 8 | bits folded in per clock |
| `OUT_W` | 8 | bits unloaded per clock on `crc` (must divide `CRC_W` and be smaller) |
| `POLY` | `16'h1021` | generator without its x^r term |
| `INIT` | 0 | register value after `reset`/`init` |
| `DATA_LSB_FIRST` | 0 | 1: `d[0]` is the first message bit |
| `OUT_INV_REV` | 0 | 1: `crc` is the inverted, bit-reversed register piece |

Ports and behaviour. All actions happen at the rising clock edge, and priority
goes from top to bottom:

- `reset` or `init`: `crc_reg <= INIT`, `crc <= 0`.
- `d_valid && calc`: `crc_reg <= next(crc_reg, d)`, and `crc` shows the top
  `OUT_W` bits of the new value. The CRC of the last word is in `crc_reg` on
  the next clock, so the latency is one clock per word.
- `d_valid && !calc`: unload. `crc_reg` shifts left by `OUT_W` bits, and
  `crc` shows the piece that moved to the top. Sending `crc` after each
  calc/unload step puts the CRC on the wire high piece first.
- otherwise: hold.

The defaults are the Xmodem convention: high bit first, CRC sent unchanged.
Setting `DATA_LSB_FIRST = 1` and `OUT_INV_REV = 1` gives the convention used
by Ethernet-style CRC blocks. With those settings, byte `8'hC4` into a cleared
CRC16 engine gives `crc_reg = 16'h1401`, `crc = 8'hD7`. Unloading then gives
`16'h0100`/`8'h7F` and `16'h0000`/`8'hFF`. A CRC32 engine with 32-bit data
and a 16-bit unload that holds `32'h1373A5E7` unloads as `16'h3137`,
`16'h185A`, `16'hFFFF`. These traces are part of `tb_crc_parallel`.

## Xmodem packets and the two state machines

Packet on the wire:

    SOH (128-byte field) | STX (1024-byte field, Xmodem-1K)
    block number, 255 - block number
    data field, padded at the end of file with SUB (0x1A)
    CRC high byte, CRC low byte      in CRC mode
    one byte: 8-bit sum of the data  in checksum mode

Single characters: 'C' (0x43) asks for CRC mode. ACK (0x06) and NAK (0x15)
are the answers. EOT (0x04) is sent alone after the last packet.

### Receiver `xmodem_rx`

1. On `start` it sends 'C'. It then waits for `TIMEOUT_CYCLES` clocks
   (3 s at an assumed 50 MHz = 150,000,000). After the first and second
   timeouts it sends 'C' again. At the third timeout it switches to checksum
   mode and sends NAK. After that it sends NAK on every further timeout. This
   lets a sender that does not know CRC mode, and so ignores 'C', still take
   part.
2. A header byte (SOH/STX) sets the field length and clears the CRC engine.
   Each data byte is written into a 1024-byte buffer. In the same clock it is
   folded into the CRC engine and added to the running sum.
3. After the check byte(s) the packet is judged:
   - it is good if the block number and its complement agree and the CRC (or
     sum) matches;
   - a good packet with the expected number goes out on `out_byte/out_valid/out_ready`
     from the buffer, then ACK is sent and the expected number advances;
   - a good packet with the previous number is a repeat caused by a lost ACK.
     It is acknowledged and dropped;
   - anything else gets NAK.
   Data therefore reaches `out_*` only after it has been checked.
4. If the line goes silent for `TIMEOUT_CYCLES`, in the middle of a packet or
   between packets, the receiver sends NAK and waits for a header again.
5. EOT gets ACK, and `done` goes high.

`tx_byte/tx_valid` is held until `tx_ready`. `rx_valid` has no back-pressure.
The SUB padding of the last packet is delivered like data; the consumer strips
it.

### Sender `xmodem_tx`

1. On `start` it waits for the receiver. 'C' selects CRC mode, but only if
   `crc_capable` is high; otherwise 'C' is ignored. NAK selects checksum mode.
2. It fills its 1024-byte buffer from the file stream
   (`in_byte/in_valid/in_ready/in_last`). `use_1k` selects a 128- or
   1024-byte field. After `in_last` the rest of the field is filled with SUB.
3. It sends the header, the block number pair and the data from the buffer.
   The CRC engine folds in each data byte as it leaves, so the CRC is ready
   right after the last one. The buffer read is registered, so a data byte
   leaves at most every second clock.
4. ACK means: next block, with numbers starting at 1 and wrapping at 255.
   NAK, or 'C' in CRC mode, means: send the same packet again from the buffer.
   `resend_count` counts these.
5. When the file is used up it sends EOT, repeats it on NAK, and raises
   `done` on ACK. A file that ends exactly on a field boundary gets EOT right
   after its last full packet.

The sender has no timeout of its own. If a packet or reply is lost, the
receiver's silence NAK restarts the exchange.

## Top level `xmodem_crc_top`

The top holds one of each block, each with its own ports:

- the sender (`s_*` ports);
- the receiver (`r_*` ports);
- a CRC32 engine (`c32_*`) with 32-bit data, 16-bit unload, polynomial
  `32'h04C11DB7` and initial value 0;
- the serial CCITT circuit (`s16_*`);
- a 16-bit programmable LFSR (`lp_*`).

The sender and receiver are the two ends of a link, so they are not connected
to each other inside the top. The serial line between them (a UART or similar)
is not part of this RTL: the byte ports are where it attaches. For a local
loop, connect `s_line_*` to `r_line_in_*` and `r_line_*` to `s_reply_*`, as
the top-level testbenches do.

Parameters: `TIMEOUT_CYCLES` (150,000,000) and `LFSR_K` (16). `reset` is
synchronous and active high. `s16_cr` and `lp_cr` are asynchronous clears.

Size after generic synthesis: 334 flip-flops and 16 Kbit of buffer memory
(one 1024×8 buffer at each end). The small Spartan-3E parts (for example
XC3S500E: about 9,300 flip-flops and twenty 18 Kbit block RAMs) hold it
easily.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog stops a testbench that hangs. With plain Verilator, from the
directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/xmodem_pkg.sv tb/xm_ref_pkg.sv tb/tb_xmodem_crc_top.sv \
        --top-module tb_xmodem_crc_top
    ./obj_dir/Vtb_xmodem_crc_top

Replace the testbench name to run the others. Each run takes a few seconds.

| testbench | what it shows |
|---|---|
| `tb_crc_lfsr_prog` | the worked 3-bit division step by step; the CCITT check value; random polynomials against long division; asynchronous clear |
| `tb_crc16_lfsr_serial` | check value; random 128-byte fields against a bytewise software CRC; exactly 1040 clocks per field |
| `tb_crc_parallel` | Xmodem CRC16 in one clock per byte (128 per field); unloading; the Ethernet-convention traces above; CRC32 by words; CRC8/CRC12/ANSI CRC16/CRC32 check values |
| `tb_xmodem_rx` | 'C' start; 'C' repeated at timeout intervals (checked to within 8 clocks) and fallback to NAK; bad CRC (high or low byte), bad complement, cut-short packet and silence all NAKed; duplicate dropped; 1K packet; checksum packets; EOT |
| `tb_xmodem_tx` | ignores 'C' without CRC support; resend on NAK is identical; SUB padding; 1K packets; EOT repeated on NAK; EOT right after a full last field |
| `tb_xmodem_crc_top` | sender and receiver looped through a channel that corrupts one byte and drops one ACK; a CRC transfer, a checksum-fallback transfer and a 1K transfer, checked byte for byte; the CRC32 and serial circuits alongside. Each mechanism is counted, and one that never happened counts as a failure. Uses `TIMEOUT_CYCLES = 3000` |
| `tb_xmodem_crc_top_full` | the top with all parameters at their defaults: two complete CRC-mode transfers (128- and 1024-byte packets) |

Every block's testbench has also been run against a deliberately broken copy
of its module, and each one failed.

## Where this RTL makes its own choices

This design follows the CRC arithmetic, the circuits and the protocol
behaviour described above. The following points are its own decisions, and
are worth reviewing before reuse:

- **Direct form in the parallel engine.** A literal byte-wide version of the
  serial register would still need two zero bytes at the end of every packet.
  The direct form needs none, and gives the same CRC.
- **Bit order.** The Xmodem convention is the default. The Ethernet-style
  order is available through `DATA_LSB_FIRST`/`OUT_INV_REV`.
- **Unload semantics** of `calc`/`d_valid`: shift by `OUT_W` bits and show the
  next piece on `crc`.
- **Xmodem framing details** follow common Xmodem practice: block number
  pair, numbering from 1, duplicate handling, NAK on silence after the first
  packet, no sender timeout, 1K last field padded to 1024 bytes. The same goes
  for the 8-bit checksum as the plain sum of the data bytes.
- **Clock frequency** of 50 MHz behind the 3 s timeout. Change
  `TIMEOUT_CYCLES` for another clock.
- **Buffer-then-deliver** at the receiver and a registered buffer read at the
  sender.
- **Reset and clear:** synchronous active-high reset for the clocked engines,
  asynchronous active-high clear for the serial circuits.
- **Not included:** the serial line itself (baud rate, framing). Also not
  included are the 32 K and 64 K block extensions of Xmodem and a
  software-table CRC method; these are other ways to run Xmodem, not parts of
  this hardware.
