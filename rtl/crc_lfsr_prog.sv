// crc_lfsr_prog: bit-serial CRC division register with a programmable
// generator polynomial (the general linear feedback shift register circuit).
//
// Stage j holds r_j. On every rising clock edge each stage loads
//     r_j <= G_j ? (r_{K-1} ^ r_{j-1}) : r_{j-1},      r_{-1} = in,
// so the register divides the incoming bit stream, high-order bit first, by
// G(x) = x^K + sum(G_j x^j). The x^K term is implied and not stored. Shifting in
// a message followed by K zero bits leaves the remainder M(x)*x^K mod G(x),
// which is the CRC, in d (d[j] = r_j). Shifting in the message alone leaves
// M(x) mod G(x).
//
// Interface: in is one message bit per clock; g selects the feedback taps and
// may change only between messages; cr clears all stages asynchronously
// (active high). Latency: the remainder is valid the clock after the last bit.
//
// The stage structure, the per-stage selection by G_j, the serial input at r0
// and the clear input follow the described circuit; the asynchronous clear and
// the active-high polarity are choices of this design.
module crc_lfsr_prog #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         cr,
  input  logic         in,
  input  logic [K-1:0] g,
  output logic [K-1:0] d
);

  logic [K-1:0] r;
  logic [K-1:0] below;  // value of the lower neighbour of each stage
  logic         fb;

  assign below = {r[K-2:0], in};
  assign fb    = r[K-1];

  always_ff @(posedge clk or posedge cr) begin
    if (cr) r <= '0;
    else    r <= below ^ (g & {K{fb}});
  end

  assign d = r;

endmodule
