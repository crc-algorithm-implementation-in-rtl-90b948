// xm_ref_pkg: reference calculations for the Xmodem testbenches, written
// independently of the RTL: the Xmodem CRC16 computed bytewise by the usual
// software method, and the 8-bit arithmetic checksum.
package xm_ref_pkg;

  function automatic logic [15:0] crc16(input logic [7:0] data[$]);
    logic [15:0] c = '0;
    foreach (data[i]) begin
      c ^= {data[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  function automatic logic [7:0] sum8(input logic [7:0] data[$]);
    logic [7:0] s = '0;
    foreach (data[i]) s += data[i];
    return s;
  endfunction

endpackage
