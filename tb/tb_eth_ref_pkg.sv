// tb_eth_ref_pkg: reference models shared by the testbenches.
//
// crc32_ref is the textbook bit-reflected CRC-32 of Ethernet (polynomial
// EDB88320h in reflected form, start value FFFFFFFFh, result complemented),
// computed one bit at a time. It is deliberately written in the reflected,
// direct form, unlike the augmented form of the design, so the two agree only
// if the design is right. fcs_bytes turns its result into the FCS bytes in
// wire order packed as the design's crc output: first byte in [31:24].
package tb_eth_ref_pkg;

  function automatic logic [31:0] crc32_ref(input logic [7:0] msg[$]);
    logic [31:0] c;
    c = 32'hFFFF_FFFF;
    foreach (msg[i]) begin
      c ^= {24'h0, msg[i]};
      for (int b = 0; b < 8; b++)
        c = c[0] ? ((c >> 1) ^ 32'hEDB8_8320) : (c >> 1);
    end
    return ~c;
  endfunction

  function automatic logic [31:0] fcs_bytes(input logic [31:0] crc);
    return {crc[7:0], crc[15:8], crc[23:16], crc[31:24]};
  endfunction

  // MAC byte-valid pattern for a word holding n bytes (n = 0..8).
  function automatic logic [7:0] bv_of(input int n);
    logic [7:0] v;
    v = '0;
    for (int i = 0; i < n; i++) v[7-i] = 1'b1;
    return v;
  endfunction

endpackage
