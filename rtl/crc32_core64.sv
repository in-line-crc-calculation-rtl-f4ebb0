// crc32_core64: Ethernet CRC-32 over 64 bits per clock, in-line with a frame.
//
// The register holds the CRC in the augmented (Galois field) form: message
// bits are shifted in at the bottom, the polynomial is subtracted whenever a
// one falls out of bit 31, and 32 zero bits are appended after the last
// message bit. With the register started at 46AF6449h this gives the same
// remainder as the usual direct form started at FFFFFFFFh. These three
// points (augmented form, the start value, the 32 appended zeros) and the
// 64-bit step are taken from the original design; how the steps are built is this
// design's own: a chain of byte steps, each processing one byte LSB first
// (Ethernet bit order), of which only the valid bytes are used.
//
// Per clock, with k = number of valid bytes in in_data (prefix, see xgmii_pkg):
//   k > 0, previous word idle  : new frame, start from 46AF6449h
//   k in 1..4                  : last word; k bytes and the 32 zero bits
//   k in 5..8                  : k bytes; the zeros follow in the next cycle
//   k = 0 after a word of >4 B : extra cycle that shifts in the 32 zeros
//   k = 0 otherwise            : hold
// A word of 8 bytes that is followed by an idle word is the last word, so the
// frame end needs no separate flag.
//
// crc_fcs is the complemented remainder with each byte bit-reversed: the four
// FCS bytes as they go on the wire, crc_fcs[31:24] first. It is valid from the
// clock edge that takes the last word (<= 4 valid bytes) or from the edge
// after it (> 4 valid bytes), and holds until the next frame starts.
module crc32_core64
  import xgmii_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,     // synchronous, active low
  input  logic [63:0] in_data,
  input  logic [7:0]  in_bvalid,
  output logic [31:0] crc_fcs    // FCS bytes, crc_fcs[31:24] sent first
);

  logic [31:0] crc_q, crc_d;
  logic        prev_active_q;  // previous input word held data
  logic        prev_gt4_q;     // previous input word held more than 4 bytes

  // One message or zero bit through the augmented register.
  function automatic logic [31:0] step_bit(input logic [31:0] r, input logic b);
    logic [31:0] n;
    n = {r[30:0], b};
    if (r[31]) n ^= CRC32_POLY;
    return n;
  endfunction

  // One byte, least significant bit first.
  function automatic logic [31:0] step_byte(input logic [31:0] r, input logic [7:0] b);
    logic [31:0] n;
    n = r;
    for (int i = 0; i < 8; i++) n = step_bit(n, b[i]);
    return n;
  endfunction

  // The 32 appended zero bits.
  function automatic logic [31:0] step_zeros(input logic [31:0] r);
    logic [31:0] n;
    n = r;
    for (int i = 0; i < 32; i++) n = step_bit(n, 1'b0);
    return n;
  endfunction

  logic [3:0]  k;
  logic        start;
  logic [31:0] base, after_data;

  always_comb begin
    k     = nbytes(in_bvalid);
    start = (k != 4'd0) && !prev_active_q;
    base  = start ? CRC32_INIT_AUG : crc_q;

    after_data = base;
    for (int j = 0; j < 8; j++)
      if (j < int'(k)) after_data = step_byte(after_data, in_data[63-8*j -: 8]);

    if (k != 4'd0)
      crc_d = (k <= 4'd4) ? step_zeros(after_data) : after_data;
    else if (prev_active_q && prev_gt4_q)
      crc_d = step_zeros(crc_q);
    else
      crc_d = crc_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      crc_q         <= CRC32_INIT_AUG;
      prev_active_q <= 1'b0;
      prev_gt4_q    <= 1'b0;
    end else begin
      crc_q         <= crc_d;
      prev_active_q <= (k != 4'd0);
      prev_gt4_q    <= (k > 4'd4);
    end
  end

  always_comb begin
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 8; i++)
        crc_fcs[31-8*j-i] = ~crc_q[31-8*j-7+i];
  end

endmodule
