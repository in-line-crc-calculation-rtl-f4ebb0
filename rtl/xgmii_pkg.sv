// xgmii_pkg: constants and types shared by the 10 GE transmit CRC unit.
//
// It holds the XGMII control codes, the preamble and start-frame-delimiter
// bytes, the CRC-32 constants, and the select codes that the control FSM uses
// to steer the four XGMII lane multiplexers.
//
// Byte order conventions used throughout the design:
//   * MAC word: byte k (k = 0 is first on the wire) is data[63-8k -: 8], so
//     data[63:56] is the first byte and data[7:0] the last. The byte-valid bit
//     for data[8i+7:8i] is bvalid[i], so a word that holds n bytes has the
//     n upper bvalid bits set (8'b1110_0000 holds 3 bytes).
//   * XGMII: lane l is txd[8l+7:8l] with control bit txc[l]. In one 156.25 MHz
//     cycle the first half word (clock high) carries MAC bytes 0..3 and the
//     second half word (clock low) bytes 4..7, so lane 0 takes data[63:56] and
//     then data[31:24].
//   * CRC: crc[31:24] is the first FCS byte on the wire, crc[7:0] the last,
//     each in the same bit order as a data byte.
// The CRC constants are the original design's. The byte numbering is this design's
// choice, made to agree with the lane 0 multiplexer inputs data(63:56) and
// data(31:24). The code values are the standard XGMII ones.
package xgmii_pkg;

  // XGMII control characters (sent with txc = 1).
  localparam logic [7:0] XGMII_IDLE  = 8'h07;
  localparam logic [7:0] XGMII_START = 8'hFB;
  localparam logic [7:0] XGMII_TERM  = 8'hFD;
  // Preamble and start frame delimiter (data characters, txc = 0).
  localparam logic [7:0] ETH_PREAMBLE = 8'h55;
  localparam logic [7:0] ETH_SFD      = 8'hD5;

  // CRC-32 generator polynomial (x^32 term implicit) and the reset value of
  // the augmented CRC register. 46AF6449h shifted through 32 zero bits gives
  // the all-ones start value of the usual direct form.
  localparam logic [31:0] CRC32_POLY     = 32'h04C1_1DB7;
  localparam logic [31:0] CRC32_INIT_AUG = 32'h46AF_6449;

  // Select codes of one lane multiplexer (one per input in the lane mux).
  typedef enum logic [3:0] {
    SEL_IDLE  = 4'd0,
    SEL_START = 4'd1,   // only lane 0 has this input
    SEL_TERM  = 4'd2,
    SEL_PRE   = 4'd3,
    SEL_SFD   = 4'd4,   // only lane 3 has this input
    SEL_DHI   = 4'd5,   // data byte of the first half word  (lane 0: data[63:56])
    SEL_DLO   = 4'd6,   // data byte of the second half word (lane 0: data[31:24])
    SEL_CRC0  = 4'd7,   // crc[31:24], first FCS byte
    SEL_CRC1  = 4'd8,   // crc[23:16]
    SEL_CRC2  = 4'd9,   // crc[15:8]
    SEL_CRC3  = 4'd10   // crc[7:0], last FCS byte
  } lane_sel_e;

  // One XGMII half word: four data lanes and their control bits.
  typedef struct packed {
    logic [31:0] d;
    logic [3:0]  c;
  } xgmii_word_t;

  // Number of valid bytes in a MAC word. Valid bytes form a prefix in wire
  // order, i.e. the upper bits of bvalid; the count is the number of ones.
  function automatic logic [3:0] nbytes(input logic [7:0] bvalid);
    logic [3:0] n;
    n = '0;
    for (int i = 0; i < 8; i++) n += {3'b000, bvalid[i]};
    return n;
  endfunction

  // True when bvalid is a legal pattern: zero or a prefix of ones from bit 7.
  function automatic logic bvalid_ok(input logic [7:0] bvalid);
    logic ok;
    ok = 1'b1;
    for (int i = 0; i < 7; i++)
      if (bvalid[i] && !bvalid[i+1]) ok = 1'b0;
    return ok;
  endfunction

endpackage
