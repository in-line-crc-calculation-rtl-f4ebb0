// xgmii_out_mux: the four lane multiplexers and the 64 to 32 bit, DDR rate
// conversion.
//
// The control FSM gives two sets of lane selects per 156.25 MHz cycle: one
// for the first half word (MAC bytes 0..3) and one for the second (bytes
// 4..7). Following the original design, the multiplexer takes the clock state into
// account: while clk is high the first set is used, while it is low the
// second, so txd/txc change on both clock edges (32 bits at an effective
// 312.5 MHz). The selection by clock level, and clk high for the first half,
// are this design's reading of that sentence.
//
// clk is used here as a select signal on purpose: this is the DDR output
// stage. All inputs come from registers updated on the rising edge, so the
// first half word is stable for the whole high phase.
module xgmii_out_mux
  import xgmii_pkg::*;
(
  input  logic        clk,
  input  lane_sel_e   sel_first  [4],
  input  lane_sel_e   sel_second [4],
  input  logic [63:0] data,
  input  logic [31:0] crc,
  output logic [31:0] txd,
  output logic [3:0]  txc
);

  lane_sel_e sel [4];

  for (genvar l = 0; l < 4; l++) begin : g_lane
    assign sel[l] = clk ? sel_first[l] : sel_second[l];
    xgmii_lane_mux #(.LANE(l)) u_lane (
      .sel  (sel[l]),
      .d_hi (data[63-8*l -: 8]),
      .d_lo (data[31-8*l -: 8]),
      .crc  (crc),
      .txd  (txd[8*l +: 8]),
      .txc  (txc[l])
    );
  end

endmodule
