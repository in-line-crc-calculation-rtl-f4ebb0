// xgmii_lane_mux: the byte multiplexer of one XGMII lane.
//
// Each lane chooses among the idle, terminate and (lane 0 only) start
// control codes, the preamble byte, the SFD (lane 3 only), the two data bytes
// of the 64-bit word that belong to this lane (byte LANE for the first half
// word and byte LANE+4 for the second) and any of the four CRC bytes. The
// set of inputs follows the original design's lane 0 multiplexer; that the start
// code sits on lane 0 and the SFD on lane 3 only is also the original design's.
// The control bit is high for the three control codes. A select code that a
// lane does not have (start on lanes 1-3, SFD on lanes 0-2) gives idle.
// Purely combinational. LANE is kept for the lane-specific inputs only.
module xgmii_lane_mux
  import xgmii_pkg::*;
#(
  parameter int unsigned LANE = 0   // 0..3
) (
  input  lane_sel_e   sel,
  input  logic [7:0]  d_hi,   // data byte LANE   (lane 0: data[63:56])
  input  logic [7:0]  d_lo,   // data byte LANE+4 (lane 0: data[31:24])
  input  logic [31:0] crc,    // FCS bytes, crc[31:24] first
  output logic [7:0]  txd,
  output logic        txc
);

  always_comb begin
    txd = XGMII_IDLE;
    txc = 1'b1;
    unique case (sel)
      SEL_IDLE:  begin txd = XGMII_IDLE; txc = 1'b1; end
      SEL_TERM:  begin txd = XGMII_TERM; txc = 1'b1; end
      SEL_START: if (LANE == 0) begin txd = XGMII_START; txc = 1'b1; end
      SEL_SFD:   if (LANE == 3) begin txd = ETH_SFD; txc = 1'b0; end
      SEL_PRE:   begin txd = ETH_PREAMBLE; txc = 1'b0; end
      SEL_DHI:   begin txd = d_hi;         txc = 1'b0; end
      SEL_DLO:   begin txd = d_lo;         txc = 1'b0; end
      SEL_CRC0:  begin txd = crc[31:24];   txc = 1'b0; end
      SEL_CRC1:  begin txd = crc[23:16];   txc = 1'b0; end
      SEL_CRC2:  begin txd = crc[15:8];    txc = 1'b0; end
      SEL_CRC3:  begin txd = crc[7:0];     txc = 1'b0; end
      default:   begin txd = XGMII_IDLE; txc = 1'b1; end
    endcase
  end

endmodule
