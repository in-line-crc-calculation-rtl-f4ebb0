// crc_tx_unit: in-line CRC calculation and XGMII scheduling for the transmit
// side of a 10 Gigabit Ethernet MAC.
//
// The MAC hands over an Ethernet frame (destination address up to the end of
// the payload, without preamble and FCS) as 64-bit words at 156.25 MHz. The
// unit computes the CRC-32 on the fly and emits the frame on the 32-bit XGMII
// at double data rate: start code and preamble, SFD, the data, the four FCS
// bytes placed right after the last data byte in whatever lane that is, the
// terminate code on the next free lane, and idles.
//
// Structure, as in the original design's block diagram: the input word goes both to
// the CRC core (crc32_core64) and to the delay registers (delay_regs); a
// control FSM (tx_ctrl_fsm) drives the output multiplexers (xgmii_out_mux),
// which pick each lane's byte from the delayed data, the CRC or a constant
// code, and pick by clock state which half of the 64-bit schedule is on the
// pins.
//
// Interface:
//   mac_data   frame bytes, first byte in mac_data[63:56]
//   mac_bvalid byte valid, bit i for mac_data[8i+7:8i]; all ones inside a
//              frame, a prefix (upper bits) in the last word, zero between
//              frames. The frame ends with a partial word or with a full word
//              followed by an idle word.
//   xgmii_txd/xgmii_txc  XGMII, lane l = txd[8l+7:8l] / txc[l]; the first
//              half word of a cycle while clk is high, the second while low.
// Timing: the start code and first three preamble bytes appear one clock
// period (6.4 ns) after the first word is presented, i.e. right after the
// rising edge that samples it, which is the latency the original design gives.
// Frame data follow one cycle later. Between frames the MAC leaves at least
// one idle word after a last word of 1..3 bytes and two otherwise (the room
// the preamble, CRC and terminate take on the XGMII); assertions check the
// input rules. Reset is synchronous and active low.
module crc_tx_unit
  import xgmii_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] mac_data,
  input  logic [7:0]  mac_bvalid,
  output logic [31:0] xgmii_txd,
  output logic [3:0]  xgmii_txc
);

  logic [31:0] crc_fcs;
  logic [7:0]  s1_bvalid, s2_bvalid;
  logic [63:0] s2_data;
  lane_sel_e   sel_first [4];
  lane_sel_e   sel_second [4];

  crc32_core64 u_crc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_data   (mac_data),
    .in_bvalid (mac_bvalid),
    .crc_fcs   (crc_fcs)
  );

  delay_regs #(.DATA_W(64)) u_delay (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_data   (mac_data),
    .in_bvalid (mac_bvalid),
    .s1_bvalid (s1_bvalid),
    .s2_data   (s2_data),
    .s2_bvalid (s2_bvalid)
  );

  tx_ctrl_fsm u_fsm (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_bvalid  (mac_bvalid),
    .s1_bvalid  (s1_bvalid),
    .s2_bvalid  (s2_bvalid),
    .sel_first  (sel_first),
    .sel_second (sel_second)
  );

  xgmii_out_mux u_out (
    .clk        (clk),
    .sel_first  (sel_first),
    .sel_second (sel_second),
    .data       (s2_data),
    .crc        (crc_fcs),
    .txd        (xgmii_txd),
    .txc        (xgmii_txc)
  );

  // ---------------------------------------------------------------------
  // Input rules
  // ---------------------------------------------------------------------
  logic [7:0] prev_bv_q, prev2_bv_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev_bv_q  <= '0;
      prev2_bv_q <= '0;
    end else begin
      prev_bv_q  <= mac_bvalid;
      prev2_bv_q <= prev_bv_q;
    end
  end

  // Valid bytes are a prefix of the word.
  a_bvalid_prefix: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid_ok(mac_bvalid));
  // A partial word ends the frame: the next word is idle.
  a_partial_is_last: assert property (@(posedge clk) disable iff (!rst_n)
    (prev_bv_q != 8'h00 && prev_bv_q != 8'hFF) |-> mac_bvalid == 8'h00);
  // After a last word of four or more bytes, two idle words follow.
  a_gap_two: assert property (@(posedge clk) disable iff (!rst_n)
    (prev2_bv_q != 8'h00 && nbytes(prev2_bv_q) >= 4'd4 && prev_bv_q == 8'h00)
      |-> mac_bvalid == 8'h00);

endmodule
