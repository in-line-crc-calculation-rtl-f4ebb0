// tb_tx_ctrl_fsm: self-checking test of the multiplexer control FSM.
//
// The testbench plays the MAC and the delay registers: it applies byte-valid
// patterns for a list of frames (every last-word size 1..8, single- and
// multi-word frames, with the shortest allowed gaps and longer ones) and
// delays them itself by one and two cycles. From the same frame list it
// builds the expected XGMII schedule byte by byte: start, six preambles and
// SFD in the cycle after the first word arrives, then the data bytes, four
// CRC bytes, terminate and idles. Every cycle the eight lane selects must
// match that schedule (data bytes map to SEL_DHI in the first half word and
// SEL_DLO in the second).
`timescale 1ns/1ps
module tb_tx_ctrl_fsm;
  import xgmii_pkg::*;
  import tb_eth_ref_pkg::*;

  localparam int MAXC = 4000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] in_bvalid = '0, s1_bvalid = '0, s2_bvalid = '0;
  lane_sel_e  sel_first [4];
  lane_sel_e  sel_second [4];

  int checks = 0, failures = 0;

  tx_ctrl_fsm dut (.clk, .rst_n, .in_bvalid, .s1_bvalid, .s2_bvalid,
                   .sel_first, .sel_second);

  always #3.2 clk = ~clk;

  initial begin
    repeat (MAXC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] bv_plan [MAXC];
  lane_sel_e  exp_sel [8*MAXC];
  int         ncyc;
  int         n_tail, n_short_end, n_min_gap;

  task automatic plan_frame(inout int c, input int len, input int extra_gap);
    int nw, n_last, g;
    nw     = (len + 7) / 8;
    n_last = len - 8 * (nw - 1);
    g = 8 * (c + 1);
    exp_sel[g] = SEL_START;
    for (int i = 1; i < 7; i++) exp_sel[g + i] = SEL_PRE;
    exp_sel[g + 7] = SEL_SFD;
    g += 8;
    for (int i = 0; i < len; i++) exp_sel[g + i] = ((i % 8) < 4) ? SEL_DHI : SEL_DLO;
    g += len;
    exp_sel[g]     = SEL_CRC0;
    exp_sel[g + 1] = SEL_CRC1;
    exp_sel[g + 2] = SEL_CRC2;
    exp_sel[g + 3] = SEL_CRC3;
    exp_sel[g + 4] = SEL_TERM;
    for (int w = 0; w < nw; w++) bv_plan[c + w] = bv_of((w == nw - 1) ? n_last : 8);
    if (n_last >= 4) n_tail++; else n_short_end++;
    if (extra_gap == 0) n_min_gap++;
    c += nw + ((n_last <= 3) ? 1 : 2) + extra_gap;
  endtask

  initial begin
    int c;
    n_tail = 0; n_short_end = 0; n_min_gap = 0;
    foreach (bv_plan[i]) bv_plan[i] = '0;
    foreach (exp_sel[i]) exp_sel[i] = SEL_IDLE;
    c = 4;
    for (int len = 1; len <= 24; len++) plan_frame(c, len, 0);
    for (int len = 1; len <= 24; len++) plan_frame(c, len, $urandom_range(0, 3));
    for (int k = 0; k < 60; k++) plan_frame(c, $urandom_range(1, 120), $urandom_range(0, 2));
    ncyc = c + 4;

    for (int t = 0; t < ncyc; t++) begin
      @(posedge clk);
      #0.5;
      if (t == 2) rst_n = 1'b1;
      in_bvalid = bv_plan[t];
      s1_bvalid = (t >= 1) ? bv_plan[t-1] : '0;
      s2_bvalid = (t >= 2) ? bv_plan[t-2] : '0;
      #0.5;
      if (t >= 1) begin
        for (int l = 0; l < 4; l++) begin
          checks += 2;
          if (sel_first[l] !== exp_sel[8*t + l]) begin
            failures++;
            $display("FAIL cycle %0d lane %0d first half: %s expected %s", t, l,
                     sel_first[l].name(), exp_sel[8*t + l].name());
          end
          if (sel_second[l] !== exp_sel[8*t + 4 + l]) begin
            failures++;
            $display("FAIL cycle %0d lane %0d second half: %s expected %s", t, l,
                     sel_second[l].name(), exp_sel[8*t + 4 + l].name());
          end
        end
      end
    end
    checks++;
    if (n_tail == 0 || n_short_end == 0 || n_min_gap == 0) begin
      failures++;
      $display("FAIL a frame-end case was not exercised");
    end
    $display("frames ending with tail cycle %0d, without %0d, at minimum gap %0d",
             n_tail, n_short_end, n_min_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
