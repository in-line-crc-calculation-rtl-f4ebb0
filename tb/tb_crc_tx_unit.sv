// tb_crc_tx_unit: end-to-end test of the transmit CRC unit at its default
// (and only) configuration.
//
// The testbench acts as the MAC and as the PHY's XGMII receiver. It sends
// frames of every length from 1 to 24 bytes, the Ethernet minimum and
// maximum frame bodies (60 and 1514 bytes before the FCS) and random lengths,
// separated by the shortest allowed gap (one idle word after a last word of
// 1..3 bytes, two otherwise) or longer ones. From the frame list it builds
// the exact XGMII byte stream the unit must produce, cycle by cycle: the
// start code and first three preamble bytes one clock period after the first
// word is presented, the other three preamble bytes and the SFD, the data,
// the FCS from a bitwise reflected CRC-32 model, terminate and idles. Both
// half words of each cycle are sampled, in the middle of the high and of the
// low clock phase.
//
// Mechanisms counted (each must occur): last words of each size 1..8, the
// extra CRC cycle for last words of more than four bytes, the tail cycle
// after a last word of four or more bytes, frames at the minimum gap,
// single-word frames, and the 6.4 ns start latency. A reset in the middle
// of a frame is also applied: the output must turn to idle at once and the
// next frame must come out with a correct FCS.
`timescale 1ns/1ps
module tb_crc_tx_unit;
  import tb_eth_ref_pkg::*;

  localparam int MAXC = 12000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [63:0] mac_data = '0;
  logic [7:0]  mac_bvalid = '0;
  logic [31:0] xgmii_txd;
  logic [3:0]  xgmii_txc;

  int checks = 0, failures = 0;

  crc_tx_unit dut (.clk, .rst_n, .mac_data, .mac_bvalid, .xgmii_txd, .xgmii_txc);

  always #3.2 clk = ~clk;

  initial begin
    repeat (MAXC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] data_plan [MAXC];
  logic [7:0]  bv_plan   [MAXC];
  logic [8:0]  exp_b     [8*MAXC];   // {txc, txd} per XGMII byte
  logic        rst_plan  [MAXC];     // rst_n applied in each cycle
  int          start_cyc [$];        // cycle in which each frame's first word is presented
  int          ncyc;

  int n_end [9];
  int n_extra_crc_cycle, n_tail, n_min_gap, n_single, n_latency_ok, n_bytes;
  int n_reset_abort;

  // A frame of k full words whose transmission is cut by a reset applied in
  // the cycle after its last word. Words 0..k-2 reach the XGMII before the
  // reset takes effect; from then on the output is idle.
  task automatic plan_aborted(inout int c, input int k);
    int g;
    start_cyc.push_back(c);
    for (int w = 0; w < k; w++) begin
      data_plan[c + w] = {$urandom, $urandom};
      bv_plan[c + w]   = 8'hFF;
    end
    g = 8 * (c + 1);
    exp_b[g] = {1'b1, 8'hFB};
    for (int i = 1; i < 7; i++) exp_b[g + i] = {1'b0, 8'h55};
    exp_b[g + 7] = {1'b0, 8'hD5};
    for (int w = 0; w <= k - 2; w++)
      for (int i = 0; i < 8; i++)
        exp_b[8 * (c + 2 + w) + i] = {1'b0, data_plan[c + w][63-8*i -: 8]};
    rst_plan[c + k] = 1'b0;
    n_reset_abort++;
    c += k + 2;
  endtask

  task automatic plan_frame(inout int c, input int len, input int extra_gap);
    logic [7:0] msg[$];
    logic [31:0] fcs;
    int nw, n_last, g;
    msg = {};
    for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
    fcs    = fcs_bytes(crc32_ref(msg));
    nw     = (len + 7) / 8;
    n_last = len - 8 * (nw - 1);
    start_cyc.push_back(c);
    for (int w = 0; w < nw; w++) begin
      int n;
      n = (w == nw - 1) ? n_last : 8;
      data_plan[c + w] = {$urandom, $urandom};
      for (int i = 0; i < n; i++) data_plan[c + w][63-8*i -: 8] = msg[8*w + i];
      bv_plan[c + w] = bv_of(n);
    end
    g = 8 * (c + 1);
    exp_b[g] = {1'b1, 8'hFB};
    for (int i = 1; i < 7; i++) exp_b[g + i] = {1'b0, 8'h55};
    exp_b[g + 7] = {1'b0, 8'hD5};
    g += 8;
    for (int i = 0; i < len; i++) exp_b[g + i] = {1'b0, msg[i]};
    g += len;
    for (int j = 0; j < 4; j++) exp_b[g + j] = {1'b0, fcs[31-8*j -: 8]};
    exp_b[g + 4] = {1'b1, 8'hFD};

    n_end[n_last]++;
    n_bytes += len;
    if (n_last > 4) n_extra_crc_cycle++;
    if (n_last >= 4) n_tail++;
    if (extra_gap == 0) n_min_gap++;
    if (nw == 1) n_single++;
    c += nw + ((n_last <= 3) ? 1 : 2) + extra_gap;
  endtask

  task automatic compare_half(input int t, input int half);
    for (int l = 0; l < 4; l++) begin
      logic [8:0] got, exp;
      got = {xgmii_txc[l], xgmii_txd[8*l +: 8]};
      exp = exp_b[8*t + 4*half + l];
      checks++;
      if (got !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL cycle %0d half %0d lane %0d: got %0b/%02h expected %0b/%02h",
                   t, half, l, got[8], got[7:0], exp[8], exp[7:0]);
      end
    end
  endtask

  initial begin
    int c, fi;
    foreach (n_end[i]) n_end[i] = 0;
    n_extra_crc_cycle = 0; n_tail = 0; n_min_gap = 0; n_single = 0;
    n_latency_ok = 0; n_bytes = 0; n_reset_abort = 0;
    foreach (bv_plan[i]) begin bv_plan[i] = '0; data_plan[i] = '0; rst_plan[i] = (i >= 2); end
    foreach (exp_b[i]) exp_b[i] = {1'b1, 8'h07};

    c = 4;
    for (int len = 1; len <= 24; len++) plan_frame(c, len, 0);
    plan_frame(c, 60, 0);
    plan_frame(c, 1514, 0);
    plan_frame(c, 64, 1);
    plan_frame(c, 1514, 3);
    plan_frame(c, 60, 0);
    for (int k = 0; k < 80; k++) plan_frame(c, $urandom_range(1, 200), $urandom_range(0, 2));
    plan_aborted(c, 6);
    plan_frame(c, 61, 0);
    plan_aborted(c, 2);
    plan_frame(c, 13, 0);
    ncyc = c + 4;

    fi = 0;
    for (int t = 0; t < ncyc; t++) begin
      @(posedge clk);
      #0.5;
      rst_n = rst_plan[t];
      // idle words carry junk on the data lines
      mac_data   = (bv_plan[t] != 8'h00) ? data_plan[t] : {$urandom, $urandom};
      mac_bvalid = bv_plan[t];
      #1.1;                        // middle of the high phase
      if (t >= 1) compare_half(t, 0);
      // start latency: S on lane 0 exactly one clock after the first word
      if (fi < start_cyc.size() && t == start_cyc[fi] + 1) begin
        checks++;
        if (xgmii_txc[0] === 1'b1 && xgmii_txd[7:0] === 8'hFB &&
            xgmii_txd[31:8] === 24'h555555 && xgmii_txc[3:1] === 3'b000) n_latency_ok++;
        else begin
          failures++;
          $display("FAIL frame %0d: no S P P P one cycle after its first word", fi);
        end
        fi++;
      end
      #3.2;                        // middle of the low phase
      if (t >= 1) compare_half(t, 1);
    end

    for (int n = 1; n <= 8; n++) begin
      checks++;
      if (n_end[n] == 0) begin failures++; $display("FAIL no frame with a last word of %0d bytes", n); end
    end
    checks++;
    if (n_extra_crc_cycle == 0 || n_tail == 0 || n_min_gap == 0 || n_single == 0 ||
        n_latency_ok != start_cyc.size() || n_reset_abort == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised");
    end
    $display("frames %0d, bytes %0d, cycles %0d", start_cyc.size(), n_bytes, ncyc);
    $display("last-word sizes 1..8: %0d %0d %0d %0d %0d %0d %0d %0d", n_end[1], n_end[2],
             n_end[3], n_end[4], n_end[5], n_end[6], n_end[7], n_end[8]);
    $display("extra CRC cycles %0d, tail cycles %0d, minimum gaps %0d, single-word frames %0d, latency ok %0d, resets mid-frame %0d",
             n_extra_crc_cycle, n_tail, n_min_gap, n_single, n_latency_ok, n_reset_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
