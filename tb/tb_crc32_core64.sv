// tb_crc32_core64: self-checking test of the 64-bit CRC-32 core.
//
// Frames of 1..40 random bytes (every last-word size 1..8 occurs), a frame
// of the bytes "123456789" (whose CRC-32 is CBF43926h) and a few 60-byte
// frames are fed as 64-bit words. The core's FCS bytes are compared with a
// bitwise reflected CRC-32 model. Timing is checked too: a last word of up
// to 4 bytes must give the final CRC right after the edge that takes it, a
// larger one after the following edge (the extra cycle for the zero bits),
// and the value must hold while the input stays idle.
`timescale 1ns/1ps
module tb_crc32_core64;
  import tb_eth_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [63:0] in_data = '0;
  logic [7:0]  in_bvalid = '0;
  logic [31:0] crc_fcs;

  int checks = 0, failures = 0;

  crc32_core64 dut (.clk, .rst_n, .in_data, .in_bvalid, .crc_fcs);

  always #3.2 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (crc_fcs !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, crc_fcs, exp);
    end
  endtask

  task automatic send_frame(input logic [7:0] msg[$]);
    int nw, n_last;
    logic [31:0] exp;
    exp    = fcs_bytes(crc32_ref(msg));
    nw     = (msg.size() + 7) / 8;
    n_last = msg.size() - 8 * (nw - 1);
    for (int w = 0; w < nw; w++) begin
      int n;
      n = (w == nw - 1) ? n_last : 8;
      in_data = {$urandom, $urandom};   // invalid bytes carry junk
      for (int i = 0; i < n; i++) in_data[63-8*i -: 8] = msg[8*w+i];
      in_bvalid = bv_of(n);
      @(posedge clk); #0.5;
    end
    in_bvalid = '0;
    in_data   = {$urandom, $urandom};   // idle words carry junk
    if (n_last <= 4) check(exp, $sformatf("len %0d, same edge", msg.size()));
    @(posedge clk); #0.5;
    check(exp, $sformatf("len %0d, after zero cycle", msg.size()));
    @(posedge clk); #0.5;
    check(exp, $sformatf("len %0d, hold", msg.size()));
  endtask

  initial begin
    logic [7:0] msg[$];
    repeat (3) @(posedge clk);
    #0.5 rst_n = 1'b1;
    @(posedge clk); #0.5;

    msg = {};
    for (int i = 1; i <= 9; i++) msg.push_back(8'h30 + 8'(i));   // "123456789"
    send_frame(msg);
    checks++;
    if (crc_fcs !== 32'h2639_F4CB) begin
      failures++;
      $display("FAIL check value of 123456789: %08h", crc_fcs);
    end

    for (int len = 1; len <= 40; len++) begin
      msg = {};
      for (int i = 0; i < len; i++) msg.push_back(8'($urandom));
      send_frame(msg);
    end
    repeat (5) begin
      msg = {};
      for (int i = 0; i < 60; i++) msg.push_back(8'($urandom));
      send_frame(msg);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
