// tb_xgmii_lane_mux: self-checking test of the lane multiplexer.
//
// All four lanes are instantiated. Every select code is applied with random
// data and CRC bytes, and the byte and control bit of each lane are compared
// with the expected XGMII character: control codes 07h (idle), FBh (start,
// lane 0 only), FDh (terminate) with the control bit set; preamble 55h, SFD
// D5h (lane 3 only), data and CRC bytes with it clear.
`timescale 1ns/1ps
module tb_xgmii_lane_mux;
  import xgmii_pkg::*;

  lane_sel_e   sel;
  logic [7:0]  d_hi [4];
  logic [7:0]  d_lo [4];
  logic [31:0] crc;
  logic [7:0]  txd [4];
  logic        txc [4];

  int checks = 0, failures = 0;

  for (genvar l = 0; l < 4; l++) begin : g_lane
    xgmii_lane_mux #(.LANE(l)) dut (.sel, .d_hi(d_hi[l]), .d_lo(d_lo[l]), .crc,
                                    .txd(txd[l]), .txc(txc[l]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp;   // {control bit, byte}
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s <= 10; s++) begin
        sel = lane_sel_e'(s);
        crc = $urandom;
        for (int l = 0; l < 4; l++) begin d_hi[l] = 8'($urandom); d_lo[l] = 8'($urandom); end
        #1;
        for (int l = 0; l < 4; l++) begin
          case (s)
            0:  exp = {1'b1, 8'h07};
            1:  exp = (l == 0) ? {1'b1, 8'hFB} : {1'b1, 8'h07};
            2:  exp = {1'b1, 8'hFD};
            3:  exp = {1'b0, 8'h55};
            4:  exp = (l == 3) ? {1'b0, 8'hD5} : {1'b1, 8'h07};
            5:  exp = {1'b0, d_hi[l]};
            6:  exp = {1'b0, d_lo[l]};
            7:  exp = {1'b0, crc[31:24]};
            8:  exp = {1'b0, crc[23:16]};
            9:  exp = {1'b0, crc[15:8]};
            default: exp = {1'b0, crc[7:0]};
          endcase
          checks++;
          if ({txc[l], txd[l]} !== exp) begin
            failures++;
            $display("FAIL lane %0d sel %0d: got %0b/%02h expected %0b/%02h",
                     l, s, txc[l], txd[l], exp[8], exp[7:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
