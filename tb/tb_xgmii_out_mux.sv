// tb_xgmii_out_mux: self-checking test of the output multiplexers and the
// double-data-rate conversion.
//
// For 300 clock cycles the lane selects of both half words, the 64-bit data
// and the CRC are randomised at the rising edge. In the middle of the high
// phase the XGMII must carry the first half word (lane l: select
// sel_first[l], data byte l = data[63-8l -: 8]) and in the middle of the low
// phase the second half word (sel_second[l], data byte l+4).
`timescale 1ns/1ps
module tb_xgmii_out_mux;
  import xgmii_pkg::*;

  logic        clk = 1'b0;
  lane_sel_e   sel_first  [4];
  lane_sel_e   sel_second [4];
  logic [63:0] data;
  logic [31:0] crc;
  logic [31:0] txd;
  logic [3:0]  txc;

  int checks = 0, failures = 0;

  xgmii_out_mux dut (.clk, .sel_first, .sel_second, .data, .crc, .txd, .txc);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected {control, byte} of lane l for select s; half = 0 first, 1 second.
  function automatic logic [8:0] expect_byte(input int l, input lane_sel_e s, input int half);
    logic [7:0] db;
    db = data[63 - 8*(4*half + l) -: 8];
    case (s)
      SEL_IDLE:  return {1'b1, 8'h07};
      SEL_START: return (l == 0) ? {1'b1, 8'hFB} : {1'b1, 8'h07};
      SEL_TERM:  return {1'b1, 8'hFD};
      SEL_PRE:   return {1'b0, 8'h55};
      SEL_SFD:   return (l == 3) ? {1'b0, 8'hD5} : {1'b1, 8'h07};
      SEL_DHI:   return {1'b0, data[63 - 8*l -: 8]};
      SEL_DLO:   return {1'b0, data[31 - 8*l -: 8]};
      SEL_CRC0:  return {1'b0, crc[31:24]};
      SEL_CRC1:  return {1'b0, crc[23:16]};
      SEL_CRC2:  return {1'b0, crc[15:8]};
      SEL_CRC3:  return {1'b0, crc[7:0]};
      default:   return {1'b1, 8'h07};
    endcase
  endfunction

  int n_data_half [2];

  initial begin
    n_data_half = '{0, 0};
    for (int t = 0; t < 300; t++) begin
      // rising edge: new schedule
      for (int l = 0; l < 4; l++) begin
        sel_first[l]  = lane_sel_e'($urandom_range(0, 10));
        sel_second[l] = lane_sel_e'($urandom_range(0, 10));
        // keep data selects in their natural half most of the time
        if ($urandom_range(0, 2) == 0) begin
          sel_first[l] = SEL_DHI; sel_second[l] = SEL_DLO;
        end
      end
      data = {$urandom, $urandom};
      crc  = $urandom;
      clk  = 1'b1;
      #1.6;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if ({txc[l], txd[8*l +: 8]} !== expect_byte(l, sel_first[l], 0)) begin
          failures++;
          $display("FAIL t=%0d high phase lane %0d", t, l);
        end
        if (sel_first[l] == SEL_DHI) n_data_half[0]++;
      end
      #1.6 clk = 1'b0;
      #1.6;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if ({txc[l], txd[8*l +: 8]} !== expect_byte(l, sel_second[l], 1)) begin
          failures++;
          $display("FAIL t=%0d low phase lane %0d", t, l);
        end
        if (sel_second[l] == SEL_DLO) n_data_half[1]++;
      end
      #1.6;
    end
    checks++;
    if (n_data_half[0] == 0 || n_data_half[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
