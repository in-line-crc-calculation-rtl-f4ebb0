// tb_delay_regs: self-checking test of the two-stage delay registers.
//
// Random words and byte-valid patterns are applied for 200 cycles; after
// every clock edge stage 1 must show the word applied one cycle earlier and
// stage 2 the word applied two cycles earlier. Reset must clear both stages.
`timescale 1ns/1ps
module tb_delay_regs;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [63:0] in_data = '0;
  logic [7:0]  in_bvalid = '0;
  logic [7:0]  s1_bvalid, s2_bvalid;
  logic [63:0] s2_data;

  int checks = 0, failures = 0;

  delay_regs #(.DATA_W(64)) dut (.clk, .rst_n, .in_data, .in_bvalid,
                                 .s1_bvalid, .s2_data, .s2_bvalid);

  always #3.2 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] hist_d [3];
  logic [7:0]  hist_v [3];

  initial begin
    in_data   = {$urandom, $urandom};
    in_bvalid = 8'($urandom);
    repeat (2) @(posedge clk);
    #0.5;
    checks++;
    if (s1_bvalid !== 8'h00 || s2_bvalid !== 8'h00 || s2_data !== 64'h0) begin
      failures++;
      $display("FAIL reset does not clear the stages");
    end
    rst_n = 1'b1;
    for (int i = 0; i < 3; i++) begin hist_d[i] = '0; hist_v[i] = '0; end
    for (int t = 0; t < 200; t++) begin
      in_data   = {$urandom, $urandom};
      in_bvalid = 8'($urandom);
      hist_d[2] = hist_d[1]; hist_v[2] = hist_v[1];
      hist_d[1] = hist_d[0]; hist_v[1] = hist_v[0];
      hist_d[0] = in_data;   hist_v[0] = in_bvalid;
      @(posedge clk); #0.5;
      if (t >= 1) begin
        checks++;
        if (s1_bvalid !== hist_v[0] || s2_bvalid !== hist_v[1] || s2_data !== hist_d[1]) begin
          failures++;
          $display("FAIL cycle %0d: s1v=%02h/%02h s2v=%02h/%02h s2d=%016h/%016h", t,
                   s1_bvalid, hist_v[0], s2_bvalid, hist_v[1], s2_data, hist_d[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
