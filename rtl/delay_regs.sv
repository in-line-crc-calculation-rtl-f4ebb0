// delay_regs: the data delay line between the MAC input and the output
// multiplexers.
//
// The unit spends the first output cycle of a frame on the start symbol,
// preamble and SFD, so frame data reach the XGMII one cycle after they are
// registered. Two register stages give that: stage 1 takes the input word at
// every clock edge, stage 2 takes stage 1. Stage 2 feeds the output
// multiplexers; stage 1's byte-valid bits are brought out as well, so the
// control FSM can see whether the word in stage 2 is followed by another
// (which tells whether a full 8-byte word ends the frame). The original design shows
// a block of delay registers without giving their number; two stages is this
// design's choice and the fewest that align data and CRC here.
//
// Timing: a word presented before clock edge e appears on s1_* after e and on
// s2_* after edge e+1. Reset (synchronous, active low) clears the valid bits
// and the data.
module delay_regs #(
  parameter int unsigned DATA_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   in_data,
  input  logic [DATA_W/8-1:0] in_bvalid,
  output logic [DATA_W/8-1:0] s1_bvalid,  // lookahead: word following s2
  output logic [DATA_W-1:0]   s2_data,    // data(63:0) to the multiplexers
  output logic [DATA_W/8-1:0] s2_bvalid
);

  logic [DATA_W-1:0] s1_data;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_data   <= '0;
      s1_bvalid <= '0;
      s2_data   <= '0;
      s2_bvalid <= '0;
    end else begin
      s1_data   <= in_data;
      s1_bvalid <= in_bvalid;
      s2_data   <= s1_data;
      s2_bvalid <= s1_bvalid;
    end
  end

endmodule
