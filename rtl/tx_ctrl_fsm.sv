// tx_ctrl_fsm: schedules every XGMII byte of a frame and drives the selects
// of the output lane multiplexers.
//
// As in the original design, a small FSM keeps track of where the frame is and of
// how many valid bytes its last 64-bit word held, and that state is combined
// with the current byte-valid signals to form the multiplexer selects. The
// state encoding and the lookahead below are this design's.
//
// States (one per 156.25 MHz cycle, eight XGMII bytes per cycle):
//   ST_IDLE  all lanes idle
//   ST_PRE   S P P P | P P P SFD   (entered when a word arrives at the input)
//   ST_DATA  the word in the delay registers' stage 2 goes out. It is the
//            last word if it holds n < 8 bytes, or if stage 1 is empty.
//            For a last word, bytes n..n+3 carry the CRC and byte n+4 the
//            terminate code when they fit in this cycle.
//   ST_TAIL  the bytes that did not fit (last word of n >= 4 bytes): the
//            rest of the CRC, then terminate, then idle. tail_n holds n.
// Counting the eight bytes of a cycle as positions p = 0..7 (first half word
// 0..3, second half word 4..7), lane l of the first half is p = l and of the
// second half is p = 4 + l.
//
// Input rules (checked by assertions in the top): frame words follow each
// other without gaps, only the last word may be partial, and between frames
// the input is idle for at least one word after a last word of 1..3 bytes
// and two words otherwise. These are the gaps the output needs for the
// preamble, CRC and terminate bytes; the original design does not state them.
module tx_ctrl_fsm
  import xgmii_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,          // synchronous, active low
  input  logic [7:0] in_bvalid,     // MAC input, this cycle
  input  logic [7:0] s1_bvalid,     // delay stage 1 (word after stage 2)
  input  logic [7:0] s2_bvalid,     // delay stage 2 (word going out)
  output lane_sel_e sel_first  [4],
  output lane_sel_e sel_second [4]
);

  typedef enum logic [1:0] {ST_IDLE, ST_PRE, ST_DATA, ST_TAIL} tx_state_e;

  tx_state_e  state_q, state_d;
  logic [3:0] tail_n_q, tail_n_d;
  logic [3:0] n2;
  logic       is_last;

  // Select for the byte at position q of the frame's end region, counted
  // from the first byte of the last word (q = 0..15), for a last word of n
  // bytes: data, then four CRC bytes, then terminate, then idle.
  function automatic lane_sel_e end_sel(input int q, input int n);
    lane_sel_e s;
    if (q < n)            s = (q < 4) ? SEL_DHI : SEL_DLO;
    else if (q == n)      s = SEL_CRC0;
    else if (q == n + 1)  s = SEL_CRC1;
    else if (q == n + 2)  s = SEL_CRC2;
    else if (q == n + 3)  s = SEL_CRC3;
    else if (q == n + 4)  s = SEL_TERM;
    else                  s = SEL_IDLE;
    return s;
  endfunction

  function automatic lane_sel_e pos_sel(input tx_state_e st, input logic last,
                                        input int n, input int tn, input int p);
    lane_sel_e s;
    unique case (st)
      ST_IDLE: s = SEL_IDLE;
      ST_PRE:  s = (p == 0) ? SEL_START : (p == 7) ? SEL_SFD : SEL_PRE;
      ST_DATA: s = last ? end_sel(p, n) : ((p < 4) ? SEL_DHI : SEL_DLO);
      ST_TAIL: s = end_sel(p + 8, tn);
      default: s = SEL_IDLE;
    endcase
    return s;
  endfunction

  always_comb begin
    n2      = nbytes(s2_bvalid);
    is_last = (state_q == ST_DATA) && ((n2 != 4'd8) || (s1_bvalid == 8'h00));

    for (int l = 0; l < 4; l++) begin
      sel_first[l]  = pos_sel(state_q, is_last, int'(n2), int'(tail_n_q), l);
      sel_second[l] = pos_sel(state_q, is_last, int'(n2), int'(tail_n_q), l + 4);
    end

    state_d  = state_q;
    tail_n_d = tail_n_q;
    unique case (state_q)
      ST_IDLE: if (in_bvalid != 8'h00) state_d = ST_PRE;
      ST_PRE:  state_d = ST_DATA;
      ST_DATA: if (is_last) begin
                 if (n2 >= 4'd4) begin
                   state_d  = ST_TAIL;
                   tail_n_d = n2;
                 end else begin
                   state_d  = (in_bvalid != 8'h00) ? ST_PRE : ST_IDLE;
                 end
               end
      ST_TAIL: state_d = (in_bvalid != 8'h00) ? ST_PRE : ST_IDLE;
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_IDLE;
      tail_n_q <= 4'd0;
    end else begin
      state_q  <= state_d;
      tail_n_q <= tail_n_d;
    end
  end

endmodule
