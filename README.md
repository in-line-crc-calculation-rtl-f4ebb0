# In-line CRC-32 and XGMII scheduling for a 10 Gigabit Ethernet transmitter

A 10 GE MAC works on 64-bit words at 156.25 MHz, but the PHY expects the
32-bit XGMII, where every frame is wrapped in control symbols. Before the
frame goes out it needs a start symbol with preamble and start-frame
delimiter (SFD) in front. At its end it needs the 4-byte Ethernet FCS
(CRC-32) and a terminate symbol. An Ethernet frame can hold any number of
bytes, so the FCS can start on any of the four XGMII lanes. Everything
after it moves with it.

This unit does all of that in-line, in the transmit path. It computes the
CRC on 64 bits per clock while the frame streams through. It delays the
data just long enough for the CRC to be ready when the last data byte goes
out. Per-lane byte multiplexers then assemble the XGMII stream directly:
preamble, data, FCS bytes rotated to the right lanes, terminate, and idles.
The multiplexers also do the 64-to-32-bit rate conversion. They take the
level of the 156.25 MHz clock into account, so the XGMII changes on both
clock edges.

```
 mac_data[63:0] ──┬──────────────► delay_regs ── data(63:0) ──┐
 mac_bvalid[7:0]  │                (2 stages)                 │
                  ├──► crc32_core64 ───────── CRC(31:0) ──────┤
                  │                                           ▼
                  └──► tx_ctrl_fsm ── lane selects ──► xgmii_out_mux ──► xgmii_txd[31:0]
                                                     (4 x xgmii_lane_mux,   xgmii_txc[3:0]
                                                      constant codes,
                                                      clock-level select)
```

The top is `crc_tx_unit`. After generic synthesis it has 186 flip-flops:

- 34 in the CRC core;
- 144 in the delay line;
- 8 in the FSM.

The registers used only by the input-rule assertions are removed by
synthesis.

## Conventions: bytes, lanes and half words

Every part of the design uses these conventions. They are defined in
`rtl/xgmii_pkg.sv`.

| Item | Convention |
|---|---|
| MAC word | Byte k (k = 0 is sent first) is `mac_data[63-8k -: 8]`. |
| Byte valid | `mac_bvalid[i]` belongs to `mac_data[8i+7:8i]`. A word with n bytes has the n upper bits set, e.g. `8'b1110_0000` for 3 bytes. |
| XGMII lane | Lane l is `xgmii_txd[8l+7:8l]` with control bit `xgmii_txc[l]`. |
| Half words | Each clock cycle carries eight XGMII bytes. The first half word is MAC bytes 0..3. It is on the pins while `clk` is high. The second half word is bytes 4..7, on the pins while `clk` is low. |
| Lane 0 data | Lane 0 carries `data[63:56]`, then `data[31:24]`. |
| FCS | The core's `crc[31:24]` is the first FCS byte on the wire and `crc[7:0]` the last. Each byte has the same bit order as a data byte. |
| Codes | Idle 07h, start FBh and terminate FDh are sent with the control bit set. Preamble 55h, SFD D5h, data and FCS bytes are sent with it clear. |

## The MAC-side interface

- A frame is a run of consecutive words with `mac_bvalid` non-zero. It
  runs from the destination address to the last payload byte, without
  preamble or FCS.
- All words of a frame except the last are full (`8'hFF`).
- The frame ends with either:
  - a partial word, or
  - a full word followed by an idle word.

  No separate end-of-frame flag is needed.
- Between frames the input must stay idle for at least:
  - one word, if the last word held 1..3 bytes;
  - two words, if it held 4..8 bytes.

  This is the room that the 8 preamble/SFD bytes, the 4 FCS bytes and the
  terminate byte take on the XGMII. The design adds no buffering beyond
  it.
- `crc_tx_unit` checks these rules with concurrent assertions.
- Padding short frames to the 64-byte minimum is left to the MAC.
- The unit does not generate error codes.
- Reset is synchronous and active low.

## Timing of one frame

Suppose word W0 is presented in cycle c, i.e. it is sampled at the rising
edge that ends cycle c:

| Output cycle | First half (clk high) | Second half (clk low) |
|---|---|---|
| c+1 | S P P P | P P P SFD |
| c+2 | W0 bytes 0..3 | W0 bytes 4..7 |
| ... | ... | ... |
| c+2+L | last word: data, then FCS, T, I | ... |
| c+3+L (only if the last word held 4 or more bytes) | rest of FCS, T, I | I |

Start and the first three preamble bytes appear one clock period (6.4 ns)
after the first word is presented. Data follow one cycle later. Preamble
plus SFD are exactly eight bytes, so the data keep their byte positions:
byte k of a word always goes to lane k mod 4. No realignment is needed
inside a frame. Only the FCS and terminate move.

## The CRC core (`crc32_core64`)

The register holds the CRC in the augmented form:

- Message bits are shifted in at the bottom.
- The generator 04C11DB7h is XORed in whenever a one leaves bit 31.
- 32 zero bits are shifted in after the last message bit.

Started from **46AF6449h**, this gives the same remainder as the common
direct form started from FFFFFFFFh. In other words, 46AF6449h is
FFFFFFFFh multiplied by x^-32 modulo the generator. Bytes are processed
LSB first, which is Ethernet's bit order. The complemented remainder, with
each byte bit-reversed, is the FCS in wire order. The testbench checks
this against an independent reflected CRC-32. The value for "123456789"
is CBF43926h.

One clock processes the valid bytes of one word, k of them:

| Input word | Action |
|---|---|
| k = 1..4 (the last word) | The k bytes and the 32 zero bits are done in the same cycle. |
| k = 5..8 | Only the k bytes are done. The 32 zero bits follow in the next cycle, which is idle at the input. |
| k = 8, followed by an idle word | The zero bits go into that idle cycle. |
| First word after an idle word | Starts from 46AF6449h. |

The final FCS is therefore in the register:

- right after the last word's edge, if that word held at most 4 bytes;
- one edge later, otherwise.

It stays there until the next frame starts. With the two-stage delay line,
that is always in time for the cycle in which the last data word goes out.

The update is written as a chain of single-bit steps over the valid bytes,
selected by k. Synthesis reduces this to a multiplexer over XOR networks.
It is by far the deepest logic in the design, so it sets the clock limit.

## Scheduling the end of a frame (`tx_ctrl_fsm`)

This is the part that needs care. The FSM has four states:

| State | Output |
|---|---|
| IDLE | All lanes idle. |
| PRE | S P P P \| P P P SFD. Entered when a word appears at the input. |
| DATA | The word in delay stage 2 goes out. |
| TAIL | The bytes of the frame end that did not fit in the DATA cycle. |

In DATA, the FSM combines its state with the current valid bits. The word
is the last one if either:

- it holds n < 8 bytes, or
- n = 8 and delay stage 1 (the following word) is empty.

For the last word, count the byte positions q from the first byte of that
word. Then:

| q | Byte |
|---|---|
| 0 .. n-1 | data |
| n .. n+3 | FCS bytes 0..3 |
| n+4 | T |
| above n+4 | I |

Positions q = 0..7 are the DATA cycle and 8..15 the TAIL cycle. So a TAIL
cycle is needed only when n >= 4. The FSM then keeps n in a register for
it. Lane l of the first half word is position l, and of the second half
word position 4 + l. This sets the select code of each of the eight lane
multiplexer inputs per cycle.

Two examples:

- **n = 2:** FCS on lanes 2, 3, then 0, 1. T on lane 2 of the second half
  word, idle on lane 3.
- **n = 4 or 8:** FCS fills a whole half word. T is on lane 0 of the next
  half word.

## The output multiplexers and the DDR conversion

Each lane has one multiplexer (`xgmii_lane_mux`). Lane 0 chooses among:

- preamble, T, S, I;
- its two data bytes, `data[63:56]` and `data[31:24]`;
- any of the four CRC bytes.

Lane 3 also has the SFD input. S exists only on lane 0. Control
characters set the lane's `txc` bit.

`xgmii_out_mux` feeds the lane multiplexers with `clk ? sel_first :
sel_second`. The XGMII therefore changes on both edges at an effective
312.5 MHz. The clock is deliberately used as a data select here. All
select and data inputs come from registers clocked on the rising edge, so
each half word is stable for its whole clock phase. A downstream DDR
receiver (or a DDR output register in an ASIC/FPGA flow) should sample
in the middle of each phase. A flow that does not allow the clock in the
data path can replace the clock-level select in `xgmii_out_mux` by a DDR
output register pair. It would be fed by the two half words that the lane
multiplexers produce from `sel_first` and `sel_second`.

## What follows the source design and what is this design's own

Taken from the design description:

- 64-bit input at 156.25 MHz and 32-bit DDR XGMII output.
- The augmented CRC with start value 46AF6449h and 32 appended zeros.
- The extra CRC cycle for a last word of more than four bytes.
- The block structure: delay registers, CRC core, constant codes and
  output multiplexers.
- The lane 0 multiplexer inputs.
- S on lane 0 and SFD on lane 3.
- An FSM that tracks the end of the frame and the size of the last word.
- The clock-level half-word select.
- The one-period start latency.

Chosen here:

- The byte-valid encoding of the MAC interface and the end-of-frame rule.
- The minimum gaps between frames.
- The depth of the delay line (two stages).
- The FSM state encoding.
- Clock-high for the first half word.
- Synchronous active-low reset.
- The bit order inside the CRC, which is standard Ethernet.
- The code values, which are standard XGMII.

The CRC core's internal equations are not given by the source. The core
here is a straightforward correct implementation. It is not an optimised
parallel-CRC matrix.

Not covered:

- The receive-side CRC checker.
- The rest of the MAC and the PHY.
- Any area or timing figure for a particular technology.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_crc32_core64` | Frames of 1..40 bytes, 60-byte frames and "123456789" against a reflected CRC-32 model. Also when the result is ready and that it holds. |
| `tb_delay_regs` | Random words. Checks the one- and two-cycle delays and reset. |
| `tb_xgmii_lane_mux` | Every select code on all four lanes. |
| `tb_xgmii_out_mux` | Random selects. Samples mid-high and mid-low phase. |
| `tb_tx_ctrl_fsm` | Lane selects cycle by cycle, against a schedule built from a frame list that covers every last-word size and the minimum gaps. |
| `tb_crc_tx_unit` | End to end at the default configuration, 113 frames including 60- and 1514-byte bodies and two frames cut short by a reset. |

`tb_crc_tx_unit` rebuilds the exact XGMII byte stream expected in every
half cycle and compares it. It counts that each case occurs:

- every last-word size 1..8;
- the extra CRC cycle;
- the tail cycle;
- frames at the minimum gap;
- single-word frames;
- the 6.4 ns start latency;
- a reset in the middle of a frame, after which the output must go idle at
  once and the next frame must be correct.

Shared reference code is in `tb/tb_eth_ref_pkg.sv`.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_crc_tx_unit \
  rtl/xgmii_pkg.sv rtl/crc32_core64.sv rtl/delay_regs.sv rtl/tx_ctrl_fsm.sv \
  rtl/xgmii_lane_mux.sv rtl/xgmii_out_mux.sv rtl/crc_tx_unit.sv \
  tb/tb_eth_ref_pkg.sv tb/tb_crc_tx_unit.sv
./obj_dir/Vtb_crc_tx_unit
```

For another testbench, swap the last file and `--top-module`. The
package files must come first.
