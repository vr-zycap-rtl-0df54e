# VR-ZYCAP: resource-level LUT and flip-flop rewriting through the ICAP

This is a configuration controller for Zynq-7000 / 7-series FPGAs. It changes one LUT or one flip-flop of a running design. It does not use a partial bitstream prepared in advance. Instead it performs a read-modify-write of the configuration frames that hold the resource, through the internal configuration access port (ICAPE2):

1. The frames are read back from configuration memory.
2. The few bits that describe the resource are changed while the words stream into a block RAM.
3. The frames are written back.

For a flip-flop, the controller also handles state:

- It stops the clock of the design under test (DUT).
- It captures the current flip-flop values into configuration memory (CAPTURE primitive).
- After the write, it pulses global set/reset (STARTUP primitive), so the flip-flops load the edited value.
- It then restarts the DUT clock.

A processor (the Zynq PS, over GPIO registers) provides the operands and pulses `start`. The controller answers with `done`. With the default parameters, rewriting one LUT takes 1084 cycles and rewriting one flip-flop takes 487 cycles. At the ICAP's 100 MHz that is about 10.8 µs and 4.9 µs.

## Operations

The processor selects an operation with `op_sel`:

| op_sel | operation   | operands                      | what happens |
|--------|-------------|-------------------------------|--------------|
| 1      | read frame  | `start_addr`, `num_frames`    | Reads `num_frames` frames from FAR `start_addr` into block RAM words 0... The count includes the dummy frame the device always returns first. |
| 2      | write frame | `start_addr`, `num_frames`    | Writes `num_frames - 1` frames from block RAM word 101 on to `start_addr`, plus a pad frame. A read and a write with the same operands therefore put back what was read. |
| 3      | DPR_LUT     | `xybel`, `init`               | Replaces the 64-bit INIT value of one LUT. |
| 4      | DPR_FF      | `start_addr`, `bit_location`, `cap_cycle` | Inverts the state of one flip-flop. |
| 5      | read BRAM   | `mem_addr`                    | Returns block RAM word `mem_addr` on `bram_word`. |

Frame counts beyond the block RAM are cut to what fits: five frames for a read, including the dummy frame, and four for a write. A read of 0 frames returns the dummy frame alone. A write of 0 sends only the pad frame.

The sequence is the same for every operation:

- `start` is sampled while `busy` is low.
- `busy` stays high for the whole operation.
- `done` pulses for one cycle at the end.
- Any other `op_sel` value does nothing and answers with `done` at once.
- After DPR_FF, software should leave the global reset line some time to settle before relying on the DUT.

## Where a LUT lives in configuration memory

A 7-series frame has 101 words of 32 bits. A CLB column spans 36 frames. The frame address register (FAR) has these fields, from the top bit:

| bits | field |
|------|-------|
| 6 | reserved |
| 3 | block type (0 = CLB) |
| 1 | top/bottom half |
| 5 | clock row |
| 10 | major column |
| 7 | minor frame |

Within a CLB column:

- Slice row Y of the clock region is held in words 2Y and 2Y+1.
- Word 2Y holds LUTA in bits 15:0 and LUTB in bits 31:16.
- Word 2Y+1 holds LUTC and LUTD in the same way.
- One word in the middle of the frame carries clock and ECC bits. The upper 25 slice rows are therefore shifted up by one word.
- A LUT's 64 INIT bits are spread over four consecutive minor frames, 16 bits in each:
  - frames 26-29 for odd X (odd slices);
  - frames 32-35 for even X (even slices).

`slice2far` turns the processor's `xybel` word into these values. `xybel` holds X in bits 31:17, Y in 16:2 and BEL (0..3 = LUTA..D) in 1:0, so `0x006400C9` is X50 Y50 LUTB. The translation works like this:

- **Top/bottom and row.** Y ≥ 50 is the top half (top/bottom = 0), with row (Y-50)/50. Lower Y is the bottom half (top/bottom = 1), with row `BOTTOM_ROW` (default 1).
- **Major column.** X/2 + 2. The two slices of a CLB share a column, and slice X0 sits in column 2.
- **Minor frame.** 26 for odd X, 32 for even X.
- **Word offset.** 2·(Y mod 50) + BEL[1], plus one when Y mod 50 ≥ 25.
- **Half of the word.** BEL[0] selects the upper half.

`init2fw` cuts INIT into the four 16-bit words that go to the four frames. Word k holds INIT bits [63-16k : 48-16k] with its two bytes exchanged, so word 0 is {INIT[55:48], INIT[63:56]}.

**Caution on the column rule.** The rule ignores non-CLB columns (block RAM, DSP, clocking) that sit between CLB columns on a real device. The device's own column map would give a different column number for most X. For example, the reference point quoted for this design is column 30 for X50, while the linear rule gives 27. Before use on silicon, check `slice2far` against the logic-location file, or replace the `x/2 + COL_BASE` line with a table for the target part.

## Where a flip-flop lives

The tools' logic-location file gives each flip-flop as a frame address plus a bit location 0..3231 within the frame. `bit_translation` turns the location into:

- word = location/32 − 1;
- bit = (location mod 32) − 1.

For example, 3160 gives word 97, bit 23. Locations below 32 are flagged out of range and nothing is flipped. If your tool's numbering differs, this formula is the one place to change.

## On-the-fly modification

The controller never reads the block RAM back to edit it. The read-back stream is written to RAM as it arrives from the ICAP (`rd_valid`, `rd_addr`, `rd_data`). Between the stream and the RAM's write port there is a multiplexer:

- **DPR_LUT.** When the word address equals (k+1)·101 + word offset, the word belongs to data frame k (k = 0..3). It is stored with the LUT's 16-bit half replaced by INIT word k.
- **DPR_FF.** When the address equals 101 + word position, the word is stored with one bit inverted.

This is why the translations run before the read starts, not after it:

- For DPR_LUT, slice2far and init2fw each take one cycle after `start`.
- For DPR_FF, bit_translation takes one cycle, while the DUT clock is still being stopped.

## Block RAM layout

The block RAM has 512 words of 32 bits: one 18 Kb RAM.

| words   | contents |
|---------|----------|
| 0-100   | the dummy frame of the last read |
| 101-504 | up to four data frames, in frame address order |

A LUT needs 5 × 101 = 505 words and a flip-flop needs 202. Reads may hold at most five frames including the dummy frame. Writes may send at most four frames.

## ICAP command sequences

`read_frame` and `write_frame` each drive the ICAP through a packet sequence. A multiplexer in the top chooses which FSM drives the ICAP, and an assertion checks that the two are never busy at the same time. The packet rules:

- Command and packet words go out with the bits of each byte reversed, as the ICAP expects.
- Frame data go out exactly as they were read.
- `csib` and `rdwrb` are the active-low ICAPE2 pins. `rdwrb` changes only in a cycle with the port deselected (`csib` = 1). `read_frame` checks this with an assertion.

**Read** (`read_frame`), in order:

1. dummy word, sync word, NOOP
2. CMD RCRC
3. CMD RCFG
4. FAR
5. type-1 read of FDRO, NOOP
6. type-2 read of N = 101·frames words
7. flush NOOPs
8. one deselected cycle while `rdwrb` turns to read
9. N read cycles
10. one deselected cycle while `rdwrb` turns back to write
11. CMD DESYNC and two NOOPs

Data arrive one cycle after each read cycle. A one-frame read (data + dummy) takes 239 cycles. Each further frame adds 101.

**Write** (`write_frame`), in order:

1. dummy word, sync word, NOOP
2. CMD RCRC, NOOP
3. IDCODE
4. CMD WCFG, NOOP
5. FAR
6. type-1 write of FDRI, NOOP
7. type-2 write of 101·(frames+1) words
8. the frames, then a pad frame of zeros that pushes the last frame out of the device's frame buffer
9. NOOP, CMD START
10. FAR set to the parking address, NOOP
11. CMD DESYNC
12. `TAIL_NOOPS` NOOPs

A one-frame write takes 237 cycles. Each further frame adds 101. No CRC word is sent, so the bitstream settings must disable the CRC check.

## Flip-flop rewrite (DPR_FF) step by step

1. bit_translation runs, and the DUT keeps its clock for `cap_cycle` more cycles. `cap_cycle` picks the cycle whose state is to be captured; 0 means stop at once.
2. `dut_clk_en` falls, which stops the DUT through a gated clock buffer. After two cycles, `cap` pulses once, so the CAPTURE primitive copies every unmasked flip-flop into its configuration cell. After two more cycles, the read starts.
3. The frame at `start_addr` is read with its dummy frame. The flip-flop's bit is inverted on the way into RAM.
4. The frame is written back with a pad frame.
5. `gsr` pulses for one cycle, so the STARTUP primitive loads the flip-flops from configuration memory. After `GSR_SETTLE` cycles, the DUT clock runs again.

GSR and capture reach every flip-flop whose region is not masked. The surrounding system must therefore load a partial bitstream with "reset after reconfiguration" for the DUT region first, so that the static logic is masked. This is done through PCAP by the processor. It is outside this RTL.

## Timing

| operation            | cycles here | reference figure |
|----------------------|-------------|------------------|
| read frame, 1 frame  | 239         | 239 |
| write frame, 1 frame | 237         | 237 |
| slice2far, init2fw, bit_translation | 1 each | 1 each |
| DPR_LUT              | 1084        | 1087 |
| DPR_FF (cap_cycle 0) | 487         | 487 (4.87 µs) |
| read BRAM            | 2           | not given |

The counts run from the cycle that samples `start` to `done`. Padding NOOPs in both FSMs bring the one-frame read and write to exactly the reference figures. DPR_LUT comes out three cycles shorter than its reference, because the main FSM adds fewer cycles between the steps than the reference design did. No padding was added for it.

## Departures and choices to be aware of

Each of these is an assumption that you may need to change for a real device:

- **Column rule.** The major column is linear in X (see the caution above).
- **Bottom-half row.** The bottom half's clock row is a parameter (`BOTTOM_ROW`, default 1). Some descriptions number the rows from zero in both halves.
- **Clock/ECC word.** It is taken as the 51st word of the frame (index 50).
- **Type-1 word counts.** The type-1 FDRI/FDRO packets carry word count 0. The real count is in the type-2 packet.
- **Packet values from the 7-series configuration guide.** The sync word is 0xAA995566. The parking FAR is 0x03BE0000. IDCODE defaults to the XC7Z020 code 0x03727093; change the `IDCODE` parameter for another part.
- **Status words.** The controller does not check ICAP status words. It assumes the port is free, synchronised and error-free.
- **Write count.** `num_frames` for a plain write counts the dummy frame, as it does for a read.
- **Fixed waits.** The waits around the clock stop and capture (2 + 2 cycles), the GSR settling wait (2) and the flush NOOPs are fixed choices, set by parameters.
- **Reset.** Reset is synchronous and active high. The block RAM contents are not reset.

## Files

The RTL is in `rtl/`:

| file | contents |
|------|----------|
| `vrz_pkg.sv` | shared constants, FAR struct, op codes, packet helpers |
| `vr_zycap.sv` | top and main FSM |
| `slice2far.sv` | slice/LUT location to frame address |
| `init2fw.sv` | INIT to frame words |
| `bit_translation.sv` | flip-flop bit location to word and bit |
| `frame_bram.sv` | the frame buffer |
| `read_frame.sv` | ICAP read FSM |
| `write_frame.sv` | ICAP write FSM |

The top brings out plain ports for the vendor primitives it needs, which you instantiate around it:

- `icap_*` for ICAPE2;
- `cap` for CAPTURE;
- `gsr` for STARTUP;
- `dut_clk_en` for a gated global clock buffer.

The testbenches are in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. `icap_cfg_model.sv` is a behavioural model of the ICAP and configuration memory, used only by the testbenches. It does the following:

- It parses the packets.
- It stores written frames and holds back the pad frame.
- It returns a dummy frame followed by the frame contents on read-back.
- It flags protocol errors, such as `rdwrb` changing while selected.
- It models one user flip-flop that toggles while the DUT clock runs, with CAPTURE and GSR.

`tb_vr_zycap` runs the whole controller at its default parameters:

- a read and a write;
- a read of every RAM word;
- eight LUT rewrites, including X50 Y50 LUTB, and the upper and lower halves of the same slice;
- two flip-flop rewrites, at two capture cycles.

It checks every frame of the model against independently computed values, and checks the cycle counts above. It also counts each mechanism and fails if one never happened: capture, GSR, clock stop, LUT edits, bit flips, pad frames and the ICAP hand-over.

To simulate, with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_vr_zycap \
  rtl/vrz_pkg.sv tb/tb_vr_zycap.sv
./obj_dir/Vtb_vr_zycap
```

The `-y` options let Verilator find the other modules by their file names. The package is named first so that it is compiled before its users. Replace the top module and the testbench file to run another testbench, for example `tb_read_frame`, `tb_write_frame`, `tb_slice2far`, `tb_init2fw`, `tb_bit_translation` or `tb_frame_bram`. Each runs in well under a second.
