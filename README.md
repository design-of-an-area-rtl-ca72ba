# A three-stage pipelined MQ encoder

This is synthesizable SystemVerilog for the context-based binary arithmetic
encoder of JPEG2000 (the "MQ coder"). It codes one (context, decision) pair
per clock cycle. The data it produces is byte-for-byte the same as the
sequential encoder of JPEG2000 Part 1.

The MQ coder is hard to pipeline because renormalisation takes a variable
number of steps. After each decision the interval register `A` must be
doubled until it is at least 0x8000, and this can take anywhere from 0 to 15
steps. Every 8 steps (7 after a 0xFF byte) a byte leaves the code register
`C`. A straightforward design loops for a variable number of cycles. This
design follows the area-efficient architecture of Yu and Hu and takes a
different approach:

* **Renormalisation is one barrel shift.** The shift count is the number of
  leading zeros of the new `A`, so `A` leaves stage 2 already normalised.
* **Two byte-out circuits in cascade.** They handle every byte boundary that
  the shift of `C` can cross in one cycle. The intermediate sum
  `SC = C + Qe` is handed to them directly.
* **A single-cycle BYTEOUT.** The sequential "increment B, then test it for
  0xFF" is rewritten as parallel tests on `B` and `C[27]`.

## Coder state

| Register | Bits | Meaning |
|---|---|---|
| `A` | 16 | current interval size, kept in [0x8000, 0xFFFF] between decisions |
| `C` | 28 | interval base; bit 27 is the carry into the pending byte |
| `B` | 8 | pending output byte, which a later carry may still increment |
| `CT` | 4 | code bits left before the next byte boundary (12 at start, then 7 or 8) |

Each context (19 of them, as in JPEG2000 EBCOT) stores a probability-state
index `I` (0..46) and its more-probable-symbol sense `MPS`. The 47-row
probability table gives four values for each state:

* `Qe`: the LPS sub-interval;
* `NMPS`: the next state after an MPS that renormalises;
* `NLPS`: the next state after an LPS;
* `SWITCH`: set when an LPS flips the MPS.

The table contents and the context start states (context 0 at state 4,
context 17 at state 3, context 18 at state 46, all others at 0) are those of
the JPEG2000 standard.

Coding one decision:

* **MPS** (`D == MPS`): `A = A - Qe` and `C = C + Qe`.
* **LPS** (`D != MPS`): `A = Qe` and `C` is unchanged.
* **Conditional exchange.** When the MPS sub-interval `A - Qe` is smaller
  than `Qe`, the two sub-intervals swap roles. This is needed for
  compatibility with the standard.

## Pipeline

| Stage | Module | Work in the cycle | Register at the end |
|---|---|---|---|
| 1 | `mq_context_update` | read `I`, `MPS` of `CX` (forwarded if stage 2 updates the same context this cycle); look up `Qe`, `NMPS`, `NLPS`, `SWITCH`; `lps = D ^ MPS` | stage-1 record (`stage1_t`) |
| 2 | `mq_interval_subdiv` | `A - Qe`, exchange, new `A`, leading-zero count `s`, `A << s`; `SC = C + (Qe or 0)` through a carry-select adder; context update | `A`, `C`, `CT` |
| 2/3 | `mq_data_formation` | byte-out circuits B1, B0 on `SC`; the next `C` and `CT` go back to stage 2 | `B`, FIFO write |
| 3 | `mq_fifo` | 4 x 8 buffer with two write ports | FIFO entries |

The byte-out circuits run in the same cycle as the `A`/`C` update. They
cannot be a full stage later, because the mask applied to `C` after a
byte-out depends on whether `B` is 0xFF.

### Renormalisation and the byte-out cascade

Stage 2 produces the sum `SC` and the shift `s`, which is at most 15.
`mq_data_formation` then follows the renormalisation loop of the standard,
but handles each byte boundary as a block:

```
if s < CT:            C' = SC << s,                CT' = CT - s            (no byte)
else  B1 on SC << CT  -> C1, CT1 (7 or 8);   r1 = s - CT
  if r1 < CT1:        C' = C1 << r1,               CT' = CT1 - r1          (one byte)
  else B0 on C1 << CT1 -> C0, CT0;   r2 = r1 - CT1
                      C' = C0 << r2,               CT' = CT0 - r2          (two bytes)
```

Two circuits are always enough:

* Two byte-outs need `s >= CT + CT1 >= 8`. The rest, `r2 = s - CT - CT1`, is
  at most 7.
* `r2` can reach 7 only if `CT = 1` and `CT1 = 7`. In that case the byte
  loaded by B1 follows a 0xFF byte, so it is at most 0x8F. B0 therefore
  reloads `CT0 = 8`, and `CT'` never reaches 0.

An assertion in `mq_data_formation` checks this.

### The single-cycle byte-out (`mq_byteout`)

The sequential BYTEOUT procedure works in this order:

1. Test `B == 0xFF`.
2. Test `C < 0x8000000`.
3. Increment `B`.
4. Test `B == 0xFF` again.

The circuit takes all of these decisions at once from the shifted code value
`Cs = C << m`:

* `carry = Cs[27] & (B != 0xFF)`. The finished byte is `B + carry`. The
  conditional increment becomes an unconditional add of one bit.
* **7-bit case** (bit stuffing), when `B == 0xFF`, or when `B == 0xFE` and a
  carry arrives (the second 0xFF test moved before the increment):
  * new byte `= Cs[27:20]`, where `Cs[27]` is 0 if the carry went into `B`;
  * `C` keeps bits 19..0;
  * `CT = 7`.
* **8-bit case** otherwise:
  * new byte `= Cs[26:19]`;
  * `C` keeps bits 18..0;
  * `CT = 8`.

After a 0xFF byte the top bit of the next byte is the stuffed bit. A later
carry can still set it, so bytes 0x80..0x8F can follow 0xFF (the JPEG2000
decoder expects this).

Each byte-out sends the byte it finishes to the FIFO. The only exception is
the first byte-out after start: the empty initial byte is discarded.

### Context forwarding

An MPS changes its context's state only if it renormalises, and that depends
on `A` in stage 2. Stage 2 therefore issues the context update, and the
memories are written at the end of that cycle. In the same cycle stage 1 may
be reading the same context for the next pair. In that case the new state is
forwarded around the memory, so pairs of one context can follow each other
in consecutive cycles.

### Flush

After the last pair the encoder sets the low bits of `C` (SETBITS):

* `C | 0xFFFF`;
* or, if that is not below `C + A`, `C` with its low 16 bits set to 0x7FFF.

It then performs two byte-outs, using both circuits in one cycle. In the
next cycle it writes the pending byte, unless that byte is 0xFF.

## Interface and timing (`mq_encoder`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | when idle, starts a message: `A=0x8000`, `C=0`, `CT=12`, `B=0`, contexts reset, FIFO cleared |
| `in_valid`, `in_ready`, `in_cx[4:0]`, `in_d` | in/out/in/in | one (CX, D) pair per cycle while `in_ready` is high |
| `flush_req` | in | end of message; taken in a cycle with `in_ready` high (after a pair offered in the same cycle) |
| `out_valid`, `out_ready`, `out_byte[7:0]` | out/in/out | compressed bytes in order |
| `busy`, `done` | out | `busy` runs from `start` until the codeword has been read out; `done` pulses then |
| `ev_*` | out | one-cycle strobes for observation: `stall`, `fwd_hit`, `renorm`, `exchange`, `carry`, `stuff`, `byteout`, `two_byteouts` |

Timing:

* A pair accepted in cycle t is coded in stage 2 in cycle t+1. Its bytes can
  be read from cycle t+2.
* With a consumer that is always ready, throughput is one pair per clock.
* Back-pressure applies only when fewer than two FIFO entries are free (a
  cycle can write two bytes). The whole pipeline then holds and `in_ready`
  drops. The compressed stream averages well under one byte per pair, so with
  a consumer that takes one byte per cycle the FIFO stays nearly empty and
  stalls are rare.

The control unit (`mq_control`) is a six-state machine: IDLE, RUN, DRAIN,
FLUSH, FINAL, DONE.

## Files

| File | Contents |
|---|---|
| `rtl/mq_pkg.sv` | widths, start values, structs, context start states |
| `rtl/mq_prob_rom.sv` | ROM_Qe, ROM_MPS (NMPS), ROM_LPS (NLPS), ROM_SW |
| `rtl/mq_context_mem.sv` | RAM_I and RAM_MPS, 19 entries |
| `rtl/mq_context_update.sv` | stage 1 |
| `rtl/mq_csel_add.sv` | carry-select adder for `C + Qe` (16-bit low part, 12-bit upper part selected by the carry) |
| `rtl/mq_interval_subdiv.sv` | stage 2 |
| `rtl/mq_byteout.sv` | one single-cycle byte-out circuit |
| `rtl/mq_fifo.sv` | 4 x 8 FIFO, two write ports |
| `rtl/mq_data_formation.sv` | byte-out cascade, flush, `B`, FIFO |
| `rtl/mq_control.sv` | control unit |
| `rtl/mq_encoder.sv` | top level |
| `tb/mq_ref_pkg.sv` | sequential reference encoder written from the flow charts of the standard |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. The end-to-end test `tb_mq_encoder` runs the top level
with its default parameters. It encodes about 420 messages of 1 to 4,200
pairs, ranging from uniform to extremely skewed statistics, with a consumer
that throttles at random. It compares every byte and the codeword length
with the reference model and checks the one-pair-per-cycle rate. It also
requires each of the following to happen at least once:

* a stall;
* context forwarding;
* renormalisation;
* conditional exchange;
* a carry;
* bit stuffing;
* single and double byte-outs in one cycle;
* a carry into the stuffed bit after 0xFF.

The module tests check:

* the probability table against the reference model's copy;
* the byte-out circuit against the sequential BYTEOUT on random inputs;
* stage 2 decision by decision against the reference model;
* the data formation module with the testbench standing in for stage 2;
* the context memory, the FIFO, the adder and the control sequence on their
  own.

To run one test with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mq_pkg.sv tb/mq_ref_pkg.sv \
          tb/tb_mq_encoder.sv --top-module tb_mq_encoder
./obj_dir/Vtb_mq_encoder
```

For the other tests, replace `tb_mq_encoder` with the test's name. The full
end-to-end test takes about a second.

## Departures and own choices

The following are taken from the published architecture:

* the three modules and their contents: four ROMs, two RAMs, two byte-out
  circuits, flush hardware and a 4 x 8 FIFO;
* the register widths;
* the single-shift renormalisation by leading-zero count;
* the byte-out simplifications;
* the carry-select adder.

The following are design choices made here:

* **Table contents and start values.** The probability table, the
  context start states and the start values `A=0x8000`, `C=0`, `CT=12` come
  from the JPEG2000 standard, which the architecture is built to match.
* **Conditional exchange.** The simple MPS/LPS subdivision of the
  architecture's overview (A - Qe / Qe) is extended with the standard's
  conditional exchange. Without it the output would not be compatible.
* **Top bit of the byte after 0xFF.** The byte-out block diagram clears the
  new byte's top bit in both 7-bit cases. This design clears it only where
  the carry was absorbed by a 0xFE byte. It keeps it after a 0xFF byte, as
  the BYTEOUT procedure does; otherwise late carries after 0xFF would be
  lost.
* **Registers and timing.** Where the pipeline registers sit, the
  valid/ready handshakes, the `start`/`flush_req`/`done` protocol, the
  two-cycle flush, the control unit's states and the stall rule are all
  chosen here.
* **Context forwarding.** The forwarding path in stage 1 is this design's
  way of keeping back-to-back decisions of one context exact.
* **Decision input.** The block diagram routes `D` into the control unit.
  Here it goes to stage 1, where it is compared with the MPS.
* **`ev_*` outputs.** These ports exist only for observation.

Not covered:

* The published area (about 6K gates) and clock rate (250 MHz in a 0.18 um
  process) depend on a standard-cell library and synthesis flow. They are
  not reproduced or checked here.
* The JPEG2000 codestream's termination options beyond the basic flush
  (for example, removing trailing 0xFF bytes) are not implemented.
