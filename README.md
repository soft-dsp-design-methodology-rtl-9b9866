# Soft DSP custom instruction for the iLBC start-state table

An iLBC (RFC 3951) speech decoder running on a small soft processor spends a
noticeable part of each frame in one tight loop of its start-state
reconstruction stage:

```c
for (k = 0; k < len; k++)          /* len = 240 (30 ms) or 160 (20 ms) */
    for (tmpi = 0; tmpi < 8; tmpi++)
        tmp[k][tmpi] = maxVal * state_sq3Tbl[tmpi];
```

Every iteration reads the same eight-entry table from external memory. The
"Soft DSP" idea is to avoid both a separate DSP coprocessor and a pure software
rewrite: a few gates placed next to the processor's ALU return the table
entry directly, and software calls them as an ordinary single-cycle
instruction (`CI(tmpi, 0)` instead of the memory load). The rest of the
decoder (bitstream parsing, LPC decoding, residual construction, enhancement,
synthesis, post filtering) stays in software on the processor.

This repository holds that hardware: the table-lookup custom instruction and
the ALU it is attached to.

## The table instruction (`state_sq3tbl`)

A purely combinational block with two 32-bit operands and a 32-bit result,
the port shape of a soft processor's combinational custom instruction:

| `dataa` | `datab` | `result` (signed) |
|---------|---------|-------------------|
| 0 | 0 | -4 |
| 1 | 0 | -2 |
| 2 | 0 | -1 |
| 3 | 0 | -1 |
| 4 | 0 | +1 |
| 5 | 0 | 0 |
| 6 | 0 | +2 |
| 7 | 0 | +4 |
| anything else | | 0 |

The values are a coarse integer stand-in for the standard's floating-point
quantiser table, as used by the reference software this hardware replaces;
note that they are not monotonic (entry 4 is +1, entry 5 is 0). They are
kept exactly as that software defines them. The whole table sums to -1, which
the end-to-end testbench uses as a frame checksum.

Departure: the original logic leaves the result undriven (high impedance) for
operands outside the table, relying on the processor never asking. Here such
operands return 0, so the block has a single driver and synthesizes as plain
logic.

## Where it sits: the Soft DSP ALU (`soft_dsp_alu`, top)

```
 data_a ──┬──────────────► +/-, <<, >>, &  ──┐
          │                                   ├─► result mux ─► result
 data_b ──┼──┬───────────► (ALU functions)  ──┤
          │  │                                │
          └──┴──► state_sq3tbl ───────────────┘
                                    op ──► select
```

Both operands fan out to the normal ALU functions and to the dedicated block
in parallel; the operation select picks one of their outputs. Nothing is
clocked: one operation completes per processor cycle, so a 30 ms frame needs
240 x 8 = 1920 custom-instruction cycles and a 20 ms frame 1280. There is no
storage in this logic; the products `tmp[k][tmpi]` are kept by software in
processor memory, and the multiply by `maxVal` uses the processor's own
multiplier, which is outside this datapath.

Operation encoding (`soft_dsp_pkg::alu_op_e`, chosen here; no encoding is
fixed by the architecture this follows):

| `op` | name | result |
|------|------|--------|
| 0 | `ALU_ADD` | `data_a + data_b` |
| 1 | `ALU_SUB` | `data_a - data_b` |
| 2 | `ALU_SLL` | `data_a << data_b[4:0]` |
| 3 | `ALU_SRL` | `data_a >> data_b[4:0]` (logical) |
| 4 | `ALU_AND` | `data_a & data_b` |
| 5 | `ALU_CUSTOM` | `state_sq3tbl(data_a, data_b)` |
| 6, 7 | — | 0 |

The ALU here is a model of the execute stage only, deliberately minimal: the
functions shown are the ones the architecture names (add/subtract, shift,
AND), not a complete processor instruction set. Fetch, decode, register file,
multiplier and memory interface belong to the host processor and are not
included. Only one custom instruction exists, so there is no custom
instruction number (`n`) input; a processor that hosts several would decode
`n` ahead of this mux.

Parameter: `DATA_W` (default 32) sets the operand/result width of both
modules.

## Files

| file | content |
|------|---------|
| `rtl/soft_dsp_pkg.sv` | `DATA_W`, table size, `alu_op_e` |
| `rtl/state_sq3tbl.sv` | the table custom instruction |
| `rtl/soft_dsp_alu.sv` | ALU with the custom instruction slot (top) |
| `tb/tb_state_sq3tbl.sv` | exhaustive table check and out-of-range operands |
| `tb/tb_soft_dsp_alu.sv` | end-to-end run of the start-state loop, full width |

## Simulating

Each testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`.

```sh
verilator --binary --timing -y rtl -Irtl rtl/soft_dsp_pkg.sv \
    tb/tb_soft_dsp_alu.sv --top-module tb_soft_dsp_alu -o sim
./obj_dir/sim

verilator --binary --timing -y rtl -Irtl rtl/soft_dsp_pkg.sv \
    tb/tb_state_sq3tbl.sv --top-module tb_state_sq3tbl -o sim_tbl
./obj_dir/sim_tbl
```

`tb_soft_dsp_alu` plays the processor: it runs the loop above for one
240-sample and one 160-sample frame with `maxVal = 200`, stepping the loop
counters with the ALU's own ADD and SUB so ordinary and custom operations
interleave as in compiled code. It checks every product against its own copy
of the table, the frame checksum (-len x maxVal), and that a frame takes
exactly 8 x len custom-instruction cycles. It then compares ADD, SUB, SLL,
SRL and AND against SystemVerilog operators on random operands, checks that
out-of-range custom calls return 0, and fails if any operation was never
exercised. It runs the top at its default parameters and finishes in well
under a second.

## How far to trust it

* The table contents, port names and widths, the select condition
  (`dataa` 0..7 with `datab` 0) and the single-cycle combinational behaviour
  follow the original custom-instruction design.
* The ALU around it follows only the block-level arrangement (operands
  shared by ALU and dedicated logic, one result mux). Its encoding, its
  logical right shift and its shift-amount field are choices made here.
* The reported benefit of the instruction (about 38 ms less processor time
  per 240-sample frame, 1043.07 ms down to 1005.25 ms for the measured loop)
  is a whole-system software timing and cannot be reproduced from this RTL
  alone.
* Not included: the processor itself and the other decoder stages, which
  run as software.
