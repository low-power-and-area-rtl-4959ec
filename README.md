# 32-bit carry-select adder with Binary-to-Excess-1 converters

A ripple carry adder is slow because every bit has to wait for the carry from
the bit below it. A carry-select adder (CSLA) avoids most of that wait. It cuts
the word into sectors and works out each sector's result for both possible
incoming carries in advance. When the real carry arrives, a multiplexer picks
the right result. The classic CSLA pays for this with a second ripple carry adder (RCA)
in every sector, one with carry-in 0 and one with carry-in 1.

This design drops the second RCA. The result with carry-in 1 is just the
result with carry-in 0 plus one. A **Binary to Excess-1 Converter (BEC)**
adds one with an inverter, a row of XORs and a chain of ANDs. That takes fewer
gates than a full-adder chain and switches less. So each upper sector is
one RCA with carry-in 0, one BEC and one multiplexer.

```
 a,b[3:0]  a,b[7:4]                     a,b[31:28]
    |         |                             |
  [RCA]--c1--[RCA cin=0]->{c,s}--+-------- ...  (same for each sector)
    ^   ci      |                 |
    ci          +--[BEC +1]--+    |
                |            |    |
              (0)          (1)    |
               [  mux, sel = c1 ] -> {c2, s[7:4]}
```

## The Binary to Excess-1 Converter

`rtl/bec.sv` computes `x = b + 1` modulo 2^WIDTH. For the 4-bit converter:

| output | logic                 |
|--------|-----------------------|
| X0     | ~B0                   |
| X1     | B1 ^ B0               |
| X2     | B2 ^ (B1 & B0)        |
| X3     | B3 ^ (B2 & B1 & B0)   |

Bit i flips exactly when all bits below it are 1, so `0000 -> 0001`,
`1110 -> 1111` and `1111 -> 0000`. The module takes any WIDTH and builds the
AND terms as a running prefix, one two-input AND per bit.

`rtl/bec_mux.sv` is the converter with its word multiplexer. Input `0` is `b`
unchanged, input `1` is the BEC output, and `cin` selects. At WIDTH 4 it is a
4-bit BEC with an 8:4 multiplexer.

## How a sector produces its carry-out

`rtl/csla_bec_sector.sv` adds `a + b` with carry-in 0 in a SECTOR-bit RCA.
That gives a (SECTOR+1)-bit value `{c0, s0}`. The BEC is **one bit wider than
the sector** and takes `{c0, s0}`. Its top output bit is then the carry-out for
carry-in 1: it is set when `c0` is set or when `s0` is all ones. The multiplexer
therefore selects sum and carry-out together. The sector's carry-out drives the
select of the next sector.

The widening is this implementation's own choice. The converter as usually
drawn covers only the sum bits and leaves the sector carry-out open.

## Top level: `csla_bec`

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH`   | 32      | operand width |
| `SECTOR`  | 4       | bits per sector; WIDTH must be a multiple |

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | operands |
| `ci` | in | 1 | carry-in |
| `s`  | out | WIDTH | sum |
| `co` | out | 1 | carry-out |

`{co, s} = a + b + ci`. The adder is purely combinational, with no clock,
registers or reset.

Sector 0 (bits 3:0) is a plain RCA fed by `ci`. Sectors 1 to 7 are
`csla_bec_sector` instances. Every sector settles in parallel, after one
4-bit ripple plus one BEC in the upper sectors. After that the carry crosses
each upper sector through a single multiplexer. The critical path is therefore
about one 4-bit RCA, one 5-bit BEC and seven 2:1 multiplexers. A 32-bit RCA
would instead need 31 carry stages.

The sectors are eight equal 4-bit slices. This is a choice: the 4-bit slice
matches the 4-bit converter the design is built around. A square-root
grouping, with sectors growing toward the MSB, would balance the ripple time
of each sector against the arrival of its select. It would shorten the path
further, but the design gives no sector sizes for it. Changing `SECTOR` (for
example to 8) is the only edit needed for other equal slicings.

In the published FPGA evaluation (Xilinx Virtex xcv50, speed grade -5), this
BEC adder showed 36.876 ns of delay, against 51.536 ns for the CSLA with two
RCAs per sector. It also drew less power. Those are synthesis results and are
not reproduced here.

## Module hierarchy

```
csla_bec                     rtl/csla_bec.sv
├── rca (sector 0)           rtl/rca.sv
│   └── full_adder ×4        rtl/full_adder.sv
└── csla_bec_sector ×7       rtl/csla_bec_sector.sv
    ├── rca (carry-in 0)
    │   └── full_adder ×4
    └── bec_mux (WIDTH 5)    rtl/bec_mux.sv
        └── bec (WIDTH 5)    rtl/bec.sv
```

The full adder is the textbook cell: `s = a ^ b ^ ci`,
`co = a&b | (a^b)&ci`.

## Where this departs from, or goes beyond, the source design

- Eight equal 4-bit sectors. The source gives no sector sizes.
- The BEC is widened to SECTOR+1 bits so that it also produces the sector carry-out.
- The source names CI and CO ports but does not define their handling. Here
  `ci` feeds sector 0 and `co` is the carry out of sector 7.
- The carry-skip adder and the two-RCA carry-select adder appear only as
  baselines in the source, so neither is included.

## Testbenches

Every testbench checks the block against integer arithmetic computed in the
testbench. Each prints `TB_RESULT checks=N failures=M` and has a
cycle-count watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb/tb_full_adder.sv` | all 8 input combinations |
| `tb/tb_rca.sv` | all 512 inputs at WIDTH 4; random inputs and a full ripple at WIDTH 9 |
| `tb/tb_bec.sv` | the 0000/0001/1110/1111 rows written out; every input at WIDTH 4 and 5 |
| `tb/tb_bec_mux.sv` | all 16 inputs with both selects |
| `tb/tb_csla_bec_sector.sv` | all 512 inputs. Counts BEC selections and BEC carry-outs |
| `tb/tb_csla_bec.sv` | top at default parameters, described below |

The top-level test runs the operand pairs of a reference waveform, for example
3333 + 2222 = 5555 and 40 + 56 = 96, plus corner cases and 20 000 random
additions. It checks every result. For every addition it also checks the
carry each sector's multiplexer receives, through a hierarchical reference to
`dut.c`. It then requires every upper sector to have taken both the BEC path
and the direct path. A carry must also cross all eight sectors at least once,
and the adder must carry out at least once.

Running a testbench with plain Verilator, from the folder above `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/tb_csla_bec.sv \
          --top-module tb_csla_bec -o sim
./obj_dir/sim
```

Every test finishes in well under a second.
