# XE / XS missing-energy trigger path with look-up-table arithmetic

This is synthesizable SystemVerilog for the missing-energy trigger logic of a
calorimeter trigger merger FPGA. Every bunch crossing, it takes the two components of the missing
transverse energy, Ex and Ey, and the total transverse energy ET. It makes two
8-bit words of threshold decisions from them:

* **XE hits**: ETmiss = sqrt(Ex² + Ey²) above each of 8 thresholds;
* **XS hits**: the *significance* ETmiss / sqrt(ET) above each of 8 thresholds.

The target FPGA (a Virtex-E class device) has no multipliers. All the
non-linear work is therefore done by look-up tables (LUTs) held in 4-Kbit
block RAMs, which software loads over VME. The design problem is to keep these
tables small. A LUT doubles in size for each address bit, but grows only
linearly with its output width. The key trick is a *floating-point-like range
select*. It keeps only 6 significant bits of each component plus a 2-bit
exponent. The exponent is applied again after the vector-sum LUT.

The default configuration sends a 7-bit ETmiss to the XS stage, so ETmiss/√ET
is resolved up to 127 GeV. The earlier 6-bit path saturates at 63 GeV. The other
widths (6, 6 with halved precision, 8, 9) are parameters.

## Data path

```
 ex[14:0] ─┐                 ┌──────────┐ met[6:0] ┌────────┐ {range,met}[8:0] ┌────────┐
 ey[14:0] ─┴─► range select ─►  MET LUT ├─────────►  range ├─────────────────►  XEH   ├─► xe_hits[7:0]
              │ ex6,ey6 (6+6)│  12 x 7  │          │ adjust │                  │ 9 x 8  │
              │ range[1:0] ──┼──────────┼─(delay)──►        ├──┐               └────────┘
              └──────────────┘          │          └────────┘  │ xs_met[XS_BITS-1:0]
 et[11:0] ──(reg)──► RET LUT 12 x 6 ── sqrt_et[5:0] ───────────┴──► XSH LUT (XS_BITS+6) x 8 ─► xs_hits[7:0]
```

| LUT | address | data | contents (chosen by software) | 4-Kbit blocks |
|-----|---------|------|-------------------------------|---------------|
| MET | {ex6, ey6}, 12 bits | 7 | vector sum of the two 6-bit windows | 7 |
| RET | et, 12 bits | 6 | √ET | 6 |
| XEH | {range, met}, 9 bits | 8 | bit i = met·2^range > XE threshold i | 1 |
| XSH | {xs_met, sqrt_et}, XS_BITS+6 bits | 8 | bit i = xs_met / sqrt_et > XS threshold i | 16 at 7 bits |

### Timing

There are three register stages. Range select registers Ex, Ey and ET (edge 1). The MET and RET
LUTs are read at edge 2. Range adjust is combinational and feeds the XEH and
XSH LUTs, which are read at edge 3. `xe_hits` and `xs_hits` therefore belong to the inputs
sampled three rising edges earlier. A new event is accepted every clock, with
no stalls. The LUT read ports are independent of the VME port, so the tables
can be read back, or rewritten, while the trigger runs. A word being rewritten
gives undefined hits for that clock.

## Range select and range adjust

This is the part that needs the most care.

**Range select** (`xs_range_select`) takes the 14-bit magnitudes of Ex and Ey
(the inputs are 15-bit two's complement; |−16384| is clamped to 16383). It ORs
the two magnitudes and finds the highest set bit. It then picks the smallest of four
windows that holds both:

| range | window | magnitudes covered | LSB |
|-------|--------|--------------------|-----|
| 0 | bits 5:0 | 0 – 63 | 1 |
| 1 | bits 6:1 | 64 – 127 | 2 |
| 2 | bits 7:2 | 128 – 255 | 4 |
| 3 | bits 8:3 | 256 – 511 | 8 |

Bits below the window are truncated. A magnitude of 512 or more does not fit.
Instead of raising an overflow flag, the block sends *saturated data*: range 3
with both windows at 63. This gives the largest ETmiss the tables can express,
which passes every sensible threshold. The block has a `sat` output for
monitoring, but the trigger path does not use it.

**Range adjust** (`xs_range_adjust`) receives the 7-bit vector sum `met`, which
is in units of 2^range, and serves two consumers:

* XE: `{range, met}` is used directly as the 9-bit XEH address. Any scaling is
  folded into the table contents, so there is no arithmetic on this side.
* XS: the XSH LUT needs ETmiss in plain GeV units, `XS_BITS` wide. It is
  saturated to all ones when the value does not fit:

| XS_BITS | XS_HALVE | xs_met | saturates when | ceiling |
|---------|----------|--------|----------------|---------|
| 6 | 0 | met[5:0] | met[6] or range ≠ 0 | 63 GeV |
| 6 | 1 | met[6:1] (2 GeV/count) | range ≠ 0 | 127 GeV |
| **7** | 0 | met | range ≠ 0 | **127 GeV** |
| 8 | 0 | met << range | range > 1 | 255 GeV |
| 9 | 0 | met << range | range > 2 | 511 GeV (nominal) |

The rules for 6 bits and for halved precision are those of the original
design. The rule for 7 to 9 bits is this implementation's generalisation: keep
every range whose shifted value still fits, and saturate above. Note what
"range ≠ 0" means. A component has reached 64 GeV, so the true ETmiss is at
least 64 GeV, but it can still be below the ceiling. At 7 bits such an event
is reported at 127 GeV. The XS stage then treats it as the largest ETmiss it
can see, not as its true value.

## The RAM budget, and why 7 bits

The device has 96 block RAMs. The readout (RoI and DAQ) buffers, which are not
part of this RTL, use 32 of them. The LUT cost per XS width is:

| XS_BITS | XSH | MET + RET + XEH | LUT total | spare |
|---------|-----|-----------------|-----------|-------|
| 6 | 12x8 → 8 | 14 | 22 | 42 |
| 7 | 13x8 → 16 | 14 | 30 | 34 |
| 8 | 14x8 → 32 | 14 | 46 | 18 |
| 9 | 15x8 → 64 | 14 | 78 | −14 |

Nine bits does not fit. Eight bits fits but leaves little headroom for future
readout bits. Seven bits is the conservative choice and is the default.
Widening XE itself to 8 bits plus range (MET 14x8, XEH 10x8) would need 72
LUT blocks and does not fit either; that variant is not built. The RTL's memory
bits are exactly these counts times 4096 (122 880 bits at the default).

## Loading the tables over VME

`xs_lut_ram` is a dual-port RAM with ports of different widths. The trigger port reads one location of `DW`
bits. The VME port reads and writes 16-bit words that each hold two adjacent
locations:

```
 15 | 14 ........ 8 | 7 | 6 ........ 0        (DW = 7, e.g. the MET LUT)
  0 | location 2w+1 | 0 | location 2w
```

Bits above `DW` in each byte have no RAM behind them. Writes to them are lost and
they read as zero, so software that verifies a load must mask them. For
the RET LUT (DW = 6) two bits per byte read zero. For XEH and XSH (DW = 8) the
bytes are full. This layout keeps the block-RAM count at DW·2^AW/4096.

Top-level VME addressing, which is this implementation's own choice:
`vme_addr = {lut_sel[1:0], word}`, where `lut_sel` is 0 MET, 1 RET, 2 XEH, 3 XSH (`xs_pkg::lut_sel_e`) and
`word` is `XS_BITS+5` bits wide. Word indices past the end of a smaller LUT
alias onto it. `vme_we` writes in one clock. `vme_re` returns the word on `vme_rdata`
one clock later, with `vme_rvalid`. Do not assert `vme_we` and `vme_re` in the same clock;
an assertion checks this.

## Top-level interface (`xs_trigger`)

| port | dir | width | |
|------|-----|-------|-|
| clk, rst_n | in | 1 | clock; synchronous active-low reset of the pipeline registers (LUT contents are not reset) |
| ex, ey | in | 15 | missing-energy components, two's complement |
| et | in | 12 | total ET |
| xe_hits, xs_hits | out | 8 | threshold hits, 3 clocks after the inputs |
| vme_we, vme_re | in | 1 | VME strobes |
| vme_addr | in | XS_BITS+7 | {LUT select, word} |
| vme_wdata / vme_rdata | in / out | 16 | VME data |
| vme_rvalid | out | 1 | vme_rdata valid |

Parameters: `XS_BITS` (6..9, default 7) and `XS_HALVE` (only with 6 bits).

## Where this RTL departs from, or adds to, the original design

* The pipeline depth (3 clocks) is a choice. The original uses multiphase
  clocks to absorb the extra LUT read, and that clocking scheme is not
  reproduced. Here everything runs on one clock.
* LUT address bit orders, the VME address map, the VME bus handshake and the
  reset are not from the original.
* Two's complement inputs, truncation in range select, and saturating both
  windows on overflow are assumptions.
* The generalised 7–9-bit XS rule (see the table above) is an assumption.
* LUT contents and thresholds belong to software. The testbenches use rounded
  vector sums and square roots and example thresholds.
* Not included: the readout buffering (RoI/DAQ), the VME master and its
  software, and the superseded first XE design, which used four parallel 12x8
  LUTs, one per range, followed by a multiplexer.

## Files

| file | |
|------|-|
| `rtl/xs_pkg.sv` | widths and the LUT-select enum |
| `rtl/xs_range_select.sv` | window/range selection with saturation |
| `rtl/xs_lut_ram.sv` | VME-loadable block-RAM LUT |
| `rtl/xs_range_adjust.sv` | XEH address and XS ETmiss with saturation |
| `rtl/xs_trigger.sv` | top: the full XE + XS path and VME decode |
| `tb/tb_xs_range_select.sv`, `tb/tb_xs_range_adjust.sv`, `tb/tb_xs_lut_ram.sv` | block tests |
| `tb/tb_xs_trigger.sv` | end-to-end test at the default size: loads all LUTs, 20 000 events |
| `tb/tb_xs_trigger_configs.sv`, `tb/xs_trigger_env.sv` | end-to-end tests of the 6, 6-halved, 8 and 9-bit configurations |

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. The
end-to-end tests also count how often each mechanism was exercised: the four
ranges, saturation in range select, XS saturation, XS ranges above 0, zero bits
on VME read-back, and back-to-back events. A count of zero is a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/xs_pkg.sv tb/tb_xs_trigger.sv --top-module tb_xs_trigger -o sim
./obj_dir/sim
```

To run another test, replace `tb_xs_trigger` with its name. Each run takes well under a
second. Lint the RTL with `verilator --lint-only -Wall -Irtl -y rtl rtl/xs_pkg.sv
rtl/xs_trigger.sv`.
