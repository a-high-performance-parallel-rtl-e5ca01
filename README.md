# Parallel LFSR array with integrated clock gating

Several small linear feedback shift registers (LFSRs) run side by side in this design, and one
integrated clock gating (ICG) cell clocks all of them. The aim is low dynamic power. In a
flip-flop array, much of the switching comes from the clock itself. A register that is held with
a multiplexer feeding back its own output still toggles its clock pin every cycle. Here the whole
array hangs off one gated clock. In cycles where no register needs to change, no clock edge
reaches any of them, and no per-bit hold multiplexers are needed.

The default configuration has four 4-bit LFSRs, so 16 flip-flops, plus one latch-based clock gate.

## The LFSR (`rtl/lfsr.sv`)

Each register is a Fibonacci LFSR with **XNOR** feedback. On every rising clock edge it does:

    out <= {out[2:0], ~(out[3] ^ out[2])}

An asynchronous, active-high `rst` clears it to `0000`. With XNOR feedback, the all-zero state is
an ordinary member of the sequence, which is why a plain clear is a usable seed. The state the
register can never leave is `1111`, and it is never reached from `0000`. The sequence has the
maximal length of 15 states:

    0000 0001 0011 0111 1110 1101 1011 0110 1100 1001 0010 0101 1010 0100 1000 -> 0000 ...

`WIDTH` and `TAPS` (a bit mask of the tapped positions) are parameters. Their defaults, and the
shift order, the XNOR and the asynchronous clear, are those of the published design. If you
change `WIDTH`, you must also give a tap mask that is maximal-length for that width. The default
mask is only right for 4 bits.

## The clock gate (`rtl/clock_gating.sv`)

The obvious gate, `gclk = clk & en`, is unsafe. `en` is produced by logic clocked on the same
rising edge, so it changes, and may glitch, while `clk` is high. An AND gate would pass that
change through as an extra rising edge or a shortened pulse. The cell therefore has three parts:

1. `enable_in = enable | scan_enable`. The scan enable forces the clock on for test.
2. A latch that is **transparent while `clk` is low** and holds during the high phase.
3. `gclk = clk & enable_latch`.

While `clk` is high, the latch is closed, so nothing that happens to the enables then can affect
the pulse in progress. Each `gclk` pulse is either a complete copy of a `clk` pulse or absent.
The rule for the user: `enable | scan_enable` must be stable before the rising edge of `clk`
whose pulse it is meant to pass or block. In practice, that means settling within the low half
of the period.

The OR, the latch and the AND come from the published design. The latch polarity is not stated
there. Low-transparent is the only polarity for which an AND-type gate is glitch-free.

Another known glitch-free gate for rising-edge logic holds the clock *high* when disabled:
`gclk = clk | ~en`. It is not used here, because the published design uses the latch-and-AND
cell. Lint and synthesis tools report `enable_latch` as a latch. That is deliberate: it is the
storage element of the cell. In an ASIC flow, replace the cell with the library's ICG cell.

## The array (`rtl/lfsrfinal.sv`, top level)

`lfsrfinal` instantiates one `clock_gating` cell and `N_LFSR` copies of `lfsr`. All registers
share `rst` and the clock, so all `outn[i]` always carry the same value. `gclk` is also brought
out as a port.

| Port          | Dir | Width            | Meaning                                      |
|---------------|-----|------------------|----------------------------------------------|
| `clk`         | in  | 1                | free-running clock                           |
| `rst`         | in  | 1                | asynchronous active-high clear of all LFSRs  |
| `enable`      | in  | 1                | functional clock enable                      |
| `scan_enable` | in  | 1                | test clock enable (ORed with `enable`)       |
| `outn`        | out | `[N_LFSR][WIDTH]`| one word per LFSR                            |
| `gclk`        | out | 1                | gated clock                                  |

| Parameter         | Default | Meaning                                                  |
|-------------------|---------|----------------------------------------------------------|
| `N_LFSR`          | 4       | number of parallel LFSRs                                 |
| `WIDTH`           | 4       | bits per LFSR                                            |
| `GATE_LFSR_CLOCK` | 1       | 1: LFSRs run from `gclk`; 0: LFSRs run from `clk`        |

Timing with the default `GATE_LFSR_CLOCK=1`: every LFSR advances one state on each rising edge
of `clk` for which `enable | scan_enable` was high. In all other cycles the array holds its
state.

Shared constants (width, tap mask, LFSR count) live in `rtl/lfsr_pkg.sv`.

## Where this RTL departs from, or goes beyond, the published design

- **Clock of the LFSRs.** The design's description says the gated clock drives the LFSR array,
  and that is the default here. However, the published simulation of the four-register array
  shows the registers advancing while both enables are low, that is, running from the free
  clock. `GATE_LFSR_CLOCK=0` reproduces that behaviour. In that mode `gclk` is only an output.
- **Output ports.** The four outputs are one packed array, `outn[3:0]`, not four separate
  4-bit ports. This lets the count be a parameter.
- **Omitted block.** The published array also holds an auxiliary block with a clock and reset
  input and two 5-bit outputs (`lfsr`, `cnt`), whose function is not specified. It is not
  included. Its inputs would be the top's `clk` and `rst`.
- **Not covered.** The power, area and delay benefits claimed for clock gating are
  properties of a gate-level implementation. They are not checked by anything here.

## Testbenches (`tb/`)

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`. A watchdog stops a
run that hangs.

- `tb_lfsr`: compares 40 consecutive states with the 15-state table above. It checks the
  period, that `1111` never appears, and that an asynchronous clear in mid-period takes
  effect without a clock edge.
- `tb_clock_gating`: sets the enables at random before each rising edge, then toggles and
  glitches them during the high phase. It checks that `gclk` matches the enable sampled at
  the edge, that a pulse is never cut short, that `gclk` is low in the low phase, and that
  the number of `gclk` edges is exactly right.
- `tb_lfsrfinal`: the full default array, end to end. A reference model advances a table
  index only in enabled cycles. All four outputs are checked every cycle. The testbench counts,
  and requires, resets (including one in mid-run), cycles clocked by `enable`, cycles clocked
  by `scan_enable` alone, gated-off hold cycles, high-phase enable glitches and sequence
  wrap-around.
- `tb_lfsrfinal_free`: the same array with `GATE_LFSR_CLOCK=0`. The LFSRs must advance every
  cycle whatever the enables are, while `gclk` still follows them.

Running one with Verilator (5.x, timing support needed for the testbench delays):

    verilator --binary --timing --assert --top-module tb_lfsrfinal \
        -y rtl -y tb +libext+.sv rtl/lfsr_pkg.sv tb/tb_lfsrfinal.sv
    ./obj_dir/Vtb_lfsrfinal

Lint a module on its own:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/lfsr_pkg.sv rtl/lfsrfinal.sv

Each testbench finishes in well under a second.
