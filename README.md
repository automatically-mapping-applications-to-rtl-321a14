# A self-reconfiguring FIR filter built from tunable LUTs

Many circuits have a few inputs that change far more slowly than the rest:
the coefficients of an adaptive filter, the select lines of a multiplexer,
a key, a mode. A generic circuit treats them like any other input and pays
for it in area: a filter with loadable coefficients needs real multipliers.
If the circuit lives in an SRAM FPGA, there is another option. Fold each
slow input (a *parameter*) into the truth tables of the LUTs it affects, so
that it disappears from the datapath, and rewrite those truth tables when
the parameter changes. The circuit then always runs in a version
specialised for the current parameter values.

A LUT whose truth table is a function of parameters is a **tunable LUT
(TLUT)**. Each of its 16 truth-table bits is a Boolean function of the
parameters, a **tuning function**. Retuning means evaluating the tuning
functions for the new parameter values and writing the results into the
LUTs' configuration bits. Only the truth tables change: placement and
routing stay fixed, so no synthesis or place-and-route happens at run time.

This repository holds the fabric side of such a platform, as synthesizable
SystemVerilog:

- `tlut4`: a 4-input LUT with a run-time-writable truth table;
- `fir_tlut`: an adaptive 32-tap FIR filter (8-bit samples and coefficients,
  one sample per clock) whose coefficients exist only as TLUT truth tables;
- `mux6_tlut`: a small worked example, a 6:1 multiplexer whose three select
  lines are folded into two TLUTs;
- `hwicap` and `icap_port`: the path by which an embedded processor rewrites
  truth tables: a bus peripheral with a buffer, and a configuration port that
  decodes a byte stream into LUT writes;
- `srp_top`: all of it wired together.

The processor that computes new truth tables is not part of the RTL. The
end-to-end testbench plays its part (see *The processor's side*).

## Tunable LUTs and tuning functions: the 6:1 multiplexer

The multiplexer is the clearest way to see the idea. It has data inputs
I0..I5, selects S2..S0 and one output O. Mapped in the ordinary way onto
4-input LUTs it needs four LUTs, because the three selects use up LUT pins.
With S2..S0 as parameters, only the six data inputs remain as real signals,
and two LUTs are enough:

```
 I3 I0 I1 I2                 (msb .. lsb)
  |  |  |  |
 +----------+
 |    L1    |  stores NOT(I[{S1,S0}]), the inverted choice among I0..I3
 +----------+
       |        0  I4 I5
       |        |  |  |
 +----------------------+
 | (unused) L1  I4  I5  |  L0   (msb pin unused, tied to 0)
 +----------------------+
            |
            O
```

For each select value S the processor writes two 16-bit truth tables. Entry
`r` of a table is the LUT output when its pins, read as a binary number, equal
`r`. As functions of the selects (overbar written `~`, `+` is OR):

| r  | L1                  | L0 (r and r+8)         |
|----|---------------------|------------------------|
| 0  | 1                   | ~S2                    |
| 1  | ~S1 + S0            | S1 + S0 + ~S2          |
| 2  | S1 + ~S0            | ~S1·~S0 + ~S2          |
| 3  | ~S1·~S0 + S1·S0     | 1                      |
| 4  | S1 + S0             | 0                      |
| 5  | S0                  | S1·S2 + S0·S2          |
| 6  | S1                  | ~S1·~S0·S2             |
| 7  | S1·S0               | S2                     |
| 8  | ~S1 + ~S0           |                        |
| 9  | ~S1                 |                        |
| 10 | ~S0                 |                        |
| 11 | ~S1·~S0             |                        |
| 12 | S1·~S0 + ~S1·S0     |                        |
| 13 | ~S1·S0              |                        |
| 14 | S1·~S0              |                        |
| 15 | 0                   |                        |

L1 holds the *inverted* choice among I0..I3 and L0 inverts it back, which is
why entry 0 of L1 is 1. With these tables, O = I[S] for S = 0..5, and O = I5
for S = 6 and 7. The L0 column repeats every 8 rows because its top pin is
unused. `mux6_tlut` is exactly this two-LUT circuit; the tables above are
evaluated in the testbench package (`srp_tb_pkg::mux6_tt_l1`, `mux6_tt_l0`).

The LUT itself (`tlut4`) is a 16-bit register and a 16:1 selection. All LUTs
of the design share one configuration-write record, `lut_cfg_t = {we, addr,
tt}`. A LUT whose `ADDR` parameter matches takes the new truth table on the
clock edge where `we` is high, and uses it from the next cycle on. After reset
each LUT holds its `INIT` parameter (all zero by default), which stands for
the configuration loaded at power-up.

## The adaptive filter

```
y[n] = sum_{k=0}^{31} c_k * x[n-k]      x, c_k: signed 8-bit; y: signed 21-bit
```

`fir_tlut` is a direct-form filter: a 32-sample delay line (`x_q[0]` is the
newest sample), one multiplier per tap, and a pipelined adder tree. The delay
line shifts only when `in_valid` is high. There is no coefficient register
and no coefficient input anywhere in it.

### Tap multiplier (`kcm_tlut`)

Each tap multiplies by a constant that lives only in truth tables. The
sample is split into two 4-bit slices:

- the low slice `x[3:0]`, read as unsigned (0..15);
- the high slice `x[7:4]`, read as signed (-8..7).

Each slice drives the four inputs of twelve TLUTs. TLUT `b` of a slice
outputs bit `b` of the 12-bit signed partial product `slice * c`. Twelve
bits are enough because both ranges, -1920..1905 and -1016..1024, fit in 12
signed bits. The multiplier then only adds:

```
p = (pp_hi << 4) + pp_lo        (16-bit signed, exact for every 8x8 signed pair)
```

The tuning function for entry `n` of TLUT `b` in slice `s` is

```
tt[n] = bit b of ( v(n) * c ),   v(n) = n                     for s = 0 (low)
                                 v(n) = n - 16 if n >= 8 else n   for s = 1 (high)
```

(`srp_tb_pkg::kcm_tt`). A tap therefore costs 24 TLUTs, and the whole filter
768. Changing one coefficient means rewriting that tap's 24 truth tables.
The other taps are untouched.

### Pipeline and latency

| stage | register                                |
|-------|-----------------------------------------|
| 0     | delay line (the sample is taken)        |
| 1     | partial products of every tap           |
| 2     | tap products                            |
| 3..7  | adder tree, one level per register      |

`y` comes out with `out_valid` **2 + log2(TAPS) clock edges** after the edge
that takes the sample: 7 for 32 taps. The filter accepts one sample per clock.
The adder tree (`adder_tree`) pads its operands to a power of two, so other
tap counts work too.

### Retuning while running

The filter keeps running while its truth tables are being rewritten, one LUT
per clock at most. Outputs computed during an update mix old and new
coefficients; once the last truth table is written, every output uses the new
ones. Nothing in the filter marks that window: whoever retunes it knows when
the transfer ends. The end-to-end testbench does not compare outputs of
samples taken inside that window.

## The reconfiguration path

```
processor --OPB--> hwicap --(ce_n, write_n, 8-bit byte)--> icap_port --lut_cfg_t--> every TLUT
```

### Configuration stream (`icap_port`)

`icap_port` takes one byte per clock when `ce_n` and `write_n` are both low.
Outside a stream it only looks for the sync word `AA 99 55 66`; every other
byte is dropped. Inside a stream it collects 4-byte records:

```
addr[15:8]  addr[7:0]  tt[15:8]  tt[7:0]
```

On the fourth byte of each record it issues one write to the LUT at `addr`.
A record with address `FFFF` ends the stream. The port never stalls.
`in_stream` shows whether it is inside a stream.

LUT address map (`srp_pkg`):

| LUTs                                   | address                          |
|----------------------------------------|----------------------------------|
| filter tap `k`, slice `s`, bit `b`     | `24*k + 12*s + b` (0 .. 767)     |
| multiplexer L1, L0                     | `0x400`, `0x401`                 |

### HWICAP peripheral (`hwicap`)

The HWICAP is an OPB slave with a 2 KiB buffer. Offsets are from
`BASE_ADDR`, which defaults to `0x4120_0000`:

| offset        | register | access                                                              |
|---------------|----------|---------------------------------------------------------------------|
| 0x000 - 0x7FF | buffer   | read/write, 512 words                                               |
| 0x800         | SIZE     | read/write, bytes to send (clamped to 2048; 0 sends nothing)        |
| 0x804         | CTRL     | write bit 0 = 1 to start; ignored while busy                        |
| 0x808         | STATUS   | bit 0 busy; bit 1 done (set at the end, cleared by the next start)  |

Once started, the engine sends `SIZE` bytes from the buffer on consecutive
clocks, most significant byte of each word first. The first byte goes out in
the clock after the start is taken (the clock in which the start's bus
acknowledge is high). A stream longer than the buffer is sent as several
fills. Each fill in this design is a complete stream, so one fill carries at
most 510 records.

Bus side, simplified from the OPB: the master raises `opb_select` with
`opb_rnw`, `opb_abus` and (for a write) `opb_dbus`, and holds them until
`sl_xferack`. The peripheral acknowledges in the cycle after it sees a select
to its 4 KiB window. `sl_dbus` carries read data during the acknowledge and
is zero otherwise, so it can be ORed onto a shared bus. Assertions check that
an acknowledge always follows a select and lasts one cycle. Byte enables,
retry and time-out signals are not modelled.

### The processor's side

To retune the filter, the software:

1. evaluates `kcm_tt` for the 24 TLUTs of every tap whose coefficient changed;
2. packs them into streams of at most 510 records (sync word, records, end
   record);
3. for each stream, writes it into the buffer, writes SIZE, writes CTRL = 1,
   and polls STATUS until `done`.

A full update of all 32 taps is 768 records, or 3,088 bytes in two fills (2,048 + 1,040).
The transfer takes about 3,088 clocks on the ICAP side (about 62 µs at a
50 MHz bus clock), plus the time the software needs. On a real processor the
software (evaluating tuning functions, bus writes and polling) dominates the
update time, not the byte transfer.

## Top level (`srp_top`)

`srp_top` brings out:

- the HWICAP's OPB slave port;
- `cfg_busy` and `cfg_in_stream`;
- the filter's `fir_in_valid`/`fir_x` and `fir_out_valid`/`fir_y`;
- the multiplexer's `mux_i`/`mux_o`.

Everything runs on one clock, with an asynchronous active-low reset.
Parameters: `TAPS` (32), `HWICAP_BASE`, and `YW` (output width,
`16 + log2(TAPS)`).

## Files

| file                  | contents                                                       |
|-----------------------|----------------------------------------------------------------|
| `rtl/srp_pkg.sv`      | LUT geometry, write record, stream constants, address and register maps |
| `rtl/tlut4.sv`        | tunable 4-input LUT                                            |
| `rtl/mux6_tlut.sv`    | two-TLUT 6:1 multiplexer                                       |
| `rtl/kcm_tlut.sv`     | tap multiplier from 24 TLUTs                                   |
| `rtl/adder_tree.sv`   | pipelined adder tree                                           |
| `rtl/fir_tlut.sv`     | the filter                                                     |
| `rtl/icap_port.sv`    | configuration port                                             |
| `rtl/hwicap.sv`       | OPB peripheral with buffer and transfer engine                 |
| `rtl/srp_top.sv`      | top level                                                      |
| `tb/srp_tb_pkg.sv`    | tuning functions, stream packing, reference functions          |
| `tb/mux6_sim_model.sv`| multiplexer TLUT circuit with the selects as inputs            |
| `tb/tb_*.sv`          | one self-checking testbench per module, plus `tb_srp_top`      |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
It has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_srp_top \
    -y rtl -y tb +libext+.sv rtl/srp_pkg.sv tb/srp_tb_pkg.sv tb/tb_srp_top.sv
./obj_dir/Vtb_srp_top
```

Replace `tb_srp_top` with `tb_tlut4`, `tb_mux6_tlut`, `tb_kcm_tlut`,
`tb_fir_tlut`, `tb_icap_port` or `tb_hwicap` for the unit tests. Lint a
module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/srp_pkg.sv rtl/<module>.sv`.

What the tests check:

- `tb_tlut4`: reset value; writes to other addresses are ignored; random
  tables take effect the next cycle, for all 16 inputs.
- `tb_mux6_tlut`: for every select value, the table above gives O = I[S]
  for all 64 data patterns. The configured hardware also matches
  `mux6_sim_model`, a simulation model of the same TLUT circuit in which the
  selects stay real inputs and the truth tables are computed from them on the
  fly.
- `tb_kcm_tlut`: all 256 samples times 15 coefficients (the extremes
  included), and the 2-cycle latency.
- `tb_fir_tlut`: three coefficient sets against a direct convolution, with
  random gaps in `in_valid`, and the 7-cycle latency.
- `tb_icap_port`: random streams among junk bytes, a near-miss sync word,
  and half-enabled cycles.
- `tb_hwicap`: buffer read-back, byte order, exact byte count, transfers on
  consecutive clocks, start latency, start-while-busy, SIZE = 0, and
  accesses outside the window.
- `tb_srp_top`: the whole path at full size. It retunes the multiplexer
  for all 8 selects, then fully configures the filter (two buffer fills).
  Next come four partial updates, each rewriting only the changed taps, and
  another full update. Samples keep flowing throughout. Each of these events
  is counted and must occur.

## How far this follows the original design, and where it departs

Taken from the design this RTL implements:

- the TLUT concept: four regular inputs and 16 tuning functions per LUT;
- the two-TLUT multiplexer with its pin assignment and truth-table functions;
- a 32-tap filter with 8-bit samples and coefficients, fully pipelined, whose
  coefficients change only by rewriting LUTs;
- the processor → HWICAP (on the OPB) → ICAP reconfiguration path.

Choices made here, where the source is silent:

- the tap-multiplier structure (two 4-bit slices, 24 TLUTs);
- signed arithmetic and the full-precision 21-bit output;
- direct form with an adder tree, the register placement and the 7-cycle
  latency;
- the `in_valid` handshake;
- a single clock (the original system runs the processor at 100 MHz and its
  buses at 50 MHz);
- the reset contents of the LUTs;
- the HWICAP buffer size, register map and byte order.

Departures and omissions:

- **Configuration format.** A real FPGA's configuration port takes the
  vendor's bitstream: frames of configuration memory, with LUT bits spread
  across them. `icap_port` replaces it with a small format of its own: one
  record per LUT, addressed by a logical LUT number. Each TLUT keeps its own
  16 configuration bits. Routing is fixed and cannot be configured.
- **Processor system.** The processor, its local bus and memory, and the
  bus bridge are not included. The HWICAP's bus port is the top's interface
  to them.
- **Area.** The original reports LUT counts for its vendor-mapped filter.
  The TLUT count here (768 for the multipliers, plus adders and registers) is
  not comparable with those figures.
- **Update time.** The original reports a total coefficient-update time
  dominated by processor software. Only the hardware transfer time is
  modelled here.
- **Baseline.** The conventional version of the filter, with coefficient
  registers and generic multipliers, served only as a baseline for comparison
  and is not included. Neither is the four-LUT conventional mapping of the
  multiplexer.
- **Mapping tool.** The truth tables of both TLUT circuits were worked out
  by hand, not by a mapping tool. The tuning functions exist only in the
  testbench package, where they play the processor's software.
