# Latch-based scan-chain lock with LFSR obfuscation

A scan chain makes a chip testable, but it also lets anyone with a tester read
out and load the chip's internal state. This design is a lock around the scan
chain of a circuit under test (CUT). The user first shifts in a key. The scan
clock stays off until the user signals that the key is in (`key_ready`). Then
the scan chain either works normally, when the key matches a golden key held in
ROM, or shifts out pseudo-random data from an LFSR, when it does not. The
functional behaviour of the CUT is never changed. Only what reaches the scan
output is.

The key length is a parameter (4, 8, 16, 32 or 64 bits). The LFSR grows with
it. The default configuration is an 8-bit key (golden key `8'h84`), a 2-bit
LFSR and a 3-flop scan chain, which is the size of the ISCAS'89 benchmark s27.

## Blocks

```
             latch_clk key_clk          clk
                 |       |               |
key_in --> [ key_generator ] --ff--> [ XOR/OR ] --kc_out--+-----------------+
             (latch chain +          key_comparator       |                 |
              capture bank)             ^  key            v                 v
                                        |           [ lfsr_obfuscator ] [ secure_scan_chain ]
                        [ rom_controller ]            ^      |lfsr_out    ^  si -> ... -> so
                                                      |      +------------+
key_ready --> [ clock_gate ] --gated_clk--------------+-------------------+
cut_sig (from CUT) --> lfsr_obfuscator       cut_d / cut_q <--> CUT logic
```

| file | role |
|---|---|
| `rtl/secure_scan_pkg.sv` | default key width, golden key, ROM word width, LFSR width rule |
| `rtl/key_generator.sv` | serial key entry: `KEY_W`-stage chain on `latch_clk`, parallel capture bank on `key_clk` |
| `rtl/rom_controller.sv` | golden-key ROM (4-bit words) and the counter that reads it into a key register after reset |
| `rtl/key_comparator.sv` | holds the key generator; `kc_out = !(key_ready && key_valid) \|\| \|(ff ^ key)` |
| `rtl/clock_gate.sv` | latch-based clock gate, `gated_clk = clk & latched(key_ready)` |
| `rtl/lfsr_obfuscator.sv` | Galois LFSR clocked by `gated_clk`, injected with `cut_sig & kc_out` |
| `rtl/secure_scan_chain.sv` | scan flops with a 2:1 mux on every link, selected by `kc_out` |
| `rtl/secure_scan_top.sv` | the wrapper; the CUT's combinational logic connects through `cut_d`, `cut_q`, `cut_sig` |

## Using the lock

1. Pulse `reset` (active high, asynchronous). After reset the ROM controller
   needs `KEY_W/4` cycles of `clk` to load the golden key.
2. Shift the key in on `key_in`, most significant bit first, one bit per
   rising edge of `latch_clk`. A rising edge of `key_clk` copies the whole chain
   into the capture bank `ff`. The chain and the bank are separate stages:
   `ff` changes only on `key_clk`, so the capture can be taken at any point
   (the reference waveform takes one after every two shifts).
3. Raise `key_ready`. `kc_out` settles in the same cycle: it is combinational
   from `ff`, the golden key and `key_ready`. The next rising edge of `clk` is
   the first edge of `gated_clk`.
4. Use the scan chain as usual (`scan_en = 1` shifts `si` toward `so`,
   `scan_en = 0` captures the CUT's next state).

While `key_ready` is low, `kc_out` is 1 and `gated_clk` is held low. The scan
flops and the LFSR then neither capture nor shift. Dropping `key_ready` later
pauses them again, and they keep their state.

## How the obfuscation works

This is the least obvious part. The LFSR has `W = max(2, KEY_W/4)` stages.
Stage `W-1` is the entry stage. The last stage, bit 0, is fed back into every
stage:

```
q[W-1] <= (cut_sig & kc_out) ^ q[0]
q[i]   <= q[i+1] ^ q[0]          (i < W-1)
```

It resets to zero. If nothing is injected, an all-zero LFSR stays at zero. So
with the correct key (`kc_out = 0`) the LFSR does not toggle at all, and costs
no switching power. With a wrong key, the CUT signal `cut_sig` is injected on
every gated clock edge. The sequence therefore depends on the CUT's own
activity and not only on a seed. For the 2-bit case, the injections 1, 0, 0, 1
take the state through 0, 2, 1, 3, 0.

In the scan chain, link `i` (from flop `i-1` to flop `i`, for `i >= 1`) goes
through a 2:1 mux:

- `kc_out = 0`: the mux passes flop `i-1`, so the chain is an ordinary shift
  register.
- `kc_out = 1`: the mux passes LFSR bit `(i-1) mod W`.

So, under a wrong key, everything that reaches `so` during a shift comes from
the LFSR. Flop 0 still loads `si`, but its value never reaches the output.
Functional capture (`scan_en = 0`) does not go through the muxes, so the CUT
still works normally with a wrong key.

Things the user of this RTL should know:

- On the first shift after a functional capture, `so` shows the captured value
  of the last flop. Only the bits behind it are replaced. If that one bit
  matters, add a mux on `so` too.
- The mux-to-LFSR-bit mapping is modulo `W`. In long chains many muxes share a
  bit, so the output is strongly correlated with the LFSR state.
- The feedback polynomial (all taps) is maximal-length only for small `W`. Here
  the LFSR is driven by CUT data rather than running free, so period was not
  the design goal.

## Clocks and timing

There are three independent clocks. `latch_clk` drives the key chain and
`key_clk` drives the capture bank. `clk` drives the ROM controller directly,
and the LFSR and scan flops through the gate. The clock gate samples
`key_ready` in a latch that is transparent while `clk` is low. A change of
`key_ready` therefore takes effect at the next rising edge of `clk`, and can
neither cut a high pulse short nor create one. This enable latch, and the
`always_latch` in `clock_gate.sv`, are intended: together they are the
clock-gating cell. Replace them with a library ICG cell when you synthesise.

The stages of the key "latch" chain are written as edge-triggered storage on
`latch_clk`. A chain of level-sensitive latches that are all open in the same
phase would let a bit ripple through the whole chain. If you want real latches,
use alternating phases, and note that this halves the number of key bits per
latch stage.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `secure_scan_top` | `KEY_W` | 8 | key length; 4, 8, 16, 32, 64 tested |
| | `LFSR_W` | `max(2, KEY_W/4)` | LFSR length |
| | `SCAN_LEN` | 3 | number of scan flops (s27 has 3) |
| | `GOLDEN_KEY` | `64'h84` | golden key; the low `KEY_W` bits are used |
| `rom_controller` | `WORD_W` | 4 | ROM word width; `KEY_W` must be a multiple of it |

## Where this RTL departs from, or adds to, the reference architecture

These are decisions made here, where the reference description gives no detail:

- **ROM controller.** The golden key sits in a ROM that is read out, one word
  per clock, after reset. The word width, the read-out counter and the
  `key_valid` flag are this implementation's. Until `key_valid` is high,
  `kc_out` stays 1.
- **Comparator.** It is combinational and forced to 1 until it is enabled.
  There is no output register, because `kc_out` must change together with
  `key_ready`.
- **Clock-gate enable.** The enable is `key_ready`. Gating by the comparator
  output instead is mentioned once in the reference material, but the gating
  circuit and the description of the flow use `key_ready`.
- **LFSR.** The feedback taps, the bit order, the reset to zero and the width
  rule `KEY_W/4` are choices made here. They are consistent with the 2-bit
  trace above.
- **Scan chain.** The mux select (`kc_out`), the mux inputs and the
  assignment of LFSR bits to muxes are choices made here. The scan flops are
  reset to 0.
- **Key length.** The "reduced latch count" of the reference is not
  reproduced. There is one chain stage per key bit.
- **Not included.** The benchmark circuits (s27, s298, s1423, s9234) are not
  part of `rtl/`. The wrapper brings out the CUT's next state `cut_d`, the
  flop state `cut_q` and one trigger bit `cut_sig`. The benchmarks' area and
  power figures were not reproduced. No synthesis with a cell library was done.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a
watchdog.

| testbench | what it checks |
|---|---|
| `tb/tb_key_generator.sv` | shift order, capture only on `key_clk`, the partial captures 01, 04, 10, 21, 84 while `8'h84` is entered, reset |
| `tb/tb_rom_controller.sv` | key valid after 2 cycles (8-bit) and 16 cycles (64-bit), contents, reset |
| `tb/tb_key_comparator.sv` | match, every single-bit error, random keys, `kc_out = 1` while `key_ready` or `key_valid` is low |
| `tb/tb_clock_gate.sv` | no edges while disabled, an enable change while `clk` is high creates and cuts no pulse |
| `tb/tb_lfsr_obfuscator.sv` | reference-model comparison for W = 2 and 8, idle on a key match, the sequence 0, 2, 1, 3, 0 |
| `tb/tb_secure_scan_chain.sv` | capture, clean shift, mux selection, against a model |
| `tb/tb_secure_scan_top.sv` | end to end at default parameters with an s27 model (`tb/s27_model.sv`) |
| `tb/tb_workloads.sv` | key lengths 4 to 64, scan chains of 3, 14, 74 and 228 flops (the flop counts of s27, s298, s1423, s9234) with a stand-in CUT (`tb/workload_run.sv`) |

The end-to-end test keeps its own model of the s27 state, the LFSR and the
chain, and compares them every cycle. It counts each mechanism and fails if one
never happens:

- the gate stays closed before `key_ready`
- the ROM loads the golden key
- a key match and a key mismatch
- functional capture
- clean scan-out
- LFSR activity
- obfuscated scan-out bits
- a pause of the gated clock when `key_ready` drops

Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_secure_scan_top rtl/secure_scan_pkg.sv tb/tb_secure_scan_top.sv
./obj_dir/Vtb_secure_scan_top
```

Use `+verilator+rand+reset+2` to start from random register values. The
testbenches raise `reset` from 0 to 1 at time 1, so that the asynchronous resets
see an edge.
