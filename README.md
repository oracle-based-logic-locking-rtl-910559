# OraP: a key register that locks the chip the moment scan starts

Most attacks on logic locking, the SAT attack among them, need an *oracle*: a working,
unlocked chip whose correct responses to chosen inputs the attacker can read. In practice
those responses come through the scan chains: shift a state in, clock once, shift the
response out. This design takes the oracle away. The key of the locked logic is held in a
register that **clears itself when `scan_enable` rises, before the first shift edge**. So
every response that can be scanned out comes from the locked circuit. Manufacturing test
still works, but on the locked circuit. Because the oracle is gone, the key gates can be
chosen for high output corruption rather than SAT resistance. Here they use weighted logic
locking.

This RTL follows the OraP scheme published in "Oracle-based Logic Locking Attacks: Protect
the Oracle Not Only the Netlist". It implements the hardened ("modified") version, where
the circuit's own locked responses take part in producing the key.

## What is in the design

```
                   tamper-proof memory (outside)            protected combinational logic (outside)
                        | mem_rd/mem_addr/mem_data              ^ state_q            | comb_out
                        v                                       |                    v
  unlock_start --> orap_unlock_ctrl --seed, shift_en--> orap_key_register --key--> orap_weighted_lock
  scan_enable ---+--> (abort)   |clear_se  |ff_clear      (N_KEY orap_key_cell,      | locked lines
                 +--OR----------+          |               each with its own         v
                    |  se (one stem)       v               orap_pulse_gen)     N_FF orap_scan_ff --> po
                    +------------------> all key cells and normal flip-flops, stitched into N_CHAINS chains
```

| file | role |
|---|---|
| `rtl/orap_pkg.sv` | controller states, key-gate types, LFSR tap rule |
| `rtl/orap_pulse_gen.sv` | behavioural model of the scan-entry pulse generator (3 inverters + NAND2) |
| `rtl/orap_key_cell.sv` | one key cell: scan mux, flip-flop with asynchronous clear, own pulse generator |
| `rtl/orap_key_register.sv` | the key-generating LFSR built from key cells |
| `rtl/orap_unlock_ctrl.sv` | unlock sequencer |
| `rtl/orap_weighted_lock.sv` | AND/NAND control gates feeding XOR/XNOR key gates |
| `rtl/orap_scan_ff.sv` | normal (non-key) scan flip-flop |
| `rtl/orap_top.sv` | everything wired together, with scan stitching |

The protected combinational logic and the tamper-proof key memory are not part of the RTL.
`orap_top` brings out the logic's inputs (`state_q`) and outputs (`comb_out`: next state in
the low `N_FF` bits, primary outputs above them), plus a read port for the memory.

## The key is generated, never stored

The key register is an `N_KEY`-bit LFSR in internal-XOR (Galois) form. In front of every
cell sits an XOR, the *reseeding point*. With `q[-1] = 0` and `fb = q[N_KEY-1]`, one step is:

```
next[i] = q[i-1] ^ (tap(i) & fb) ^ inject[i]
tap(i)  = (i == 0) || (i % TAP_SPACING == 0)          TAP_SPACING = 8
inject[2j]   = seed_mem[j]     word from the tamper-proof memory
inject[2j+1] = seed_resp[j]    = state_q[j], a flip-flop of the locked circuit
```

Unlocking feeds a *key sequence* of `SEQ_LEN` memory words, one per clock. An all-zero
word gives a free-run cycle. No single stored word is the key. The key is the LFSR state
after the last word. After that the LFSR holds (`shift_en = 0`) and drives the key gates.

Half of the reseeding points are driven by the circuit's flip-flops, not by the memory.
While the key sequence is being fed, the circuit runs locked and produces wrong responses,
and those wrong responses are part of the key computation. This blocks one attack: freeze
the flip-flops that hold a chosen test state, let the chip unlock, clock once, then scan
out the correct response. Freezing the flip-flops changes what enters the LFSR, so the
key comes out wrong. `tb_orap_top` does exactly this with `force` and checks that the key
is wrong. Memory points and response points alternate cell by cell, as the scheme
recommends. Odd key sizes are supported: there are ceil(N/2) memory points and
floor(N/2) response points.

### Computing a key sequence

The owner must choose words that bring the LFSR to the correct key, taking into account the
locked responses the circuit will produce on the way. Those responses depend on the logic,
on the key gates and on every intermediate key, so the owner has to simulate. With
`SEQ_LEN >= 2`, one simple procedure is:

1. Choose words 0..L-3 freely: random, with zero words for free-run.
2. Simulate unlocking up to the state `K` before word L-2, with the state of the locked
   circuit alongside.
3. The response bits `r2` and `r1` used in the last two steps come from flip-flop states
   that do not depend on words L-2 and L-1. The odd cells of the final key are
   `K'[2j] ^ r1[j]`, plus feedback. Their value after the second-to-last step,
   `K'[2j]`, is set directly by word L-2. Solve word L-2 bit by bit.
4. The even cells of the final key are set directly by word L-1. Solve it bit by bit.

`tb/tb_orap_top.sv` (`make_key_sequence`) and `tb/orap_e2e_harness.sv` implement this. It
only works if the circuit follows the same trajectory on every unlock. That is why the
controller clears the normal flip-flops first, and why the primary inputs of the logic must
be held at the agreed values (zero in the testbenches) while `unlock_busy` is high.

## Clearing on scan entry

Each key cell is a scan cell: a 2-to-1 multiplexer (`0` = LFSR next state, `1` = `si`,
select `scan_enable`) in front of a flip-flop with an active-low asynchronous clear. The
clear comes from the cell's **own** pulse generator. That generator NANDs `scan_enable`
with a copy delayed and inverted through three inverters. In steady state its output is 1.
When `scan_enable` rises, it drops to 0 for about three inverter delays. A falling edge
gives no pulse. The flip-flop is therefore wiped right after scan entry, well before the
next clock edge shifts anything.

Why it is built this way:

- The same `scan_enable` net drives the scan multiplexer and the pulse generator. Cutting
  it at the stem to suppress the clear would also break scan shifting of the key cells.
  So a Trojan has to modify every cell, for example by turning each NAND2 into a NAND3.
- The key cells are part of the scan chains. Each is placed in front of a normal flip-flop,
  interleaved with normal flip-flops in its chain (`orap_top`: unit `u` = {key cell `u`,
  flip-flop `u`} goes to chain `u % N_CHAINS`). Bypassing the key cells would then need a
  multiplexer per cell.
- During test the key cells are ordinary, freely loadable scan cells. The key gates then
  act as extra control points, which helps fault coverage.

**`orap_pulse_gen` is a behavioural model** (continuous assignments with `#` delays:
0.1 ns per inverter, 0.05 ns for the NAND). It needs an event-driven simulator with
timing; with verilator, use `--timing`. Synthesis ignores the delays, so the chain
collapses to a constant 1 and the key cells come out without a clear. A real
implementation must build the pulse generator from hand-placed, protected cells, and
must check that the pulse is wide enough to clear the flip-flop.

The key register has no other reset. To clear it at the start of operation, the
controller raises `scan_enable` itself for one clock (`clear_se`, ORed into the chip's
`scan_enable`). `clear_se` comes straight from a flip-flop, because a glitch on it would
fire the pulse generators.

## Unlock sequence (controller)

After the clock edge that samples `unlock_start`, cycle by cycle:

| cycle | state | what happens |
|---|---|---|
| 1 | FLUSH | `ff_clear`: every normal flip-flop is cleared at the end of the cycle |
| 2 | CLEAR | `ff_clear` and `clear_se`: the key cells clear at the start of the cycle; the one scan shift at its end moves only zeros (chain heads are gated to 0) |
| 3 .. L+2 | LOAD | read address 0..L-1 (`mem_rd`); the word is expected on `mem_data` one clock later |
| 4 .. L+3 | LOAD/DRAIN | `shift_en = 1`: the LFSR steps with the word read in the previous cycle |
| L+4 | DONE | `unlocked = 1`, the LFSR holds the final key |

During cycle 3, the first LOAD cycle, the LFSR still holds zero while the circuit already
steps once with the all-zero key. A reference model must include that step. If the
`scan_enable` pin rises at any time, the controller returns to IDLE. Together with the
hardware clear, the circuit is then locked until the next `unlock_start`.

## Weighted locking

`orap_weighted_lock` places `N_KEY / CTRL_IN` key gates on the lines leaving the logic,
spread evenly (gate `g` on line `g*N_LINES/N_GATES`). Each key gate is preceded by a
control gate over `CTRL_IN` key bits: NAND feeding XOR for even gates, AND feeding XNOR for
odd gates. Both forms flip the line unless the control gate sees all ones. Inverters on
the control-gate inputs, set by `CORRECT_KEY`, make "all ones" mean "key bits equal the
correct key". A random key therefore flips a gated line with probability `1 - 2^-CTRL_IN`
(7/8 for three inputs; the testbench measures 74 of 85 gates). If `N_KEY` is not a
multiple of `CTRL_IN`, the leftover bits widen the last control gate.

The published method places key gates inside the logic, by fault analysis of the actual
netlist. Placing them on the output lines is this design's simplification.

## Parameters of `orap_top`

| parameter | default | meaning / origin |
|---|---|---|
| `N_KEY` | 256 | key and LFSR size; 256 is the largest evaluated key (s38417, b17) |
| `TAP_SPACING` | 8 | a feedback tap every eight cells, as in the evaluated LFSRs |
| `CTRL_IN` | 3 | control-gate inputs (3 in the evaluation, 5 for b18/b19) |
| `N_FF` | 1636 | normal flip-flops; must be at least `N_KEY` (s38417) |
| `N_PO` | 106 | primary outputs (s38417: 1636 + 106 = 1742 outputs of its combinational part) |
| `N_CHAINS` | 8 | scan chains (own choice) |
| `SEQ_LEN` | 8 | words in the key sequence (own choice) |
| `CORRECT_KEY` | `{32'h5A3C_96E1}` repeated | the key the gates accept (arbitrary) |
| `MEM_W`, `AW` | derived | do not override |

### Evaluated configurations

| circuit | key bits | control-gate inputs | combinational outputs | flip-flops + primary outputs | at the defaults |
|---|---|---|---|---|---|
| s38417 | 256 | 3 | 1742 | 1636 + 106 | fits exactly (the defaults) |
| s38584 | 186 | 3 | 1730 | 1426 + 304 | 304 outputs > 106; simulated with its own sizes |
| b17 | 256 | 3 | 1512 | 1415 + 97 | fits |
| b18 | 97 | 5 | 3343 | 3320 + 23 | needs 5-input gates and more flip-flops; simulated with its own sizes |
| b19 | 208 | 5 | 6672 | 6642 + 30 | needs 5-input gates and more flip-flops; simulated with its own sizes |
| b20 | 236 | 3 | 512 | 490 + 22 | fits (key register larger than needed) |
| b21 | 229 | 3 | 512 | 490 + 22 | fits; simulated with its own sizes |
| b22 | 243 | 3 | 757 | 735 + 22 | fits |

The split of each circuit's outputs into flip-flops and primary outputs comes from the
benchmark suites. The key sizes, gate widths and output totals are those of the published
evaluation. The published hamming-distance, area and delay figures depend on the real
netlists and on fault-analysis gate placement, so this RTL cannot reproduce them.

## Choices this design makes on its own

These points are not fixed by the scheme. Check them before reuse:

- Normal flip-flops are cleared synchronously (`ff_clear`) before unlocking. Chain heads
  are gated during the controller's clear. Both make unlocking deterministic.
- Galois LFSR with taps at cell 0 and every eighth cell. The scheme fixes only the tap
  spacing, and whether the resulting polynomial is primitive has not been checked.
- Hold multiplexer on each key cell's functional input, used after unlocking.
- Flip-flops `0 .. floor(N_KEY/2)-1` feed the response points.
- Memory read latency of one clock, 8-word sequence, 8 scan chains, abort on scan entry.
- Key gates on the logic's outputs, alternating gate types, `CORRECT_KEY` value.

Some of the scheme's protections are physical and cannot be expressed in RTL. The key
cells should be kept in one region of the layout, so that power side-channel Trojan
detection can cover them. Synthesis and place-and-route must keep each pulse generator,
and the single `scan_enable` stem, intact.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops
through a watchdog if it hangs. Build and run one with verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/orap_pkg.sv \
          tb/tb_orap_top.sv --top-module tb_orap_top
./obj_dir/Vtb_orap_top
```

| testbench | what it checks |
|---|---|
| `tb_orap_pulse_gen` | a pulse of the right width on every rising `scan_enable`, none on falling edges |
| `tb_orap_key_cell` | functional and scan loads; clear before the next edge on scan entry |
| `tb_orap_scan_ff` | reset, clear, scan and functional loads; scan entry keeps the contents |
| `tb_orap_key_register` | 256-bit LFSR against a reference: reseeding, free-run, hold, scan clear and load |
| `tb_orap_unlock_ctrl` | cycle-exact schedule, memory addresses and words, aborts, relock |
| `tb_orap_weighted_lock` | correct key transparent; one wrong bit flips one line; random-key corruption |
| `tb_orap_top` | full default size: key-sequence construction, unlock, 100 unlocked cycles against the unprotected logic, scan test with clear, shift, capture and shift-out checked against a chain model, frozen-flip-flop attack rejected, re-unlock |
| `tb_orap_workloads` | the same flow (through `tb/orap_e2e_harness.sv`) for the s38584, b18 and b21 configurations (about 3 minutes to build) |
| `tb_orap_workload_b19` | the same flow for b19, the largest configuration (about 2 minutes to build) |

The top-level and workload testbenches replace the protected logic with a small nonlinear
stand-in function.
