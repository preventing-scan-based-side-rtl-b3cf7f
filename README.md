# Secure scan with a configurable shift register

A scan chain gives anyone at the test pins full control over the flip-flops of a chip and full
view of them. For a cipher core, that view is enough to recover the secret key: run a few
functional cycles, switch to test mode, shift the intermediate state out. This design keeps the
scan chain fully usable for test, but only for someone who knows a per-chip **test authorization
code**.

The idea in one paragraph: at the start of every test session the tester shifts an N-bit code
into a small **nonlinear shift register (NSR)**. Each NSR cell drives one obfuscation gate in the
scan chain. If the NSR ends up in exactly the right state (the **scan key**), every obfuscation
gate is transparent and the register freezes. If not, a lock flip-flop is set, the wrong state
keeps rotating through the NSR, and XNOR gates in the chain flip scan bits wherever the NSR
bit and a live internal node of the circuit are both active. The attacker gets scan data that
looks plausible but is wrong in a pattern that changes every clock. The map from code to scan
key goes through a word held in on-chip nonvolatile memory (NVM), so two chips of the same
design can need different codes.

Everything is SystemVerilog in `rtl/`, with self-checking testbenches in `tb/`. The default
size is a 64-bit code protecting a 128-flop scan chain.

## Structure

```
             code_in ──►┌──────────── NSR (N cells) ─────────────┐
                        │ in-mux ─► D0 ─► mux ─► D1 ─► mux ─► ...│──┐ feedback (when Cout=1)
                        │            ▲cfg[0]      ▲cfg[1]        │◄─┘
                        └──────┬───────────────────────────────┬─┘
          NVM word cfg[N-1:0] ─┘      tap[i] = cell i ^ KEY[i] │
                                                               ▼
   CT1 counter (EN = SE & ~Cout) ──► last ──► DF1 <── GT2 = OR(tap_next)
                                              │
                        NSR shift enable = SE & (EN | Q1)      (GT1)

   scan_in ─► SFF ─► XNOR ─► SFF ─► ... ─► XNOR ─► SFF ─► scan_out
                      ▲                     ▲
                NAND(tap[0], node[0])  NAND(tap[N-1], node[N-1])
```

| Module | Role |
|---|---|
| `secure_scan_top` | wires the blocks below; the circuit under test (CUT) connects through ports |
| `nsr` | the configurable shift register that receives and stores the code |
| `nvm_model` | behavioural model of the nonvolatile memory holding the configuration word |
| `auth_counter` | counter CT1 and its enable gate GT4: marks the N code-entry clocks, then holds |
| `auth_lock` | key check GT2, lock flip-flop DF1, NSR enable GT1/GT3 |
| `obf_scan_chain` | mux-D scan flip-flops with NAND/XNOR obfuscation points |
| `secscan_pkg` | default sizes, default NVM word and scan key, obfuscation-point placement |

## From code to scan key

This is the part that needs the most care when you configure a chip.

The NSR has N cells, cell 0 next to the code input. Between cell i and cell i+1 sits a 2:1 mux
controlled by NVM bit `cfg[i]`: `cfg[i] = 1` passes Q of cell i, `cfg[i] = 0` passes Qbar. So
every 0 in the NVM word inverts the bit travelling past it. During code entry the input mux feeds
cell 0 from `code_in`; once the counter's carry `Cout` is high it feeds cell 0 from the mux after
the last cell (controlled by `cfg[N-1]`), turning the NSR into an inverting ring.

The code bits are called X1..XN and X1 is sent first. After N entry clocks the reset contents
(all zeros) have been pushed out, and

    cell j  =  X(N-j)  XOR  parity( number of zeros in cfg[0 .. j-1] )      (j = 0 .. N-1)

Each cell drives its obfuscation NAND gate through either Q or Qbar. This choice is wired in at
design time and is given by the parameter `SCAN_KEY`: bit j = 0 means Q (cell j must hold 0 for
a clean scan), bit j = 1 means Qbar (cell j must hold 1). The scan key is therefore the NSR state
the code must produce, and the right code is

    X(N-j)  =  SCAN_KEY[j]  XOR  parity( zeros in cfg[0 .. j-1] )

Small example, N = 5: NVM word `cfg[0..4] = 0 1 1 0 1` and scan key `cells 0..4 = 1 1 0 0 1`
give cells `X5, ~X4, ~X3, ~X2, X1` after entry, so the right code is X5..X1 = `1 0 1 1 1`.
`tb_nsr` steps through this case clock by clock and `tb_secure_scan_example` tries all 32 codes.

For the default parameters (`NVM_INIT = 64'hA5C3_96E1_5B2D_7F08`,
`SCAN_KEY = 64'h3C5A_F00F_9966_E11E`) the right code, written as a 64-bit vector whose bit k-1 is
Xk (bit 0 is sent first), is `64'h2278_5F85_2782_B1F5`. Both defaults are placeholders: a real
chip chooses its own secrets.

The NSR is called nonlinear in the sense that its taps are not a plain shift; in terms of
Boolean algebra it is affine (shifts and inversions), which is why a closed form exists.

## A test session, clock by clock

1. **Reset** (`rst`, asynchronous, active high) clears the NSR, the counter, DF1 and every scan
   flop. The NVM contents survive reset.
2. **Functional mode** (`se = 0`): the counter enable is low, the NSR does not move, and the scan
   flops capture `cut_di`. The protection logic is idle and does not touch the functional path.
3. **Code entry**: on the first N clocks with `se = 1` the NSR takes one bit of `code_in` per
   clock and the counter counts 0..N. The scan chain also shifts during these clocks; its data
   is not meaningful yet.
4. **Check**: on the clock edge that takes the N-th bit, `Cout` (`auth_done`) rises, the counter
   stops, and DF1 (`auth_fail`) captures the OR of all NAND inputs for the NSR value taken at
   that same edge: 0 for the right code, 1 for any wrong code.
5. **Scan**: from the next clock on, scan data is clean (right code; the NSR is frozen at the
   scan key) or scrambled (wrong code; the NSR rotates by one position on every clock with
   `se = 1` and holds while `se = 0`).

The authorization lasts until the next reset. Dropping `se` for capture cycles and raising it
again keeps the session; a new code can be entered only after a reset.

## The obfuscation points

Between two scan flops the serial path is `si = XNOR(q_prev, NAND(tap, node))`, which equals
`q_prev XOR (tap AND node)`. With `tap = 0` the bit passes unchanged whatever the node does. With
`tap = 1` the bit is inverted whenever the chosen CUT node is 1, so the corruption depends on
circuit data that the attacker does not see directly. Both the pattern shifted in and the
response shifted out are affected, since both travel the same path.

There is one point per NSR cell. Point i sits after scan flop `(i*(SCAN_LEN-1))/N_AUTH`
(`secscan_pkg::obf_pos`), which spreads the points evenly and needs `SCAN_LEN > N_AUTH`. Which
CUT nodes feed the NAND gates is up to the integrator: they enter on `cut_node`. They should be
internal combinational nodes that toggle during test.

## Top-level interface (`secure_scan_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | system clock; asynchronous active-high reset |
| `se` | in | 1 | scan enable: 1 = test mode (shift), 0 = functional |
| `code_in` | in | 1 | test authorization code input, one bit per clock, X1 first |
| `scan_in` / `scan_out` | in / out | 1 | serial scan data |
| `cut_di` | in | SCAN_LEN | functional next state of the CUT flops |
| `cut_q` | out | SCAN_LEN | scan flop outputs, to the CUT |
| `cut_node` | in | N_AUTH | CUT nodes feeding the NAND gates |
| `nvm_we`, `nvm_data` | in | 1, N_AUTH | owner programming of the NVM model |
| `auth_done` | out | 1 | counter carry: code entry complete |
| `auth_fail` | out | 1 | lock flip-flop: 1 = wrong code was entered |

Parameters: `N_AUTH` (code length, default 64), `SCAN_LEN` (scan flops, default 128),
`NVM_INIT` (NVM contents at power-up), `SCAN_KEY` (Q/Qbar connection style per NSR cell).

`auth_done` and `auth_fail` are brought out for test and debug. A production chip may prefer not
to expose `auth_fail`, since it tells an attacker whether a guess was right; the scheme's
security argument assumes the only feedback is the scan data itself.

## Design choices and departures

- **Clock enables instead of gated clocks.** The original structure gates the NSR clock
  (`clk_1 = CLK AND SE AND Q1`) and DF1's clock (`clk_0 = CLK OR Cout`). Here every flop runs on
  `clk` and the same conditions are clock enables. Behaviour per clock is the same and the
  design stays single-clock.
- **NSR enable during code entry.** Taken literally, DF1 resets to 0 and gates the NSR clock, so
  the NSR could never load the code. The NSR enable here is `SE AND (EN OR Q1)`: it runs during
  entry, and afterwards only after a wrong code.
- **When DF1 samples.** DF1 samples the key check on the edge that completes code entry, using
  the NSR value taken at that edge, so the check sees the complete code.
- **Key check polarity.** GT2 is an OR of the NAND inputs. It gives 0 when every NAND input is
  0, which is the clean-scan condition.
- **Counter.** Counts 0..N and holds with `Cout = 1` until reset, instead of wrapping.
- **NVM.** `nvm_model` is a behavioural model, not a memory macro: a register with power-up
  contents `NVM_INIT`, unaffected by reset, with a one-word write port of its own design. Replace
  it with the process's NVM or OTP macro.
- **Own choices with no published value:** scan chain length, placement of the obfuscation
  points, the default NVM word and scan key, the status outputs, and asynchronous reset. The
  NSR cells in the original also have a SET pin; nothing here uses one.
- **Not included:** the circuit under test. The design was evaluated around an AES core and
  ITC'99 benchmarks (b17, b18, b19, b20, b22); none of these is part of this RTL.

## Cost

After coarse synthesis with yosys at the defaults, the added logic is 64 NSR flops, 7 counter
flops and 1 lock flip-flop, 64 NAND/XNOR pairs (each an AND and an XOR after optimization),
about 65 single-bit muxes and 65 inverters, plus the NVM bits. The scan flops themselves belong to the CUT's scan design. This
matches the intent: the overhead grows linearly with the code length and does not depend on the
size of the protected circuit. With a 64-bit code a random guess succeeds with probability
2^-64.

## Verification

Each testbench is self-checking and ends with `TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb_nsr` | the 5-cell example row by row; 64-cell closed form on 20 random NVM words and codes; hold; one feedback rotation |
| `tb_auth_counter` | idle in functional mode; exactly N enable clocks; `last` on the N-th; `Cout` timing; hold through SE toggles; reset |
| `tb_auth_lock` | DF1 captures 0 for an all-zero check and 1 for each single wrong tap; NSR enable during entry, after a wrong code, and off with SE low |
| `tb_obf_scan_chain` | clean shift and capture with taps 0; 400 random clocks against a reference chain; one active point inverts exactly the downstream bits; tap=1 with node=0 stays clean |
| `tb_nvm_model` | power-up contents, programming, retention |
| `tb_secure_scan_top` | full default size (64-bit code, 128 flops) against a cycle-accurate reference model, with a stand-in CUT; counts each mechanism: functional mode idle, clean scan after the right code, NSR frozen, wrong code detected, NSR rotation, scrambled scan data, hold while SE is low, reprogrammed NVM changes the right code |
| `tb_secure_scan_example` | top level at N = 5 with the example configuration: only code 10111 of all 32 unlocks the chain |

Three assertions in the RTL guard the protocol during simulation (run with `--assert`): the
counter carry never falls without a reset (`auth_counter`), DF1 changes only on the final
code-entry edge (`auth_lock`), and after a right code the NSR stays at the scan key
(`secure_scan_top`). Because they are disabled by `rst`, testbenches should hold reset across a
clock edge.

The full-size end-to-end test simulates in well under a second.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/secscan_pkg.sv tb/tb_secure_scan_top.sv --top-module tb_secure_scan_top
./obj_dir/Vtb_secure_scan_top
```

Replace the testbench name to run another. The simulator models two states only, so every
flop that is read is reset.

## Using it in a chip

1. Choose `N_AUTH` for the required guessing resistance and area.
2. Pick `SCAN_KEY` (the Q/Qbar wiring of each NSR cell into its NAND gate) at design time, and an
   NVM word per chip (or per lot).
3. Compute the right code with the formula above and give it only to authorized testers.
4. Connect `cut_q`/`cut_di` to the CUT's scan flops and `cut_node` to internal nodes that toggle
   during test.
5. Test flow: reset, raise `se`, send the N code bits, then shift and capture as usual.
