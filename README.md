# Masked KECCAK with domain-oriented masking (any protection order)

This is a KECCAK-f / SHA-3 core protected against power and EM side-channel analysis.
Every state bit is split into `SHARES = d+1` random shares. An attacker who can observe
`d` internal signals learns nothing about the unshared data. The protection order is set
by one parameter. `SHARES = 1` gives the plain, unprotected core.

The same RTL builds three datapaths, chosen at elaboration time:

| `ARCH` | how a round is computed | cycles per KECCAK-f[1600] (1 / 2+ shares, pipelined S-box) |
|---|---|---|
| `ARCH_SERIAL_AREA` (default) | one slice per cycle; rho by 1-bit lane rotations | 3136 / 3160 |
| `ARCH_SERIAL_TP` | one slice per cycle; rho and pi in a single cycle | 1624 / 1648 |
| `ARCH_PARALLEL` | the whole state: linear part, register stage, S-boxes | 24 / 72 (48 with double-clocked S-boxes) |

The default instance of the top `keccak_dom` is the smallest variant:
- SERIAL-AREA, first order (2 shares);
- pipelined S-box, no fresh randomness;
- KECCAK[1088,512], i.e. the SHA3-256 rate of 17 lanes.

## Masking: the DOM AND and the S-box

KECCAK's only non-linear step is chi. On each 5-bit row it computes
`y[i] = x[i] ^ (~x[i+1] & x[i+2])`. Every other step is linear, so each share of
theta, rho, pi, iota and absorption is computed on its own, in its own *domain*. The NOT
and the round constant are constants and are applied to share 0 (domain A) only.

`dom_and` computes `q = a*b + c` on shares. For output share `i`:

```
q_i = a_i b_i (+ c_i)  +  sum over j != i of  [ a_i b_j + Z_ij ]
                                               `-- register --'
```

- `a_i b_i` is the *inner-domain* term. It stays within domain `i`.
- `a_i b_j` is a *cross-domain* term. It is blinded by a fresh random bit and then
  registered before it is added into domain `i`. The register stops glitches from
  combining shares before the mask has been added.
- The cross terms `(i,j)` and `(j,i)` use the same bit: `Z[i + j(j-1)/2]` for `i < j`.
  An AND therefore needs `d(d+1)/2` random bits per evaluation.
- **Randomness optimisation** (`RAND_OPT`, first order only). The chi term has the form
  `ab + c`, where `c = x[i]` is independent of `a` and `b`. The shares of `c` therefore
  serve as masks for the two cross terms, and no fresh randomness is needed. This
  optimisation has a known, small weakness: the state bits become less uniform over the
  rounds. It can be switched off with `RAND_OPT = 0`, which then uses `Z` from `rand_i`.
- **Pipelined S-box** (`PIPELINED = 1`). The inner-domain terms are registered as well.
  The S-box then has one cycle of latency.
- **Double-clocked S-box** (`PIPELINED = 0`). There are no inner-domain registers, and
  the cross-domain registers capture on the *falling* edge. The result is ready before
  the next rising edge, so the S-box latency is zero. Inputs must be stable from the
  rising edge on. All timing paths through the S-box are half a clock period.

`dom_chi_row` is five `dom_and`s with `a = ~x[i+1]`, `b = x[i+2]`, `c = x[i]`. The sum
with `x[i]` happens inside the AND, which is what lets `x[i]` act as the mask.

Cost per S-box:
- `5(d+1)^2` ANDs;
- `(d+1)^2` flip-flops (pipelined) or `d(d+1)` (double-clocked);
- `5*d(d+1)/2` random bits per cycle, or none at first order with `RAND_OPT`.

## The slice-serial datapath (SERIAL-AREA, SERIAL-TP)

The state (`keccak_state`) holds 25 lanes of `W` bits per share. Each lane is a
circular FIFO, and bit 0 is its output end. The group of `SP` slices at the output
flows through one chain of step logic and is written back at the top of the FIFO:

```
state --> [pi] chi iota --> (+ message) --> theta --> state
```

`keccak_ctrl` decides per pass which stages are active. A *pass* streams all
`G = W/SP` slice groups once. A permutation of `NR = 12 + 2 log2(W)` rounds runs as:

1. **ABSORB** pass: XOR in the message (optional), then theta of round 0. Takes `G`
   cycles. It stalls while `din_valid_i` is low.
2. **RHO**:
   - SERIAL-AREA: `W` cycles. Lane `(x,y)` moves one bit towards bit 0 while the counter
     is below `(W - r(x,y)) mod W`, which amounts to a rotation by `r(x,y)`. Only a
     1-bit shift per lane is needed, so no wide multiplexers.
   - SERIAL-TP: one cycle, rho and pi applied to the whole state.
3. **PASS**: chi and iota of round `i`, chained with theta of round `i+1`. Takes
   `G + LAT` cycles. In SERIAL-AREA, pi is wiring in front of chi. pi only moves bits
   within a slice, so it can be done here.
4. RHO and PASS alternate. After the last RHO comes a **FINAL** pass: chi and iota
   only. Its output slices appear on `dout_o`.

Cycles: `G + NR*(W or 1) + NR*(G + LAT)`. `LAT` is 1 for a pipelined masked S-box and
0 otherwise.

**Theta across slices.** Theta adds two column parities to each bit: column `x-1` of
the same slice and column `x+1` of slice `z-1`. `theta_slices` keeps the column parity
of the last slice it processed in a 5-bit register per share.

Slice 0 has no predecessor when it passes, so it leaves with only half of its theta
update. `corr_o` holds the parity of slice `W-1`. In the cycle when the last group is
processed, `keccak_state` adds `corr_o` into slice 0. Slice 0 is then moving into the
FIFO's output position.

**S-box latency in the FIFO.** With a pipelined S-box, the write-back runs one cycle
behind the read. The pass therefore shifts the FIFO `G + 1` times. The first write is
garbage, because the pipeline is still empty. That slot leaves the FIFO exactly at the
last shift, so every slice ends up back in its place. The extra cycle per chi pass
accounts for the 24-cycle difference between the unprotected and protected counts.

## The round-parallel datapath (PARALLEL)

`keccak_parallel_core` computes a round in two steps:
- `pi(rho(theta(state)))` of every share goes into a register stage.
- On the next cycle, `5W` masked S-boxes compute chi and iota, and the state takes the
  result.

The register stage is needed in the masked cores: without it, glitches from the theta
XOR trees would reach the DOM ANDs. Pipelined S-boxes add a third cycle. Unprotected,
one round takes one cycle.

The rate is XORed into the state in the start cycle. That cycle is not counted in the
24/48/72.

This core also runs KECCAK-f[25] (`W = 1`), which is useful for small leakage
simulations.

## Interface of `keccak_dom`

All data ports are indexed `[share][slice][lane]`:
- lane `i = x + 5y`;
- slice `z` is bit `z` of every lane;
- only the first `RATE_LANES` lanes are ports.

A value is the XOR of its shares. The user must split the message into fresh random
shares and XOR the output shares back together.

| port | direction | meaning |
|---|---|---|
| `clear_i` | in | zero the state (only while idle) |
| `start_i`, `absorb_i` | in | start a permutation (only while idle). With `absorb_i`, the block on `din_i` is XORed into the rate first. Without it, the state is only permuted (squeezing). |
| `din_i`, `din_valid_i`, `din_ready_o` | in/in/out | Serial: `SP` slices per transfer, in ascending `z`, one transfer per cycle where valid and ready are both high. Parallel: the whole block, taken with `start_i`. |
| `rand_i` | in | fresh random bits, `NZ` per DOM AND, a new value every cycle. `NZ` is 1, and unused, at first order with `RAND_OPT`. |
| `dout_o`, `dout_valid_o`, `dout_group_o` | out | Serial: the rate slices of slice group `dout_group_o`, during the final pass. Parallel: the whole rate, valid for one cycle after the last round. |
| `busy_o`, `done_o` | out | permutation running; one-cycle pulse at the end |

Hashing with SHA3-256 on the default instance:
1. `clear_i`.
2. For each 136-byte padded block: split it into shares, pulse `start_i` with
   `absorb_i = 1`, stream 64 slices, and wait for `done_o`.
3. The digest is the first 256 rate bits of the last output. Byte `k` is bits
   `8(k mod 8)..` of lane `k/8`.

Reset (`rst_ni`, asynchronous, active low) clears the state and the control registers.
The DOM registers inside the S-boxes are not reset. They are data path only.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ARCH` | `ARCH_SERIAL_AREA` | datapath (see table above) |
| `SHARES` | 2 | `d+1`, protection order `d`; 1 = unprotected |
| `W` | 64 | lane length, power of two; KECCAK-f[25W] with `12 + 2 log2 W` rounds |
| `SP` | 1 | slices per cycle in the serial datapaths, power of two with `W/SP >= 2` |
| `PIPELINED` | 1 | S-box variant: 1 pipelined, 0 double-clocked |
| `RAND_OPT` | 1 | first-order randomness optimisation |
| `RATE_LANES` | 17 | lanes of the rate (17 = SHA3-256) |

The serial core has two more parameters, `LANE_ABS` (default 0) and `AW` (default `W`).
With `LANE_ABS = 1` a block arrives on `din_lane_i` as `RATE_LANES*W/AW` words of `AW`
bits, in message bit order, one per handshake. Each word is XORed into the state before
the first theta pass, so a block takes that many extra cycles. `AW` must divide
`RATE_LANES*W`. It may be a part of a lane or several lanes.

Round constants and rho offsets are not stored. They are computed at elaboration time
from their definitions in `keccak_pkg`:
- the round constants from the LFSR `x^8+x^6+x^5+x^4+1`, taking bit `2^j-1` of `RC[i]`
  from `rc(j + 7i)`;
- the rho offsets from the walk `(x,y) -> (y, 2x+3y)` with offset `(t+1)(t+2)/2`.

Any `W` therefore works.

## Files

| file | content |
|---|---|
| `rtl/keccak_pkg.sv` | types, constant functions (round constants, rho offsets, pi, DOM randomness indexing) |
| `rtl/dom_and.sv` | DOM AND, any order, pipelined or double-clocked |
| `rtl/dom_chi_row.sv` | masked 5-bit chi S-box |
| `rtl/chi_iota_slices.sv` | optional pi, chi and iota on `SP` slices |
| `rtl/theta_slices.sv` | iterative theta with the parity register |
| `rtl/keccak_rc.sv` | round-constant bits of the slices in flight |
| `rtl/keccak_state.sv` | FIFO state memory with iterative rho and one-cycle rho+pi |
| `rtl/keccak_ctrl.sv` | pass sequencer of the serial datapaths |
| `rtl/keccak_serial_core.sv` | SERIAL-AREA / SERIAL-TP core |
| `rtl/keccak_parallel_core.sv` | PARALLEL core |
| `rtl/keccak_dom.sv` | top, selects the core |
| `tb/keccak_ref_pkg.sv` | unmasked reference KECCAK-f, written from the specification with the published constants |
| `tb/tb_*.sv` | one self-checking testbench per module; `*_check.sv` are their per-configuration drivers |

## Verification

Each testbench ends with the line `TB_RESULT checks=N failures=M`. What they cover:
- `tb_keccak_dom` runs the default top end to end as SHA3-256:
  - the digests of `""` and `"abc"` against the published values;
  - a random three-block message and one extra squeeze against the reference sponge;
  - 3160 busy cycles per block plus the stall cycles;
  - that clear, absorption, absorb stalls, multi-block messages and squeezing each
    happened at least once.
- `tb_keccak_dom_archs` builds the top as SERIAL-TP and as PARALLEL (double-clocked).
  Each one hashes `"abc"`, and the test checks 1648 and 48 cycles.
- `tb_keccak_serial_core` runs thirteen configurations against the reference, with
  their exact cycle counts:
  - SERIAL-AREA and SERIAL-TP with the SHA3-256 known answer;
  - 3 shares;
  - double-clocked;
  - `SP = 2` at 5 shares, `SP = 4` and `SP = 8`;
  - unprotected;
  - KECCAK-f[200] at 3 shares without the randomness optimisation, and at 10 shares;
  - lane-based absorption of 64 bits (with the known answer) and 16 bits per transfer,
    and of two 8-bit lanes per transfer on KECCAK-f[200].
- `tb_keccak_parallel_core` runs six configurations, with their cycle counts:
  - pipelined (72 cycles) and double-clocked (48) with the known answer;
  - unprotected (24);
  - KECCAK-f[200] at 3 shares;
  - KECCAK-f[25] with and without the randomness optimisation.
- The block testbenches check the DOM AND from 1 to 4 shares, chi, theta streaming,
  every round-constant bit, every state-memory operation, and the sequencer's pass
  counts.

To simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/keccak_pkg.sv tb/keccak_ref_pkg.sv tb/tb_keccak_dom.sv --top-module tb_keccak_dom
./obj_dir/Vtb_keccak_dom
```

All testbenches finish in seconds. Functional tests say nothing about side-channel
security. Confirming the masking needs a leakage assessment, such as a t-test on
gate-level power traces of the synthesised netlist. This repository does not include
one.

## Departures and limits

- Only the three corner configurations can be selected. The architecture allows a
  synthesis-time choice, per step, between chaining it to the next step and writing
  back to the state. Other mixes of iterative and parallel steps are not built.
- The top absorbs slice by slice (serial) or a whole block at once (parallel). Lane-based
  absorption with a chosen width `AW` is a parameter of the serial core
  (`LANE_ABS`, `AW`, port `din_lane_i`), but the top does not bring it out.
- The serial datapaths need `W/SP >= 2`, so KECCAK-f[25] and fully unrolled `SP = W`
  only run on the parallel core.
- No random number generator is included. `rand_i` must be fed from a source of fresh,
  uniform bits. The masking is only as good as that source.
- Where the message, output and randomness ports sit, the valid/ready handshake,
  and where slice 0's theta correction is applied are this design's own choices. So is
  adding `c` to the inner-domain path when its shares are not used as masks.
- The double-clocked S-box relies on falling-edge flip-flops. The half-cycle paths must
  be constrained in synthesis.
