# Matched arbiter PUFs built with programmable delay lines

A physical unclonable function (PUF) answers a challenge with a response
fixed by the manufacturing variation of one chip. Nobody can copy it, so
protocols built on it are lopsided. Only the party holding the PUF can
evaluate it quickly; every other party has to simulate it from a model,
which is slow and costs energy.

This design removes that imbalance. Two (or more) parties keep their own
arbiter PUFs but tune them until they compute the same function. Each
arbiter PUF segment has a small delay difference between its two paths. The
parties agree on a common *template* PUF: in every segment, the template
difference is the larger of the two parties' differences. Each party then
appends extra segments built from FPGA look-up tables (LUTs). These extra
segments are *programmable delay lines* (PDLs): their delay depends on the
LUT's unused select inputs. Each one makes up for the shortfall of one of
its original segments. A rewritten challenge then steers every segment onto
the same arbiter path as the template segment it stands for. After this,
every party evaluates the shared function `E(c)` in one PUF evaluation. That
is enough for one-time-pad style message exchange (`R = E(c) ^ m`) and for
challenge-response authentication.

The RTL covers one party's platform and the circuit that measures LUT delays
at picosecond resolution. Parts that only exist as analog silicon (the PUF
race and the LUT delays) are behavioural models. Everything else is
synthesizable SystemVerilog.

## The arbiter PUF and why only delay differences matter

An n-segment arbiter PUF sends one rising edge down two paths. Segment `i`
has an upper delay `d0[i]` and a lower delay `d1[i]`. After segment `i`, a
pair of multiplexers steered by challenge bit `c[i]` either passes the two
paths straight on (`0`) or swaps them (`1`). A swap also swaps everything
the paths have collected so far. An arbiter at the end reports which path
won.

Only the running difference `upper - lower` decides the winner. At each
segment it grows by `d0[i] - d1[i]` and changes sign whenever the path
swaps. So each segment reaches the arbiter with sign

    sign[i] = c[i] ^ c[i+1] ^ ... ^ c[n-1]      (1 = counts negatively)

and the response is `1` when `sum(+/- diff[i]) > 0`. In this design, a `1`
means the lower path arrived first. Everything below relies on this sign
rule.

## Building a match

Two parties, A and B, each hold `n = 64` characterized differences (`own_d`
and `partner_d`, signed femtoseconds). `match_config`:

1. sets the template `T[i] = max(A[i], B[i])`;
2. for each segment where its own difference is below `T[i]`, takes the
   next free PDL slot, records which segment the slot serves (`slot_map`) and
   the shortfall `T[i] - own[i]` that it must add;
3. chooses the slot's setting. That is the select bits of the upper LUTs
   (`cu`) and of the lower LUTs (`cl`), plus how many LUTs each side chains
   (`luts`, 1..4). Their difference is `luts * (lut_delay(cu) - lut_delay(cl))`.
   The search tries every `(cu, cl)` pair, one per clock, with all four LUT
   counts in parallel. It keeps the setting closest to the shortfall; on a
   tie, the first one found wins.

For more than two parties, each party feeds as `partner_d` the per-segment
maximum of all the other parties' differences. Every party then arrives at
the same template, the maximum over all of them. To talk to a different
partner, a party simply runs `match_config` again with that partner's
differences. The PDLs are reprogrammed, and the PUF stays the same.

Between them, A and B use at most 64 slots. A segment whose differences are
equal needs a slot on neither side. The configurator takes
`N + 1024 * n_slots` cycles (about 33k cycles for one party of a 64-bit
pair). With fewer slots than needed (`NP < N`), it sets `overflow` and
leaves the remaining segments unmatched.

The LUT delay model (`puf_pkg::lut_delay_fs`) spans 1.248 ns for select bits
`00000` to 1.259 ns for `11111`, in even steps of about 0.355 ps. Stepped
settings cannot hit a shortfall exactly. The residual error is what makes
matched parties disagree on challenges whose race is very close. With the
PUF model's ±10 ps element spread, two matched 64-bit PUFs agree on about
99.5 % of random challenges in simulation. The published FPGA
implementation reports 98.64 %.

## Challenge reassignment

This is the least obvious part. The template PUF has `n` segments, but a
matched PUF has `n + NP` segments: the originals, then the PDL slots, each
with its own challenge bit. A template challenge `c_t` must become a longer
challenge `c_ext` that puts:

- original segment `i` on the template's path for segment `i`, and
- PDL slot `s` on the template's path for segment `slot_map[s]`, so that
  its delay adds to the segment it completes.

Written as wanted signs:

    want[i]   = ^c_t[n-1:i]                   i < n
    want[n+s] = want of template slot_map[s]  slot used
    want[n+s] = want[n+s+1]                   slot unused (its bit becomes 0)
    want[n+NP] = 0

By the sign rule, each bit is the change of wanted sign between its segment
and the next:

    c_ext[m] = want[m] ^ want[m+1]

Worked right to left, this is the procedure "assign the last bit, then the
one before it, ...". Here it is one combinational pass
(`challenge_reassign`), so a PUF evaluation still costs one clock.

Example with `n = 2`: suppose A needs one slot, for segment 0, and the
template challenge is `c_t = {c1, c0} = {1, 0}`. The template signs are
`want[1] = 1` and `want[0] = 1`. The slot copies `want[0] = 1`, and
`want[3] = 0`. So `c_ext = {1^0, 1^1, 1^1} = {1, 0, 0}` for bits 2..0. The
slot's bit is 1 and both original bits are 0. Every segment then still
counts negatively, as in the template.

## Protocols (`protocol_engine`)

`E(c)` is one bit, so messages go one bit per challenge. Operations:

| `op` | role | result on `out_bit` |
|---|---|---|
| `OP_ENCRYPT` | sender: fresh random `c` | `R = E(c) ^ m`, with `c` on `c_out` |
| `OP_DECRYPT` | receiver: `c_in = c`, `msg_in = R` | `m = E(c) ^ R` |
| `OP_AUTH_ISSUE` | verifier: fresh random `c`, keeps `E(c)` | `c` on `c_out` |
| `OP_AUTH_ANSWER` | prover: `c_in = c` | `R' = E(c)` |
| `OP_AUTH_CHECK` | verifier: `msg_in = R'` | `auth_ok = (R' == kept E(c))` |

Multi-party broadcast and pairwise encryption use the same operations. They
differ only in which parties were matched together. Random challenges come
from a 64-bit xorshift generator (`RNG_SEED`). That is a stand-in: a
deployed design would use a true random source.

Timing: `start` is accepted when `busy` is low. `out_valid` is set by the
second rising edge after the accepting edge (one edge launches the PUF, one
returns the response), or by the accepting edge itself for
`OP_AUTH_CHECK`.

## Measuring LUT delays (`delay_char`, `timing_error_catcher`)

One LUT's select-dependent delay difference is a few picoseconds. To measure
it, ten LUTs are chained as inverters (`lut_chain_cut`), all with the same
five select bits, and the chain is timed at-speed:

- the launch flip-flop toggles every cycle (inverter feedback), so every
  edge sends a transition into the chain;
- the sample flip-flop captures the chain output one cycle later;
- an XOR compares the sample with the value that should have arrived,
  which is the inverse of the launch flip-flop's present output;
- the capture flip-flop registers the mismatch as `err`.

`timing_error_catcher` counts `err` over `PULSES` (10,000) cycles of the
measurement clock. `err_count / PULSES` is the error probability at that
clock period. Sweeping the period gives the chain delay. In the bench setup
that sweep comes from an external generator and a ×32 PLL, both outside
this RTL. In simulation the delays have no jitter, so the probability jumps
from 0 to 1. With settings `00000` and `11111` the 10-LUT chain takes
12.48 ns and 12.59 ns, and a 12.54 ns clock tells them apart.

## Blocks and files

    puf_match_platform            top: one party + measurement circuit
    ├── match_config              template, slot allocation, PDL setting search
    ├── protocol_engine           encryption / decryption / authentication
    ├── challenge_reassign        template challenge -> matched-PUF challenge
    ├── matched_puf   (model)     64-segment arbiter PUF + 64 PDL slots
    ├── delay_char                launch / sample / capture + XOR
    │   └── lut_chain_cut (model) 10 LUT inverters
    │       └── pdl_lut   (model) LUT6 with select-dependent delay
    └── timing_error_catcher      error counter over 10,000 pulses
    puf_pkg                       types, op codes, delay models

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | PUF / template length |
| `NP` | 64 | PDL slots (a party never needs more than `N`) |
| `SEED` | 1 | process-variation seed of this party's PUF model |
| `RNG_SEED` | `64'h9E3779B97F4A7C15` | challenge generator seed |
| `N_LUT` | 10 | LUTs in the measured chain |
| `PULSES` | 10,000 | measurement window |
| `puf_pkg::MAX_LUTS` | 4 | LUTs per side of a PDL slot |

The top has two clock domains that never interact: `clk` for matching and
the protocols, and `meas_clk` for the measurement circuit. Delays and
differences are 32-bit signed femtosecond values. All resets are
asynchronous and active low.

## Models versus logic

- `matched_puf`, `pdl_lut` and `lut_chain_cut` model silicon behaviour.
  `matched_puf` computes the race arithmetically, from per-segment delays.
  The delays are a fixed hash of `SEED` and the segment index: 1.248 ns
  ±10 ps per path element. This gives a deterministic "device" that the
  testbenches can reproduce. The two LUT models use real `#` delays counted
  in femtoseconds. No arbiter metastability, noise or temperature drift is
  modelled.
- In an FPGA build, `matched_puf` becomes a hand-placed chain of LUT
  multiplexers and an arbiter flip-flop. The PDL slots become LUT pairs
  whose select inputs come from `slot_cfg`.
- Characterizing a PUF (regression over many measured challenge/delay
  pairs) and exchanging delay differences over a secure channel happen
  off-platform. `own_d` and `partner_d` are therefore inputs.

## Choices made here, and where the design departs from its source

- The sign of a segment is the parity of its own and all later challenge
  bits. This follows the multiplexer placement after each segment.
- Response polarity: `1` means the lower path wins.
- The launch flip-flop toggles every cycle, as its inverter feedback
  implies. So falling transitions are launched as well as rising ones.
- The LUT delay grows evenly between the two measured end points. Real
  LUTs show an irregular map, with the largest gap (11 ps) between `00000`
  and `11111`. To model a real device, replace `lut_delay_fs` with a
  measured table.
- The number of LUTs per PDL side (up to 4), the exhaustive setting search,
  all widths, handshakes, latencies, the overflow flag and the random
  generator are this design's own choices.
- Where both parties' differences are equal, neither adds a slot. Slots then
  total less than `n`, rather than exactly `n`.
- Not built: the stream generator used for statistical randomness tests.
  It shuffles the outputs and XORs them into the next inputs, but neither
  the shuffle nor the output width is defined.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and checks its block
against a reference written separately from the RTL. The testbenches and
what they cover:

- `tb_full_size`: the top at full defaults. It configures against a partner
  modelled in the testbench and checks 1,000 responses exactly against this
  party's reference model. It requires at least 95 % matching accuracy
  against the partner, encrypts 200 bits for the partner, and runs two
  10,000-pulse measurements. It takes under a second.
- `tb_puf_match_platform`: four parties. A and B match each other, C is an
  unmatched outsider and D has too few slots. It checks the shared template,
  accuracy (A–B at least 95 %, A–C near 50 %), decryption, authentication
  (accepted and rejected) and measurements on both sides of the timing
  limit. It also counts that each mechanism actually occurred.
- `tb_multi_party`: three parties matched to one template. It checks
  pairwise accuracy, a broadcast received by both others, and re-matching
  one party to a single partner.
- `tb_delay_sweep`: the measurement procedure for all 32 configurations.
  It bisects the clock period where errors appear (200-pulse windows) and
  recovers each per-LUT delay to within 5 fs, with 11 ps between `00000`
  and `11111`.
- One testbench per block: `tb_match_config`, `tb_challenge_reassign`,
  `tb_matched_puf`, `tb_protocol_engine`, `tb_delay_char`,
  `tb_timing_error_catcher`, `tb_lut_chain_cut`, `tb_pdl_lut`.

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/puf_pkg.sv tb/tb_ref_pkg.sv tb/tb_full_size.sv --top-module tb_full_size
    ./obj_dir/Vtb_full_size

Replace `tb_full_size` with any other testbench name. The packages must
come first on the command line; `-y` finds the remaining modules by file
name. The `ZERODLY` warning on the LUT delay model is expected: its delay
depends on the select inputs at run time.
