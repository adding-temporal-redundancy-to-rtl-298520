# Temporally redundant delay-insensitive code (TRDIC) link

Quasi-delay-insensitive (QDI) asynchronous links tolerate any delay, but a
particle strike that flips a bit can break them. In a 1-of-4 link a single
flipped rail is a complete data token. It can create a word out of nothing or
wipe one out, and the four-phase handshake may deadlock.

This design protects such a link by sending every data token twice, spread
over time rather than over extra wires:

* Each 1-of-4 digit (2 data bits) is re-coded as a **2-of-5** digit that
  combines the token being sent with the token sent just before it. A 2-of-n
  code needs two rails to complete, so one stray rail on an idle link no
  longer makes a word.
* The receiver therefore sees every token twice: first as the "new" half of
  one code word, then as the "old" half of the next. A **double check** passes
  on only a token that appears in both places. A spurious third rail (an
  *invalid corrupted datum*, ICD) is dropped.
* The number of words in flight does not change. No extra handshake tokens
  are added: the redundancy rides on words that are sent anyway.

The RTL covers the encoder, the 2-of-5 link (16 weak-conditioned half-buffer
stages, 32 data bits), the decoder, and the C-element and completion-detector
cells they are built from. Every C-element has a strike input, so single-event
effects can be injected in simulation.

```
 sender ──1-of-4──► trdic_encoder ──2-of-5──► qdi_link (16 × WCHB) ──2-of-5──► trdic_decoder ──1-of-4──► receiver
  tx_data/tx_ack                                   ▲ see[1279:0]                                rx_data/rx_ack
```

## The code

Rails are written `[4:0]` for a code digit and `[3:0]` for a data digit, with
`0001` being rail 0. For each digit, with `prev` the token sent before and
`cur` the token being sent:

| case          | code[3:0]     | code[4] | example (prev, cur → code)  |
|---------------|---------------|---------|-----------------------------|
| `prev != cur` | `prev \| cur` | 0       | 0001, 0010 → `00011`        |
| `prev == cur` | `cur`         | 1       | 0001, 0001 → `10001`        |

Distinct pairs give six words and repeats give four, so all ten 2-of-5 words
are used. The code does not record which rail is the newer one. The receiver
knows the old token already, and the other rail is the new one.

**Decoding** (per digit, `expected` = the token the receiver is waiting to
confirm):

```
decoded[j]       = C(code[j], expected[j])                       j = 0..3
next_expected[j] = OR_{k != j} C(code[j], decoded[k])  OR  C(code[4], decoded[j])
```

For example, `00011` with expected `0001` decodes to `0001`, and `0010` is
expected next. Then `00110` decodes to `0010`, and `0100` is expected next. If
that second word had arrived as the ICD `01110`, it would still decode to
`0010`.

**One-word lag.** A token is confirmed only when the next word arrives, so the
output stream is one word behind the input:

* After reset, the encoder's "previous token" and the decoder's "expected
  token" hold the same value, `INIT` (default `0001` in every digit,
  `trdic_pkg::init_tokens()`). The first word the receiver gets is `INIT`
  itself. It carries no data and must be dropped.
* To flush the last real word, the sender sends one dummy word after it. That
  dummy is never delivered.

## How the asynchronous circuits are modelled

The real circuits are clockless. Here, every C-element is one state bit,
updated on a common clock `clk`:

```
q <= maj(a, b, q) ^ see
```

This is a unit-delay, discrete-time model. It is synthesizable, has no
combinational loops and simulates quickly. `clk` is only the time base of the
model. All handshakes are closed by completion detection, so correctness never
depends on how many steps a transition takes. Throughput in "steps per word"
is a property of the model, not a timing estimate for silicon.

The strike input `see` inverts the stored bit for one step. That single rule
gives the two fault types a C-element shows under radiation:

* **SET (transient).** In the driven states, where both inputs agree (`000`,
  `111`), the majority restores the output on the next step.
* **SEU (upset).** In the holding states (`010`, `100`, `011`, `101`), the
  flipped value is kept.

Charge, pulse width and electrical filtering are analog effects. The RTL
does not model them: a strike always flips the cell for one step. The
charge-sweep testbench (below) adds a per-state critical-charge filter in
front of the strike pins.

## Handshake and the WCHB stage

All channels use four-phase return-to-zero signalling: data, ack, spacer
(all rails low), ack. The ack polarity follows the usual WCHB drawing:

* `ack = 1`: the stage is empty and requests data.
* `ack = 0`: the stage holds data.

`wchb_stage` contains:

* Per rail, `q[i] = C(d[i], ack_in)`.
* Per digit, a completion detector (`cd_mofn`):
  * 1-of-n: the OR of the rails.
  * 2-of-n: one C-element per pair of rails, ORed (ten for 2-of-5). A single
    rail never completes a digit.
* Over all digits, a C-element tree (`c_tree`), then an inverter, giving
  `ack_out`.

A chain of `DEPTH` stages holds `DEPTH/2` words. A 16-stage, 16-digit 2-of-5
link has 16 × (80 + 160 + 15) = 4080 C-elements. The same link in 1-of-4 has
16 × (64 + 15) = 1264. These equal the asynchronous-cell counts reported for
the reference 32 nm implementations of those links.

## Encoder and decoder loops

Both ends keep the previous token in a ring of three 1-of-4 WCHB registers.
The last register resets to `INIT` and the other two reset to spacer: one token
and two bubbles, so the ring can always move.

* **Encoder (`trdic_encoder`).**
  * The incoming word and the ring's token go into `trdic_enc_core`. Its
    result is stored in a 2-of-5 output register that drives the link.
  * The incoming word is also copied into the ring.
  * The sender and the ring's last register are acknowledged by a C-element
    of the output register's ack and the ring's first register's ack (join
    and fork).
* **Decoder (`trdic_decoder`).** It has the same structure around
  `trdic_dec_core`. The checked token goes to a 1-of-4 output register, and
  `next_expected` goes into the ring.

`trdic_enc_core` is built entirely from delay-insensitive minterms (DIMS):
16 C-elements per digit, one per (`cur` rail, `prev` rail) pair. Each output
rail is an OR of minterms. The result equals the OR of the two tokens, but no
rail rises before *both* tokens are present. This matters. With a plain OR
gate, the previous token's rail would enter the link on its own and rest in
every link stage while the sender is idle. Two problems followed:

* The decoder confirmed words early, and even delivered the dummy tail word.
* One more rail raised by a strike would complete a false code word, which
  removes the protection of the 2-of-n code.

## What a strike does, and what is corrected

Strikes are injected on the link's register rails through
`see[k*DIGITS*5 + i]` (stage `k`, rail `i`). The encoder, decoder and ack
paths have no strike inputs; their robustness is outside this design's scope.

* **Idle 2-of-5 link.** A struck rail is held but does not complete a digit,
  so no word appears. It then merges with the next real word and makes that
  digit three-hot (an ICD).
* **ICD at the decoder.** The double check passes on only the rail shared
  with the expected token, so the extra rail does not reach the output. It
  does enter the value expected next, which becomes two-hot: the new token
  plus the stray rail. That value shrinks back to one rail at the following
  word, because it is computed from the checked token rather than from the
  raw expected token.
* **Not correctable.**
  * If the following word uses the stray rail, that word decodes two-hot.
  * If the stray rail is the extra rail `code[4]`, the checked token itself
    joins the next expected value. The following word then decodes two-hot
    if its new token equals the token sent two words earlier.
  * A fault that leaves a complete but wrong word (a valid corrupted datum,
    VCD) passes the double check. Two stray rails in one idle digit are an
    example.
  * A stronger decoder (a three-stage trellis) could catch more of these; it
    is not built.
* **1-of-4 link, for comparison.** The same strike on an idle link creates a
  valid spurious word.

Random-strike comparison (`tb_see_rate`):

* Setup: three channels, each 16 stages × 32 bits, hit by the same strikes,
  at 15 000 words per point. One word is taken as 6 ns (32 bits at
  5.33 Gbit/s). Strike intervals are 100, 200, 400 and 1000 ns.
* Result: in one run, failures were 355 for the 1-of-4 link, 261 for the
  plain 2-of-5 link and 128 for the TRDIC channel. Every failure was a wrong
  word; none was a stall.
* The order matches the published trend, but the gains are smaller: about
  2.8× against 1-of-4 and 2× against 2-of-5, where the published results show
  about 36× and 11×. Part of the gap comes from the model:
  * Strikes are counted in model steps, with no electrical filtering.
  * A failure here includes any deadlock or dropped word.
  * The TRDIC channel spends more steps per word (see below), so each word is
    exposed to more strikes.

Charge sweep (`tb_see_charge`):

* Setup: the same three channels at a fixed 5e6 strikes/s (one strike per
  200 ns on average), 8000 words per point. The normalized charge is swept
  over 0.05, 0.09, 0.11, 0.3, 0.8 and 1.0.
* A strike flips its cell only if the charge reaches the critical charge of
  the cell's present state {input, ack, output}. The thresholds are the
  published per-state values: 0.72 (`000`), 0.088 (`010`), 0.12 (`011`),
  0.097 (`100`), 0.1 (`101`) and 1 (`111`). The unlisted transitional states
  get the threshold of the driven state they are heading to: `001` gets 0.72
  and `110` gets 1.
* Result (failures per second, 1-of-4 / 2-of-5 / TRDIC), from one run:

  | charge | 1-of-4 | 2-of-5 | TRDIC |
  |---|---|---|---|
  | 0.05 | 0 | 0 | 0 |
  | 0.09 | 5.2e5 | 5.6e5 | 4.8e5 |
  | 0.11 | 8.3e5 | 4.4e5 | 4.2e5 |
  | 0.30 | 7.1e5 | 5.2e5 | 2.9e5 |
  | 0.80 | 1.2e6 | 1.1e6 | 4.8e5 |
  | 1.00 | 9.4e5 | 7.5e5 | 6.0e5 |

* The published curve has three features. The model reproduces two of them:
  * No failures below the electrical threshold.
  * A plateau once every holding state is sensitive.
* The published curve is flat beyond its knee. Here the rate rises again
  near 0.72, where the driven `000` state starts to flip. The published
  sweep uses its own normalization, to the largest charge it tried, so the
  two charge axes are not the same.
* Summed over the points, the TRDIC channel has the fewest failures (109,
  against 163 for 2-of-5 and 200 for 1-of-4).
* Transient width does not grow with charge in this model.

## Throughput in the model

With no strikes, the 16 × 32-bit channels move a word every:

* about 12 steps (1-of-4 link),
* about 14 steps (2-of-5 link),
* about 32 steps (complete TRDIC channel).

The TRDIC channel is limited by the encoder's and decoder's three-register
rings and their joins, not by the link. The claim that TRDIC keeps link
throughput close to 1-of-n holds for the link, where no tokens are added. The
encoder and decoder as drawn are slower, and their cost was left out of the
published comparison too.

`tb_link_perf` measures the two bare links with a sender and receiver that
never hold them back:

| link | steps per word | latency (steps) |
|---|---|---|
| 1-of-4 | 11.98 | 17 |
| 2-of-5 | 13.98 | 17 |

* The 2-of-5 cycle is 1.17 times longer. Its completion detection has one
  more C-element level per digit. The published 32 nm figures give 1.26
  (40.8 against 32.5 Gbit/s).
* The latency is the same in the model, because a word crosses each stage in
  one step whatever its code. The published figures show 1.13 times longer
  latency for 2-of-5 (1.37 against 1.21 ns). That difference comes from cell
  speed, which the model does not have.

## Modules

| module | role | default parameters |
|---|---|---|
| `trdic_pkg` | rail counts, word size, link depth, `INIT` token | 4 / 5 rails, 16 digits, 16 stages |
| `c_element` | C-element with strike input | `RESET_VAL=0` |
| `cd_mofn` | completion detector of one M-of-N digit | `N=5, M=2` |
| `c_tree` | N-input C-element tree | `N=16` |
| `wchb_stage` | WCHB register with completion detection | `DIGITS=16, N=5, M=2, INIT=0` |
| `qdi_link` | chain of WCHB stages with strike bus | `DEPTH=16, DIGITS=16, N=5, M=2` |
| `trdic_enc_core` | DIMS 1-of-4 → 2-of-5 conversion and join | `DIGITS=16` |
| `trdic_encoder` | encoder with previous-token ring | `DIGITS=16, INIT=0001…` |
| `trdic_dec_core` | double check and next expected token | `DIGITS=16` |
| `trdic_decoder` | decoder with expected-token ring | `DIGITS=16, INIT=0001…` |
| `trdic_top` | encoder + link + decoder | `DEPTH=16, DIGITS=16` |

`trdic_top` ports:

* `clk`, `rst_n` (asynchronous, active low).
* `tx_data[63:0]` and `tx_ack`: 16 1-of-4 digits from the sender.
* `rx_data[63:0]` and `rx_ack`: 16 1-of-4 digits to the receiver.
* `see[1279:0]`: the strike bus. Tie it to zero in normal use.

## Simulating

Every testbench in `tb/` is self-checking and ends with a
`TB_RESULT checks=… failures=…` line. For example, to build and run the
full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/trdic_pkg.sv tb/tb_trdic_ref_pkg.sv \
    tb/tb_trdic_top_full.sv --top-module tb_trdic_top_full
./obj_dir/Vtb_trdic_top_full
```

Other testbenches build the same way with their own name in place of
`tb_trdic_top_full`:

* **Cell and block tests** (`tb_c_element`, `tb_cd_mofn` (2-of-5, 1-of-4,
  2-of-3 and dual rail), `tb_c_tree`,
  `tb_wchb_stage`, `tb_qdi_link`, `tb_trdic_enc_core`, `tb_trdic_dec_core`,
  `tb_trdic_encoder`, `tb_trdic_decoder`). Each compares its block with values
  computed independently. They also cover protocol timing (the stage ack
  latency and the tree latency), link capacity, and strike behaviour.
* **End-to-end tests.**
  * `tb_trdic_top` runs 4 stages × 8 bits. `tb_trdic_top_full` runs the
    default 16 stages × 32 bits with no parameter overrides.
  * Both share `tb_trdic_env`. It sends random words with frequent repeats
    and makes the receiver stall so that back-pressure reaches the sender. At
    regular points it lets the link drain and strikes a waiting rail
    mid-link.
  * Each run must show repeated-token and distinct-token code words, the
    dropped initial word, the dummy tail word, sender stalls and corrected
    upsets.
* **`tb_see_rate`** runs the failure-rate comparison above, in about a minute
  of simulation. **`tb_see_charge`** runs the charge sweep, also in about a
  minute. Both drive the three channels of `tb_see_channel`.
* **`tb_link_perf`** measures link throughput and latency through
  `tb_link_meter`.

Simulations start from reset. Nothing relies on x-propagation.

## Where this RTL makes its own choices

* **Discrete-time model of clockless logic.** Each C-element is one clocked
  state bit (see above).
* **Ack polarity.** `1` means ready, `0` means taken, on all channels.
* **Reset value.** `INIT` = `0001` in every digit. Any valid token works if
  both ends agree.
* **Encoder conversion.** It is built fully as DIMS, so it also serves as the
  join. A plain OR gate would let the previous token run ahead (see above).
* **Next expected token.** It is derived from the checked token, so a
  fault-widened expected value recovers after one word.
* **First-word discard.** The decoder delivers the meaningless first word;
  the receiver drops it.
* **2-of-5 completion detection.** Pair C-elements are merged by an OR.
  Multi-digit words use a balanced C-element tree.
* **Strike inputs.** Only on link register rails.

## Not included

* The sender and receiver, which are only the environment of the link.
* The cell-level radiation characterisation, which is analog: deriving
  critical charges and pulse widths from the transistor level. The charge
  sweep uses the published per-state critical charges as given. It has no
  pulse-width or electrical-filtering model.
* Area, power and timing figures for a 32 nm library. The C-element counts
  above are the only structural numbers that can be compared.
