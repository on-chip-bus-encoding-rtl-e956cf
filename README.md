# Encoded on-chip buses for LC crosstalk reduction

A long global bus in a deep-submicron chip switches slowly or quickly
depending on how its wires switch *relative to each other*. With capacitive
coupling alone, the worst case is a wire switching against both neighbours
(`↑↓↑↓↑`). At GHz frequencies on wide, low-resistance upper-metal wires, mutual
*inductance* matters too. Each switching wire's current then induces a current
opposing it in every other wire that switches the same way. So the slowest
cycle becomes the one in which **all wires switch in the same direction**
(`↑↑↑↑↑`). In that regime, the pattern that the capacitance-oriented codes
favour is the fast one, so those codes can leave the delay unchanged or make it
worse.

This RTL implements two bus codes for this problem. Each is a transmitter and
a receiver placed at the two ends of the wires:

| link | idea | wires for N data bits | when to use |
|---|---|---|---|
| **bus-invert** (`bi_encoder`, `bi_decoder`) | send the complement of a word whenever more than half of the wires would switch the same way | N + 1 | inductance dominates (long wires, GHz clocks) |
| **flexible code set** (`flex_encoder`, `flex_decoder`) | carry K data bits as one of 2^K chosen M-bit codes; every transition between two chosen codes meets the delay constraint | M ≥ K | any mix of capacitive and inductive coupling; the code set comes from circuit simulation of the actual wires |

`lc_bus_top` holds both links side by side. The physical wires between
transmitter and receiver are analog, so they are not in the RTL: each
transmitter's wires are top-level outputs and each receiver's wires are
top-level inputs. Connect them directly, or through your own wire model.

## The bus-invert link

### The rule

Compare the new data word `x(n)` bit by bit with the word now on the wires.
Call a bit *rising* if it goes 0→1 and *falling* if it goes 1→0. If at least
`ceil((N+1)/2)` bits would rise, or at least that many would fall, send `~x(n)`
and signal the inversion on one extra wire, `INV`.

Inverting makes every bit that would have switched stay where it is, and
every bit that would have stayed switch instead. So a word where most wires
would switch the same way becomes one where few wires switch. The `INV` wire
switches too, and that switch must also be counted. The code guarantees this
bound, including `INV`:

* odd N: at most (N+1)/2 of the N+1 wires switch in the same direction;
* even N: at most N/2 of the N+1 wires switch in the same direction.

Take an 8-bit bus whose data goes from `00000000` to `00111111`. Six wires
would rise. The encoder instead sends `11000000` and switches `INV`. Two data
wires and `INV` switch, and the six wires that would all have risen stay quiet.
The all-same-direction pattern can no longer occur on the bus. The maximum
inductive overshoot comes from that same pattern, so it goes away too.

The code does not avoid opposite-direction patterns such as `↑↓↑↓`. Those are
the fast patterns when inductance dominates, and the worst ones when
capacitance dominates. That is why this link is meant for inductance-dominated
buses only.

### The encoder datapath (`bi_encoder`)

```
in_data ──┬──────────────────────────────────────────────┐
          │                                              ▼
          ▼            q_l ──► majority_voter L ─┐      XOR row ──► bus_data reg ──► wires
  bi_codeword_gen  ◄── bus_data (x(n-1))         ├─ OR ─►│
                       q_h ──► majority_voter H ─┘       └──────► INV logic ──► bus_inv reg
```

* `bi_codeword_gen` classifies each bit: rising → `(q_l,q_h)=(0,1)`,
  falling → `(1,0)`, stable → `(0,0)`.
* `majority_voter` counts its inputs with a carry-save tree of full adders
  (3:2 compression column by column, then one small adder). It fires at
  `THRESH = ceil((N+1)/2)`. Its depth grows as log₁.₅N full adders. This is
  what makes the encoder's delay grow slowly with N, and also why very wide
  buses should be split into sub-buses separated by ground wires.
* The OR of the two voter outputs decides the inversion, and the XOR row
  applies it.
* The `INV` wire is coded differently for the two parities of N:
  * **odd N, level coded:** `INV(n)` = "this word is inverted".
  * **even N, transition coded:** `INV` toggles when the word is inverted and
    holds otherwise. So the encoder needs the previous `INV` level as an extra
    input.

  With these codings, each parity meets the bound given above. A short proof is
  in the encoder's header comment, and the encoder checks it with an assertion
  on every launched word.

The comparison uses the word that is *on the wires* (the launch register),
not the previous raw input. Only that comparison removes same-direction
switching on the wires themselves when the previous word was sent inverted.

### The receiver (`bi_decoder`)

* odd N: invert the received word when `INV` is high;
* even N: invert it when `INV` differs from its level in the previously
  received word.

The previous level is kept per received *word*, not per clock cycle. Idle
cycles, in which the wires hold, therefore do not look like toggles.

## The flexible code-set link

For a given wire geometry, frequency and delay constraint, some transitions
between M-bit bus words are fast enough and others are not. A *valid code set*
is a set of 2^K words in which every transition between any two members is
fast enough. K data bits are then carried on M wires, where M − K is the wire
overhead. If power is also being minimised, the code set can be chosen among
the valid ones for low total transition power. The code set can also be chosen
for a bus whose wires are partly replaced by shield wires.

Finding the code set is a design-time job, and it is not part of this RTL.
The usual approach has these steps:

1. Extract the RLC of the wires.
2. Simulate one single-wire transition per wire. The bus model is linear, so
   any transition's waveforms are the sum of these.
3. Build a graph whose edges are the transitions that meet the constraint.
4. Look for a large clique in that graph.

The hardware only needs the result: a table.

* `flex_encoder` drives `CODE_TABLE[d*M +: M]` for data word `d` from a
  launch register.
* `flex_decoder` compares the received word with all 2^K table entries in
  parallel and returns the index of the one that matches. If none matches,
  it raises `out_err` and returns 0.

Both blocks take the table as the packed parameter `CODE_TABLE`, with entry `d`
at bits `[d*M +: M]`. Encoder and decoder must be given the same table, and its
codes must all differ.

**Default code set.** The default is a 2-bit to 3-wire example: on a 1000 µm
bus with a 30 ps constraint, the plain 2-bit bus fails when its two wires
switch in opposite directions. The codes are:

| data | code |
|---|---|
| 00 | 000 |
| 01 | 001 |
| 10 | 100 |
| 11 | 101 |

The middle wire never switches, so it acts as a quiet separator. These are the
characterised delays of the 3-wire bus:

| transition | delay |
|---|---|
| one outer wire | 24.6 ps |
| outer wires in the same direction | 19.7 ps |
| outer wires in opposite directions | 29.2 ps |

All of them are under the 30 ps constraint. The testbench checks every
transition the encoder makes against these numbers.

For wider codecs (3→4 … 6→8, or 6 data bits on 7 wires with 73 valid codes),
set `K`, `M` and `CODE_TABLE`. The delay and area of the codec grow quickly
with K. A wide bus is better split into groups of a few bits, with shields
between the groups, and each group encoded on its own.

## Top level and timing

`lc_bus_top` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `BI_N` | 8 | bus-invert data width (a typical 8-bit bus) |
| `FLEX_K` | 2 | flexible-link data width |
| `FLEX_M` | 3 | flexible-link wire count |
| `FLEX_CODES` | the 2→3 table above | flexible-link code table |

| port group | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `bi_in_valid`, `bi_in_data[BI_N]` | in | word to send on the bus-invert link |
| `bi_tx_bus_data[BI_N]`, `bi_tx_bus_inv`, `bi_tx_bus_valid` | out | the N+1 bus wires and a valid strobe, from the launch register |
| `bi_tx_inv_event` | out | the word now on the wires was sent inverted |
| `bi_rx_bus_data`, `bi_rx_bus_inv`, `bi_rx_bus_valid` | in | the same wires at the receiving end |
| `bi_out_valid`, `bi_out_data` | out | decoded word |
| `flex_in_valid`, `flex_in_data[FLEX_K]` | in | word to send on the flexible link |
| `flex_tx_bus_code[FLEX_M]`, `flex_tx_bus_valid` | out | bus wires and valid strobe |
| `flex_rx_bus_code`, `flex_rx_bus_valid` | in | the same wires at the receiving end |
| `flex_out_valid`, `flex_out_data`, `flex_out_err` | out | decoded word; `err` = received word not in the code set |

Timing:

* Each link has one register at the transmitter, so all wires switch on the
  same clock edge, and one register at the receiver.
* With the wires tied straight through, a word entering with `*_in_valid` comes
  out with `*_out_valid` exactly 2 clocks later.
* Throughput is one word per clock.
* While `*_in_valid` is low, the wires hold their value and cause no
  transitions.
* After reset:
  * the bus-invert wires and `INV` are 0;
  * the flexible wires hold the code of data word 0, so they always carry a
    member of the code set.

## Files

| file | content |
|---|---|
| `rtl/lc_bus_pkg.sv` | default sizes, the default code table, threshold and bound functions |
| `rtl/bi_codeword_gen.sv` | per-bit rising/falling classifier |
| `rtl/majority_voter.sv` | full-adder-tree threshold detector |
| `rtl/bi_encoder.sv` | bus-invert transmitter, with the same-direction bound as an assertion |
| `rtl/bi_decoder.sv` | bus-invert receiver |
| `rtl/flex_encoder.sv`, `rtl/flex_decoder.sv` | code-set transmitter and receiver |
| `rtl/lc_bus_top.sv` | both links |
| `tb/tb_*.sv` | one self-checking testbench per module. `tb/bi_enc_lane.sv` is a helper that runs one encoder width against a reference model. |

## Verification

Every testbench computes its expected values on its own, prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_bi_codeword_gen`: all 256 input pairs of a 4-bit instance, plus random
  pairs on an 8-bit instance.
* `tb_majority_voter`: every input pattern for all widths from 2 to 11, plus a
  non-default threshold.
* `tb_bi_encoder`: widths 2 to 11 at once, 3000 cycles each. Stimulus is biased
  towards all-rising, all-falling and all-switching words. The test compares
  the wires, `INV`, valid and inversion flag with a reference model, and checks
  the same-direction bound. Every width must see inversions and idle cycles.
* `tb_bi_decoder`: even (4-bit) and odd (5-bit) receivers, with idle cycles
  between words.
* `tb_flex_encoder` / `tb_flex_decoder`: the default 2→3 table, plus a 3→4
  table made from `code(d) = (5d+3) mod 16`, non-member words, and the
  30 ps delay check above.
* `tb_bi_table2_patterns`: the eleven characterised switching patterns of
  a 5-bit bus (all five wires switching, plus the lone-switch reference), in
  both polarities and from both invert-wire levels. With an odd width, every
  pattern in which all five wires switch has at least three going one way, so
  it is always inverted. Only the invert wire then switches. The inductive
  worst case `↑↑↑↑↑` (about 50 % slower than a lone switch) never reaches the
  wires.
* `tb_lc_bus_top`: both links end to end at the default sizes, 20 000 cycles,
  with 2-cycle latency checks. It counts inversions, plain words, `INV`
  toggles, idle cycles, all-same-direction data words, injected non-member
  codes and every flexible data word, and fails if any count is zero. It
  reports the most wires switching one way: 8 in the raw data against 4 of
  the 9 encoded wires.

To run one with plain Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lc_bus_pkg.sv tb/tb_lc_bus_top.sv --top-module tb_lc_bus_top
./obj_dir/Vtb_lc_bus_top
```

## What to trust and where this departs from the scheme

* **Delay is not modelled.** The RTL implements the codes exactly. How much
  faster the bus gets depends on the wires, which the RTL does not contain.
  The only delay numbers used are the characterised 3-wire table in the
  flexible-link test.
* **Encoder gate structure.** The voters are written as a full-adder tree, as
  intended, but synthesis is free to restructure them. An 8-bit encoder's
  critical path is expected to be around 10 FO4: codeword generator, voter,
  OR, XOR. That is a sizeable part of a 14–16 FO4 clock cycle, so budget for
  it or merge the encoder into the logic that produces the data.
* **Choices not fixed by the scheme itself:**
  * the valid qualifiers and holding the wires while idle;
  * the launch and receive registers, and so the 2-cycle latency;
  * the reset values;
  * the order in which data words are assigned to the four default codes;
  * the decoder's `out_err` flag;
  * the encoder's `inv_event` output.
* **Even-width invert wire.** Transition coding with the N/2 bound is
  implemented as the rule above implies. The even-width encoder reads the
  previous `INV` level straight from its own launch register.
* **Not in the RTL:**
  * the wires themselves, with their drivers, receivers and repeaters;
  * shield placement (shields are simply extra power/ground tracks, best
    spread uniformly among the signal wires);
  * the design-time flow that finds a code set and the longest bus it allows.

  Only wider codecs' *code tables* are missing. Their hardware is the same
  parameterised encoder and decoder.
