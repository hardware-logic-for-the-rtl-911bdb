# Shift-register event selection for a two-chamber cylindrical detector

Proportional wire chambers can fire far more often than a computer can record
events. This design sits between the chambers and the computer. It throws away
most of the background within a few hundred nanoseconds and spends more time
only on events that survive.

It works in three stages of increasing cost:

1. **Fast parallel logic.** Coincidence gates on the raw wire signals give a
   *pre-trigger* ("at least one track") in one clock. The pre-trigger freezes
   the event in memory flip-flops. Two clocks later, a track count decides
   whether the event is worth a closer look.
2. **Sequential logic.** A surviving event is held in shift registers and
   moved one step per clock. This lets one wired coincidence circuit test
   every position in turn, instead of building a circuit for every position.
   Moving the stripe image along the beam axis (*translation*) finds the polar
   angle θ and the origin z of tracks. Turning the wire image around the axis
   (*rotation*) counts tracks of chosen shapes.
3. **Decision and read-out.** The event is accepted or rejected. An accepted
   event is written into a derandomizing buffer, which the computer drains at
   its own pace.

The whole system is one *busy* flip-flop: the pre-trigger sets it. A reject at
any stage clears it, and so does the end of read-out. Nothing else needs to
know whether the system is busy.

The design follows the small trigger system proposed in the DESY report 72/13
(1972), "Hardware Logic for the Selection and Analysis of Events Observed in
Chamber and Counter Experiments". The block structure, detector sizes and
principles come from that report. Clocking, widths, the control word, the θ-z
geometry details and the read-out format are this design's own; see
[Departures and choices](#departures-and-choices).

## Detector and numbering

| Item | Value |
|---|---|
| Chambers | 2 cylinders, radius 200 mm (inner) and 300 mm (outer) |
| Chamber lengths | 500 mm and 800 mm; the outer one overhangs 150 mm at each end |
| Anode wires | one every 3° in φ: 120 per chamber, 240 in total |
| Cathode stripes | 2 cm wide, across the beam axis, each covering half a circle |
| Stripe count | 2 chambers × 2 cathode layers × 2 half-circles × (25 or 40) = 260 |
| Step clock | 10 MHz (100 ns) |

- **Wires** enter `wire_in[239:0]`. Bits 0..119 are the inner chamber and bits
  120..239 the outer chamber. Bit *i* of each chamber sits at φ = 3°·*i*.
- **Stripes** enter `stripe_in[259:0]` in the order given by
  `trig_pkg::stripe_index(chamber, cathode, half, z)`:
  - inner chamber: `cathode*50 + half*25 + z`
  - outer chamber: `100 + cathode*80 + half*40 + z`

  In both, `z = 0` is the stripe at the chamber's starting end.

All sizes and the geometry are in `rtl/trig_pkg.sv`. The θ-z offsets are
computed from them when the design is elaborated.

## Stage 1: pre-trigger and busy master

Signals are active high throughout. Everything is synchronous to one clock,
with an asynchronous active-low reset.

- `phi_telescopes` makes one *direction telescope* per inner wire:

      d[i] = a[i] AND OR over k = -3..+3 of ( b[i+k] AND acc_ctrl[k+3] )

  Indices wrap around the circle. The seven `acc_ctrl` bits set how far the
  outer hit may lie from straight radial, so the acceptance can be narrowed
  from outside. `any_track` is the OR of all 120 directions.
- The fast condition is `any_track AND counter_in AND machine_gate`.
  `counter_in` stands for the counter coincidence made by ordinary fast
  electronics, outside this design.
- `pretrigger_master` gives `pretrigger` for one clock when the condition
  holds and the system is not busy. The pre-trigger sets `busy`, and `busy`
  blocks only the pre-trigger itself. Because every later stage starts from the
  pre-trigger, no other block needs a busy input. `clear` (any reject, or end
  of busy) resets the flip-flop.
- Two saturating 24-bit scalers count pre-triggers (`pretrig_count`) and
  conditions lost while busy (`lost_count`). A lost condition counts once, on
  its rising edge, so two arrivals on consecutive clocks count as one. The pre-trigger rate shows
  whether the logic is overloaded.
- `input_delay` holds all 500 detector signals back by one clock.
  `event_memory` then loads them in parallel on the pre-trigger. So the stored
  image is the one that caused the pre-trigger.

## Stage 2: track counting on the stored event

A second telescope bank reads the static outputs of the wire memory. Its
outputs feed two blocks.

- **Counting.** `track_counting` is strobed one clock after the pre-trigger.
  Its steps are:
  1. `cluster_condenser` replaces each run of adjacent fired directions by a
     single one: `B_i = A_i AND NOT A_(i-1)`, around the ring. A ring that is
     entirely set counts as one cluster.
  2. `majority_counter` counts the ones. It is a digital adder tree with a
     per-line veto and strobed threshold outputs.
  3. The count is compared with the window `ctrl.trk_min .. ctrl.trk_max`.
     Inside the window gives `main_trigger`; outside gives `reject`.

  A rejected event therefore holds the system for 3 clocks (300 ns): the
  pre-trigger, the strobe and the registered reject.
- **Angular correlation.** `angular_correlation` ANDs the OR of a 120° sector
  with the OR of the opposite 120° sector. There are six such pairs, rotated by
  30° from one to the next, and their outputs are ORed into `collinear`. The
  properties of this OR:
  - It can never fire when all tracks lie within 60°.
  - It always fires when two tracks are at least 90° apart.

  It is a rough back-to-back test.

## Stage 3: the θ-z translation scan

This is the least obvious part of the design.

**What a telescope looks like.** A track from a point z₀ on the beam axis,
leaving at polar angle θ, crosses the inner chamber at
z₀ + 200 mm·cot θ and the outer chamber at z₀ + 300 mm·cot θ. Label a θ
interval by *j*, the number of inner stripes between the source point and the
inner crossing (j = −8..+8, 17 intervals). The outer crossing is then 1.5·j
stripes away.

A θ-z telescope for interval *j* is:

- the inner stripe *j* steps from the source, AND
- the OR of the outer stripes that overlap ±½ stripe around the outer crossing
  point.

That outer OR is one stripe when the point falls on a stripe centre, and two
when it falls on a stripe boundary.

**Why translation instead of many circuits.** Building these telescopes for
every possible origin would take (origins × θ intervals) circuits. Instead
there is one fixed source point and one row of 17 telescopes. The event is
moved past them:

- On `main_trigger`, each half-circle's inner and outer stripes are loaded
  into a `translation_register`. The two cathode layers are ORed together.
- Each step shifts both registers by one stripe. Inner and outer stripes have
  the same pitch, so one shift moves the whole event 2 cm along z relative to
  the source point.
- At step *t* the source point is at the centre of inner stripe *t*. A
  telescope firing at step *t* therefore says: origin near stripe *t*, angle
  in interval *j*.

**Offsets.** `theta_z_telescopes` computes the outer leg at elaboration. It
uses the radii, the pitch and the 150 mm overhang of the outer chamber. The
result, as outer-stripe offsets relative to the step number:

| j | −8 | −6 | −4 | −2 | 0 | 2 | 4 | 6 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| outer stripes | −5,−4 | −2,−1 | 1,2 | 4,5 | 7,8 | 10,11 | 13,14 | 16,17 | 19,20 |

Odd *j* give a single stripe (e.g. j = −1 → 6, j = 1 → 9).

The registers carry zero padding on the low side: 8 inner and 5 outer
positions. This lets backward-going tracks be tested near the chamber's start.

**Counting.** `theta_z_counter` looks at both half-circles during the first
25 steps, one per inner stripe. It counts, in 4 bits that stop at 15, every
(step, half, θ) where a telescope in a selected θ interval fires
(`ctrl.theta_sel`). It also keeps the first such combination: `found`, `half`,
`z`, `theta`.

**Ambiguity.** Neighbouring (origin, θ) combinations overlap within the
half-stripe tolerance. A single clean track therefore fires at its true origin
and usually also one or two steps earlier, with a neighbouring θ. The first
stored combination can thus lie up to two steps before the true origin.
Several tracks, stripe clusters or noise add further combinations. The count
is a measure of how many track-like combinations the event holds, not an exact
track count. It is meant to be stored and refined in software, not trusted as
a precise fit.

## Stage 3 (parallel): rotation patterns

During the same turn, `rotation_pattern_unit` holds the inner and outer wire
rings in circular shift registers and turns them one wire (3°) per step,
120 steps for a full turn.

A small set of fixed wired configurations looks at a window of ±4 outer wires
around inner wire 0. Each step at which a configuration matches adds one to its
8-bit saturating count in `pattern_count`. The default configurations are:

| # | Configuration | Condition |
|---|---|---|
| 0 | straight | inner wire and an outer wire within ±1 |
| 1 | curved one way | outer hit 2–4 wires ahead |
| 2 | curved the other way | outer hit 2–4 wires behind |
| 3 | collinear pair | a straight track at position 0 and another at 180° |

After one turn each count is the number of places in the event where that
shape occurs. The masks are parameters (`IN_MASK`, `OUT_MASK`, `OPP`), so
other shapes can be wired in, such as scattering kinks or decay topologies.

The same turn also counts the fired wires of each chamber as they pass
position 0 (`wire_count`).

The turn also runs a balance test. At each step, the straight directions are
split into two half circles by a line through the axis. The step counts when
both halves hold a track. After the turn, `sym_count` = 120 means no half
plane contains all the tracks, as momentum conservation requires of a
complete event. A lower count means the event is one-sided at some
orientations.

All these counts go to the control side; the decision box does not use them.

## Decision, read-out and buffer

`one_turn_clock` gives the 120 step pulses and then `done`. On `done`,
`decision_box` accepts the event only if every enabled criterion holds:

- at least `ctrl.dec_trk_min` tracks in φ;
- if `use_phi`, a direction inside the `ctrl.phi_sel` mask;
- if `use_copl`, the collinearity bit;
- if `use_tz`, at least `ctrl.tz_min` θ-z combinations.

A reject clears busy. An accept starts `readout_system`, which writes one
35-word record into `derand_fifo` (128 × 16 bits, first-word fall-through):

| Word | Contents |
|---|---|
| 0 | `{4'hE, event number[11:0]}` |
| 1 | track count in φ |
| 2 | `{tz_count[3:0], found, half, z[4:0], theta[4:0]}` |
| 3–17 | wire memory, 16 wires per word, wire 0 in bit 0 of word 3 |
| 18–34 | stripe memory, 17 words, the same way |

The memories shift out one word per clock. Writing pauses while the buffer is
full. After the last word, `end_busy` pulses and frees the system. The computer
reads through `rd_en`, `rd_data` and `rd_valid`. The buffer holds three full
records.

An accepted event takes about 1 + 2 + 120 + 1 + 35 ≈ 160 clocks (16 µs)
before the next pre-trigger is possible.

## Example circuits beside the system

Three small circuits of the same kind do not fit the two-chamber geometry,
so they have their own ports on the top:

- **`scint_telescopes`** (`ex3_*`). Three plane chambers a, b, c plus a
  scintillator s. Direction i fires when s, a[i], one of b[i-1..i+1] and one
  of c[i-1..i+1] are all hit.
- **`flat_telescopes`** (`exf_*`). A row of 48 direction telescopes for two
  flat chambers with equal wire spacing. The far chamber b is half as far
  beyond chamber a as chamber a is from the source line. Telescope i pairs
  a wires 2i and 2i+1 with the b wires 2i−1..2i+2. These are the b wires that
  straight tracks through that a cell reach, when they start within one
  a cell of the telescope's axis. Neighbouring telescopes share two b wires.
- **`wire_z_scanner`** (`exz_*`, containing `wire_z_decoder`). This is a
  plane chamber of 16 wires whose cathode is cut into two sets of stripes,
  inclined left and right. Both stripe sets are read out at the wire pitch. A
  hit on wire w at distance k along it lies under left stripe w−k and right
  stripe w+k. The position is then the triple coincidence
  wire AND left AND right.

  Only one decoder is built, and it has six positions. The stored event is
  shifted through it instead of wiring a decoder to every wire:
  - `scan` moves the wires and both stripe rows by one position.
    `exz_idx` is the number of the wire now at the decoder.
  - `trans` moves the left row up and the right row down by one position.
    Every crossing point then appears one stripe closer to the wire end, so
    the event slides along the wires; `exz_off` counts these steps.

  A point at wire w, distance z shows up as `exz_z[z − off]` when
  `exz_idx = w`. The decoder also encodes this: valid, the lowest position,
  and a flag for more than one.

## Departures and choices

- **Angular correlation.** The source describes the six 120° sector pairs and
  also claims two properties: "never fires within 30°" and "always fires
  unless the tracks fit in 60°". The second does not follow from 120° sectors.
  This design builds the 120° sectors. The guarantees it actually gives are the
  two listed under Stage 2.
- **Fast counter.** The source uses an analog summing amplifier with
  discriminator levels and about 200 inputs. `majority_counter` is the digital
  equivalent, sized for the 120 directions. Levels 1, 1, 2 and 8 correspond to
  the source's ">0, ≥1, ≥2, ≥8".
- **Clock and timing.**
  - Everything runs from one 10 MHz clock. Overlap timing of asynchronous
    chamber pulses is replaced by sampling. The wires jitter by about
    240 ns, so the front end must stretch each hit until it overlaps the
    clock edge that sees the fast condition. The inputs are assumed to be
    stretched that way.
  - The 200 ns analog delay lines become a one-clock register stage.
  - A rejected pre-trigger costs 300 ns; the source budgets about 0.5 µs.
- **Stripe geometry.**
  - The chamber lengths, the split of the 260 stripes, ORing the two cathode
    layers, and the half-stripe tolerance are this design's reading of a
    sparse set-up drawing.
  - The source mentions inclined stripes, which remove ambiguities. The
    system here uses stripes across the axis, as in its set-up, and accepts
    the ambiguities described above.
  - The inclined-stripe scheme appears only in the plane-chamber scanner
    example. Its size, and the reading of the stripe numbering from a sketch,
    are this design's.
- **φ and θ-z found independently.** The source outlines a full sequence
  for chambers with inclined stripes. First, rotate until a wire coincidence
  gives φ. Then translate until wires and stripes agree, giving z and θ.
  Here the stripes run across the axis and each covers half a circle, so a
  stripe says nothing about φ beyond its half. The θ-z scan therefore runs on
  each half on its own, alongside the wire rotation, and the two results are
  not paired track by track.
- **Flat-chamber telescope groups.** The source gives the chamber
  distances and the number of telescopes. The b-wire group of each telescope
  is derived here from the geometry, not taken from the source.
- **One busy master.** The source's general diagram has a second master
  flip-flop for the main trigger. The concrete system has one, and so does
  this design.
- **Not built.** The event display and the computer are not built; the
  computer's side is the buffer read port and the `ctrl` word. Analog parts
  are not built either: preamplifiers, discriminators and delay one-shots.
- **Decision rule.** How the decision criteria combine (AND of the enabled
  ones), the read-out record and the buffer depth are not given in the source.

## Files

- `rtl/trig_pkg.sv`: sizes, geometry functions, the `ctrl_t` control word.
- `rtl/trigger_top.sv`: the complete system; the other `rtl/` files are its
  blocks, one module per file.
- `tb/<module>_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
- `tb/trigger_top_tb.sv`: runs the top at its default size through collinear
  pairs, multi-track events, single tracks, beam-pipe showers, cosmics, gas
  interactions, gate-off and pile-up events. It checks each result against an independent model. It
  fails if any of these never happens: pre-trigger, main trigger, fast
  reject, decision reject, read-out, lost pre-trigger, buffer stall, gate
  blocking, the three-chamber and flat-chamber telescopes, a scanner hit before and after
  translation, the fired-wire counts and the balance test.
- `tb/trigger_rates_tb.sv`: drives the top with random arrivals at the
  intended rates and prints the measured loss:
  - single tracks at 10⁵/s: about 2.4 % lost, 300 ns busy per reject;
  - two-track events at 10⁴/s, each taking a full turn: 12.5 µs busy per
    event, about 14 % lost;
  - accepted events at 10²/s through a slow reader: every record complete.

## Simulating

With Verilator 5, list the package first:

    verilator --binary --timing -Wno-fatal -j 4 \
        rtl/trig_pkg.sv $(ls rtl/*.sv | grep -v trig_pkg) \
        tb/trigger_top_tb.sv --top-module trigger_top_tb
    ./obj_dir/Vtrigger_top_tb

Replace the testbench and top name to run any other block's test. Things to
change:

- detector sizes and θ range: `trig_pkg`;
- rotation shapes: the `IN_MASK`/`OUT_MASK`/`OPP` parameters of `rotation_pattern_unit`;
- buffer depth: `FIFO_DEPTH` on `trigger_top`;
- event selection at run time: the fields of `ctrl`.
