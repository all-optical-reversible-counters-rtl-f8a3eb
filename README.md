# Reversible-logic counters built from two 4×4 reversible gates

Reversible logic maps each input vector to exactly one output vector, and back, so a
circuit built from it loses no information. That matters for low-energy and optical
logic, where the physical switch (here a semiconductor-optical-amplifier Mach–Zehnder
interferometer) naturally behaves as a reversible element. Sequential circuits are
awkward in this style because a flip-flop needs feedback and, in its usual form, discards
its old state.

This design answers that with two new 4-input, 4-output reversible gates, a **T gate**
and a **D gate**. Either gate, with its first input used as the clock, one output fed
back as the stored state and one constant 0 input, behaves as a T or D flip-flop with a
single gate. From those flip-flops and 2×2 Feynman gates it builds four 4-bit counters:

| counter | flip-flops | Feynman gates | behaviour |
|---|---|---|---|
| asynchronous up | 4 × T | 3, control 1 | ripple count 0,1,…,15,0 |
| asynchronous down | 4 × T | 3, control 0 | ripple count 0,15,14,…,1,0 |
| ring | 4 × D | none | one-hot 1000 → 0100 → 0010 → 0001 |
| Johnson | 4 × D | 1, control 1 | 0000 1000 1100 1110 1111 0111 0011 0001 |

The SystemVerilog here describes the logic function of these circuits: the gates as
combinational permutations, the flip-flops as registers whose next state the gates
compute, and the counters built from them. The optical hardware that would carry them
(MZI switches, power splitters and combiners, NRZ pulse sources) is not modelled.

## The two gates

Both are combinational permutations of the 16 vectors `{A,B,C,D}`; P always copies A.

**T gate** (`rtl/rev_t_gate.sv`)

    P = A
    Q = B·C' + A'·B + A·B'·C      A=0: Q = B        A=1: Q = B xor C
    R = Q xor D
    S = A'·C + A·B

**D gate** (`rtl/rev_d_gate.sv`)

    P = A
    Q = A'·C + A·B                A=0: Q = C        A=1: Q = B
    R = Q xor D
    S = A'·B + A·C                the input Q did not select

Read with A as a select line, each gate is a small function of B and C with the
information the function would lose moved to S. XORing Q with D into R keeps the D
input recoverable. Example: the T gate maps `1001` to `1010`.

For the D gate the published truth table and the published gate equations differ. The
table has S = A'·B' + A·C, and R is swapped for inputs 0010 and 0011. Both versions are
permutations, and they agree on Q, the output the flip-flop uses. This RTL follows the
equations, which also match the stated rule that R is Q xor D.

## From a gate to a flip-flop

This is the part of the design that needs the most care. Both flip-flops wire their gate
the same way:

    A = clock     B = previous state     C = T or D input     D = 0
    P, S = garbage (unused)              R (= Q, since D = 0) fed back to B

Taken literally, that is a combinational loop:

* **T gate:** with the clock low, Q = B, so the loop holds. With the clock high,
  Q = B xor T. For T = 1 the loop would then invert for as long as the clock stays high.
* **D gate:** with the clock low, Q = C, so the loop follows the data. With the clock
  high, Q = B, so it freezes. The value held through the high phase is therefore the
  data present when the clock rose.

The RTL breaks each loop with a single edge-triggered register (`state`). The gate sits
in the register's feedback path, with its A input tied to the level at which the loop
loads:

* `rev_t_ff`: A = 1. At each rising edge, `state <= state xor t`. That is one toggle
  per clock rather than an oscillation.
* `rev_d_ff`: A = 0. At each rising edge, `state <= d`, the value the frozen loop would
  hold.

Both flip-flops trigger on the **rising edge**. For the T flip-flop this choice is forced
by the counters: clocking each stage from the previous stage's *complement* (Feynman
control 1) has to count *up*, and that holds only for rising-edge stages. Both
flip-flops also have an asynchronous, active-high reset (`rst`). The published T
flip-flop has none. The ring counter needs one to start from 1000, and two-state
simulation needs a defined state. `rev_d_ff` has a `RESET_VALUE` parameter for that
purpose.

## Feynman gates: complements and fan-out

The Feynman gate (`rtl/feynman_gate.sv`) gives P = A and Q = A xor B. The reversible
flip-flops have no inverted output, and reversible logic forbids plain fan-out. So a
Feynman gate sits wherever a flip-flop output must go to two places:

* With control B = 1 it gives the signal and its complement. The up counter clocks the
  next stage from the complement. The Johnson counter feeds the last stage's complement
  back to the first stage.
* With control B = 0 it gives two copies. The down counter clocks the next stage from
  the true output.

The two control values are named `rev_pkg::FG_COMPLEMENT` and `rev_pkg::FG_COPY`.

## The counters

**Ripple up/down** (`rev_async_up_counter`, `rev_async_down_counter`)

* `count_pulse` clocks stage 0.
* `count_en` drives every T input. Normally it is held at 1; 0 freezes the count.
* Behind each stage except the last, a Feynman gate outputs the count bit on P and the
  next stage's clock on Q.
* Up counter: a stage falling 1→0 gives the next stage a rising edge.
* Down counter: a stage rising 0→1 gives the next stage a rising edge.
* Each counter is four T gates plus three Feynman gates, 7 gates in all.
* There is no register between stages. As in any ripple counter, `count` is valid only
  once the ripple has settled (zero time in RTL simulation). The stage clocks are
  derived from flip-flop outputs. For synthesis to hardware, treat them as generated
  clocks.

**Ring** (`rev_ring_counter`)

* Four D flip-flops on a common clock. The last stage feeds the first.
* Reset loads 1 into the first stage and 0 into the others.
* The single 1 moves one stage per clock and comes back every N = 4 clocks.
* An assertion in the module checks that exactly one stage is high at every clock edge
  outside reset.

**Johnson** (`rev_johnson_counter`)

* Like the ring counter, but the first stage takes the complement of the last. A
  Feynman gate with control 1 provides it.
* Reset clears all stages. The counter then runs through 2N = 8 states: the same
  division ratio as an 8-stage ring counter, with half the stages.

**Top** (`rev_counters_top`)

* Places the four counters side by side. Each has its own clock, enable (where there is
  one), reset and output ports, prefixed `up_`, `down_`, `ring_` and `johnson_`.
* They share nothing. The original work presents them as four separate circuits, not as
  one system.

In every output vector, bit 0 is the first stage (Q_A). When a state is written
"first stage leftmost", as in 1000 → 0100, bit 0 is the leftmost character.

### Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| counters, top | `N` | 4 (`rev_pkg::COUNTER_BITS`) | number of stages |
| `rev_d_ff` | `RESET_VALUE` | 0 | state loaded by `rst` |

The published circuits are all 4 bits wide. The modules are written for any N ≥ 2;
only N = 4 has been simulated.

## Where this RTL departs from the published circuits

* **Registers in the loops.** The gate-with-feedback flip-flops become rising-edge
  registers whose next state is the gate's R output, as described above. The gates'
  garbage outputs P and S are left unconnected.
* **Reset.** Asynchronous, active-high resets are added to every flip-flop and counter.
  The published design shows a RESET line only on the D-flip-flop counters.
* **D gate S and R outputs.** These follow the gate equations where they disagree with
  the published truth table; see "The two gates".
* **Up counter Feynman control.** The published up-counter drawing labels the Feynman
  control line 0, but the accompanying description gives 1 for the up counter and 0 for
  the down counter. The description was followed. With 0, the circuit counts down.
* **Fan-out in the shift counters.** The ring and Johnson counters send each D
  flip-flop's output both to the port and to the next stage, as the published drawing
  does. No Feynman gate is added for that fan-out.
* **Not modelled:** the optical layer, that is the SOA–MZI switch, the MZI networks that
  realise each gate, splitters, combiners and pulse generators. The MZI switch's port
  behaviour is not specified precisely enough to model it.

## Files

    rtl/rev_pkg.sv                 shared constants (counter width, Feynman control values)
    rtl/rev_t_gate.sv              4x4 reversible T gate
    rtl/rev_d_gate.sv              4x4 reversible D gate
    rtl/feynman_gate.sv            2x2 Feynman (CNOT) gate
    rtl/rev_t_ff.sv                T flip-flop from one T gate
    rtl/rev_d_ff.sv                D flip-flop from one D gate
    rtl/rev_async_up_counter.sv    ripple up counter
    rtl/rev_async_down_counter.sv  ripple down counter
    rtl/rev_ring_counter.sv        ring counter
    rtl/rev_johnson_counter.sv     Johnson counter
    rtl/rev_counters_top.sv        the four counters side by side
    tb/<module>_tb.sv              one self-checking testbench per module

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops, and carries a
watchdog that counts a failure if the test hangs. For example, with Verilator 5:

    verilator --binary --timing --assert rtl/rev_pkg.sv rtl/*.sv \
        tb/rev_counters_top_tb.sv --top-module rev_counters_top_tb -Mdir obj
    ./obj/Vrev_counters_top_tb

Replace `rev_counters_top_tb` with any other testbench name to run that test.

The testbenches compare against values worked out independently of the RTL:

* **`rev_t_gate_tb`:** the T gate's full published truth table. It also checks that the
  gate is a permutation, and the example vector 1001 → 1010.
* **`rev_d_gate_tb`:** the D gate's published P and Q columns, plus the R and S rules
  above. It also checks that the gate is a permutation.
* **`feynman_gate_tb`:** all four input combinations.
* **Flip-flop testbenches:** the published T and D flip-flop tables, 200 random inputs
  against a reference model, and the asynchronous reset.
* **Counter testbenches:** each sequence, both wrap-arounds of the ripple counters,
  `count_en` freezing the count, the ring period of N and the Johnson period of 2N.
* **`rev_counters_top_tb`:** runs all four counters at once, at the default size, from
  unrelated clocks. It also resets them in mid-count. It counts each of these events
  (up wrap, down wrap, enable hold, ring return, Johnson loading 1 and 0, reset) and
  fails if any never happened.

All testbenches pass. A deliberately broken copy of each module was also run against
its testbench, and every testbench reported failures.

Verilator reports `PINCONNECTEMPTY` warnings for the gates' unconnected garbage outputs
inside the flip-flops. These are intended: garbage outputs have no load by definition.
