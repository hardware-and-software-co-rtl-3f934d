# Hardware fault grading of an embedded core: a BIST verification engine for ISCAS-85 C17

A core's test set is only as good as the faults it catches. This RTL answers
that question in hardware. It injects every single stuck-at fault into a
core, one fault at a time. It runs the test patterns against each fault and
checks the response against the fault-free one. It then reports the fault
coverage and which pattern first caught each fault. The core under test is the
ISCAS-85 benchmark C17. The patterns come either from an on-chip pseudorandom
generator or from a stored deterministic test set.

The design follows the built-in self-test (BIST) verification scheme of the
thesis *Hardware and Software Co-Design in Space Compaction of Cores-Based
Digital Circuit* (L. Jin, University of Ottawa). In that work the scheme was
run as software around a vendor simulator. Here it is synthesizable
SystemVerilog. With the thesis's seed, a pseudorandom run reproduces the
thesis's C17 results exactly: the same 22 patterns, 22 of 22 faults detected,
and the same count of new detections per pattern (9, 2, 0, 4, 4, 3, then 0).

## Block structure

```
            start/stop, det_mode (select line)
                 |
  ptpg ----+     v                    fault_injector (line, stuck, enable)
           +--> tpg_mux --pattern--+        |
  dtpg ----+                       |        v
                                   +--> c17_mut (11 fault_inject_mux) --response--+--> mut_response
                                   |                                              |
                                   |    ff_signature_table --expected-->  response_comparator
                                   |    (written in the fault-free pass)          | mismatch
                                   |                                              v
                                   +----------------------------------> bist_controller
                                                                          | det
                                                     fault_counter <------+------> result_memory
```

| module | role |
|---|---|
| `bist_verifier_top` | Top level. Wires the blocks together and brings out the totals, a read port to the counters and one to the result memory, and the raw MUT response. |
| `bist_controller` | Sequencer. Runs the fault-free pass, then walks through the faults in order and applies patterns to each until it is detected or the patterns run out. |
| `ptpg` | Pseudorandom pattern generator (multiplicative congruential, see below). |
| `dtpg` | Deterministic pattern generator: a small ROM holding a compact test set. |
| `tpg_mux` | Test-source select. |
| `fault_injector` | Decodes the current fault into select codes for every injection mux. |
| `fault_inject_mux` | One per line. Either passes the line's value or forces it to 0 or 1. |
| `c17_mut` | C17 (six 2-input NANDs) with an injection mux on each of its 11 lines. |
| `ff_signature_table` | Fault-free response for every pattern index. |
| `response_comparator` | Flags a response that differs from the fault-free one. |
| `fault_counter` | Counts, for each pattern, the faults it was the first to detect, plus the total. |
| `result_memory` | One record per detected fault: line, stuck value, pattern index, pattern, faulty response. |
| `bist_pkg` | Shared constants, the select-code enum, the C17 line enum and the record struct. |

## Injecting a stuck-at fault without changing the circuit

Every *mutually exclusive line* of the core is cut in two and an injection
multiplexer sits in the gap. For C17 these lines are the 5 primary inputs, the
2 primary outputs and the 4 internal nets. The mux has two select bits, SelA
and SelB:

| SelA SelB | line carries |
|---|---|
| 0 0 | its own value |
| 0 1 | 0 (stuck-at-0) |
| 1 0 | 1 (stuck-at-1) |
| 1 1 | its own value |

The encoding follows the truth table given for the injection mux. The prose of
the thesis gives the opposite assignment for 01 and 10. The two agree only if
the prose's select code is read as {SelB, SelA}.

A fault sits on a whole net. A stuck internal net, such as N11 or N16, reaches
all of its fanout branches. 11 lines times 2 polarities gives 22 faults, the
collapsed fault count reported for C17. `fault_injector` makes sure that at
most one mux is in a forcing state at a time. This is the single-stuck-at
fault model.

## The pseudorandom generator and its 32-bit wrap

`ptpg` computes `ran <- (ran * 16807) mod (2^31 - 1)`, a Park-Miller
"minimal standard" generator. Each step yields one pattern bit, `ran mod 2`.
A pattern for an N-input core therefore takes N clocks. The first number
drives the first input. The default seed is 1050420308.

One detail matters if you want the published pattern sequence. The original
generator ran in 32-bit `unsigned long` arithmetic, so the product
`ran * 16807` wraps at 2^32 before the modulo. `ptpg` reproduces that wrap. The
exact Park-Miller recurrence gives a different sequence. Only the wrapped
version matches the published C17 patterns 01110, 00010, 01110, 00001, 01010,
...

No divider is needed. Write the 32-bit product as `hi*2^31 + lo`. Then the
product mod (2^31 - 1) is `lo + hi`, minus 2^31 - 1 if the sum reaches it. The
testbench checks this against plain 64-bit arithmetic.

## How a run proceeds

1. **Start.** Pulse `start` while idle or done. `det_mode` picks the source:
   0 for pseudorandom, 1 for deterministic. The mode is sampled at start. The
   counters and the result memory are cleared.
2. **Fault-free pass.** The generator restarts and all patterns are applied
   with no fault injected. The response to pattern *k* is written to entry
   *k* of the signature table.
3. **Fault passes.** Faults go in this order: line 0 stuck-at-0, line 0
   stuck-at-1, line 1 stuck-at-0, and so on. Lines are numbered inputs first
   (N1 N2 N3 N6 N7), then outputs (N22 N23), then wires (N10 N11 N16 N19).
   For each fault the generator restarts, so pattern *k* is the same pattern
   in every pass. Patterns are applied one by one:
   - A mismatch means the fault is detected. The counter of pattern *k* is
     incremented, a record is written, and the engine moves to the next fault
     at once.
   - A fault that survives the last pattern counts as escaped.
4. **Done.** `done` stays high until the next start. `fault_total` holds the
   number of faults graded and `detected_total` the number detected. Their
   ratio is the fault coverage. `cnt_rd_addr` reads the per-pattern counters
   and `log_rd_addr` reads the records. `stop` aborts a run at any time.

The number of patterns in a pseudorandom run is 2 × (inputs + outputs +
wires), capped at 199. For C17 that is 22. A deterministic run uses the
stored set of 5 vectors.

**Timing.** The MUT, the signature-table read and the comparator are all
combinational. One pattern is therefore judged in the clock in which the
generator presents it. Restarting the generator costs one clock per fault. The
pseudorandom generator needs 5 clocks to build a C17 pattern, plus one clock
for the handshake. The deterministic one presents a vector every clock. With
the defaults, a full pseudorandom run takes 556 clocks after the start clock
and a deterministic run takes 89.

## Results it reproduces

Pseudorandom run, default parameters:

| pattern (N1 N2 N3 N6 N7) | 01110 | 00010 | 01110 | 00001 | 01010 | 10101 | 7th..22nd |
|---|---|---|---|---|---|---|---|
| new faults detected | 9 | 2 | 0 | 4 | 4 | 3 | 0 |

Coverage is 22/22, the same as the published grading of C17. The
deterministic ROM holds these 5 vectors (N1..N7): 00000, 00001, 00101, 01010,
10111. The set also detects 22/22, with 7, 4, 2, 4, 5 new faults per vector.

## Where this RTL departs from, or goes beyond, the source

- **Deterministic vectors.** The source gives only the size of the C17
  deterministic set, which is 5. The vectors above were chosen for this design.
- **No space compactor.** The source proposes zero-aliasing space compactors
  that reduce a core's outputs before comparison. Its only worked compactors
  belong to a 17-gate example circuit, and that circuit's gate-level netlist
  is not fully specified. Its C17 coverage results were also obtained without
  a compactor. The engine therefore compares the raw C17 response. That
  response is available on `mut_response` at the point where a compactor
  would attach.
- **Replaying patterns.** The original flow stored the fault-free simulation
  results and replayed the patterns from them. Here the pattern generator is
  restarted for every fault. This gives the same pattern sequence and needs no
  pattern storage. The signature table keeps only the responses.
- **Result storage.** Results went to a host file in the original flow. Here
  they go to an on-chip counter bank and record memory.
- **Design choices.** These are not taken from the source: the valid/next
  handshake between the generators and the controller, the asynchronous
  active-low reset, the counter widths (8 bits, saturating) and the record
  layout.
- **Other ISCAS-85 circuits.** The source also grades C432 to C6288. Those
  netlists are not part of this RTL. Pattern counts up to 199 are supported,
  but the injection decoder, the line enum and the record widths are sized for
  C17. Supporting another core means writing its fault-injectable MUT in the
  style of `c17_mut` and widening `LINE_W` and the record struct in
  `bist_pkg`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_bist_verifier_top` runs the engine end to end. It checks every counter,
  every log record and the clock count against an independent reference model
  in the testbench, and it counts how often each mechanism happened. A second
  engine limited to 3 patterns is included so that faults also escape.
- `tb_bist_verifier_full` is one full run at default parameters. It compares
  the result with the published C17 grading.

To build and run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv tb/tb_bist_verifier_top.sv \
          --top-module tb_bist_verifier_top -Mdir obj_top
./obj_top/Vtb_bist_verifier_top
```

Replace the testbench name to run any other test. The modules are found
through `-Irtl` because each file is named after its module. Each test runs in
well under a second.

Lint with `verilator --lint-only -Wall -Irtl rtl/bist_pkg.sv rtl/bist_verifier_top.sv`.
Two kinds of warnings remain and are expected:

- `rst_n` is used both as an asynchronous reset and in the assertions'
  `disable iff`.
- The comparator's `diff` output is not used at the top.
