# Single stuck-at fault modelling with an inserted selector

A stuck-at fault is a line in a logic circuit that is permanently tied to
logic 0 (stuck-at-0, SA0) or logic 1 (stuck-at-1, SA1). A fault-free
description of a circuit cannot show such a defect, so it is modelled here
by putting a small selector into the line. Depending on its select code, the
selector passes the real value or forces a constant. Any logic simulator, or
the hardware itself, can then produce the faulty responses. Comparing them
with the fault-free responses shows which test vectors detect each fault.

The circuit under test is a two-stage network with four primary inputs:

    Y = AB + CD        gate 1: AND(A, B) -> line 5
                       gate 2: AND(C, D) -> line 6
                       gate 3: OR(line 5, line 6) -> Y

This RTL contains:

* the circuit with its fault model;
* a comparator and counter that find and count the detecting vectors;
* a hardware serial fault simulator that walks the complete fault list;
* the small example `Z = PQ + R`.

Everything is synthesizable SystemVerilog.

## Lines and faults

The six interconnects are numbered, and a fault site is one of them:

| line | signal                     |
|------|----------------------------|
| 1    | A                          |
| 2    | B                          |
| 3    | C                          |
| 4    | D                          |
| 5    | gate 1 output, AB (`v0`)   |
| 6    | gate 2 output, CD (`y0`)   |

Each line can be stuck at 0 or at 1, so there are 12 single stuck-at faults.
In the serial simulator, fault index `k` is line `k/2 + 1` stuck at `k % 2`.
The output Y is not numbered and is not a fault site.

A test vector is 4 bits written `A B C D` from MSB to LSB. For example,
`4'b1001` means A=1, B=0, C=0, D=1. The type is `ssf_pkg::vec_t`, and bit 3
is A.

## The fault selector (`stuck_at_mux`, `xor_fault_injector`)

`stuck_at_mux` is a 4-to-1 selector driven by a 2-bit select
(`ssf_pkg::fault_sel_e`):

| `sel` | name           | line value after the selector |
|-------|----------------|-------------------------------|
| 0     | `SEL_SA0`      | 0 (stuck-at-0)                |
| 1     | `SEL_SA1`      | 1 (stuck-at-1)                |
| 2     | `SEL_FREE`     | the fault-free value          |
| 3     | `SEL_FREE_ALT` | the fault-free value          |

`xor_fault_injector` models a functional, non-stuck fault. It computes
`z' = z` when `f = 0` and `z' = z xor f` when `f = 1`, so with `f = 1` the
line is inverted. For example, a buffer becomes an inverter.

`faulty_two_stage` puts a `stuck_at_mux` followed by an `xor_fault_injector`
on every numbered line. The `site` input (1..6, 0 = none) chooses the one
line that receives `sel` and `flip`. Every other line gets `SEL_FREE` and
`f = 0`.

In the reference model, a single selector sits on line 5, between gate 1's
output `v0` and gate 3's input `x0`. This is the same circuit with
`site = 5`. The selector on every line is a generalisation. It lets the
serial simulator inject every fault into one circuit instance.

## Which vectors detect which fault

A vector detects a fault when the faulty output differs from the fault-free
output. These are the detecting vectors of all 12 faults, from an exhaustive
sweep of 0000..1111:

| fault       | count | detecting vectors                                 |
|-------------|-------|---------------------------------------------------|
| line 1 SA0  | 3     | 1100 1101 1110                                    |
| line 1 SA1  | 3     | 0100 0101 0110                                    |
| line 2 SA0  | 3     | 1100 1101 1110                                    |
| line 2 SA1  | 3     | 1000 1001 1010                                    |
| line 3 SA0  | 3     | 0011 0111 1011                                    |
| line 3 SA1  | 3     | 0001 0101 1001                                    |
| line 4 SA0  | 3     | 0011 0111 1011                                    |
| line 4 SA1  | 3     | 0010 0110 1010                                    |
| line 5 SA0  | 3     | 1100 1101 1110                                    |
| line 5 SA1  | 9     | 0000 0001 0010 0100 0101 0110 1000 1001 1010      |
| line 6 SA0  | 3     | 0011 0111 1011                                    |
| line 6 SA1  | 9     | 0000 0001 0010 0100 0101 0110 1000 1001 1010      |

Every fault is detected, because the circuit is irredundant. Some faults
have the same truth table and so cannot be told apart from the output:

* SA0 on lines 1, 2 and 5 (and likewise on lines 3, 4 and 6);
* SA1 on lines 5 and 6.

With the fault on line 5, inverting the line (`f = 1`) is detected by the 12
vectors with CD = 0.

## Comparator and counter (`detect_counter`)

* **`flag`** is the XOR of the fault-free and faulty outputs. It is
  combinational and is not gated by `valid`.
* **`count`** is 4 bits wide and saturates at 15. On each rising edge where
  `valid` and `flag` are both high, `count` is incremented and `detected` is
  set. The first such edge also stores the current vector in `first_vec`.
* **`clear`** is synchronous and takes priority over counting. Reset is
  asynchronous and active low.

## Serial fault simulator (`serial_fault_sim`)

This block runs the textbook serial fault simulation algorithm in hardware.
It has four parts:

* `vector_generator`: steps through 0000..1111, one vector per clock;
* `faulty_two_stage`: one shared circuit instance;
* `golden_response_mem`: a 16 x 1 bit store addressed by the vector;
* `detect_counter`.

A run goes like this:

1. **True-value pass.** With no fault injected, all 16 vectors are applied
   and each output is written to the store. This takes 16 cycles.
2. **Fault passes.** For k = 0..11, the fault is injected by driving the
   circuit's `site` and `sel` inputs. The vectors are applied again, and
   each output is compared with the stored one. Afterwards, one save cycle
   copies `{detected, count, first_vec}` into `results[k]` and clears the
   counter.
3. **Fault dropping (optional).** If `drop_en` was high at `start`, a fault
   pass ends at its first detecting vector, and that fault's count is then
   1. Without dropping, every pass applies all 16 vectors, so the counts are
   the full numbers in the table above.

FSM: `S_IDLE -> S_GOOD -> (S_FAULT -> S_SAVE) x 12 -> S_DONE`.

Timing:

* `start` is accepted in `S_IDLE` or `S_DONE` and ignored while `busy`.
* `done` rises this many clock edges after the edge that accepted `start`:
  `16 + sum over faults of (vectors applied + 1)`.
* That is 220 edges without dropping and 100 with dropping, for this circuit.
* `results` is valid while `done` is high, and is cleared at the next
  `start`.

## Top level (`ssf_fault_sim_top`)

Three independent parts share the clock and reset:

| group           | ports | what it does |
|-----------------|-------|--------------|
| reference fault model | `a`, `s`, `f`, `cnt_en`, `cnt_clear` → `y`, `v0`, `y0`, `x0`, `flag1`, `count`, `detected`, `first_vec` | `faulty_two_stage` with its site fixed by `FIG4_SITE` (default 5), next to a fault-free `two_stage_cut` fed with the same `a`. `flag1` = outputs differ (combinational). `count` counts detecting vectors on clocks with `cnt_en`. |
| serial simulator | `sim_start`, `sim_drop_en` → `sim_busy`, `sim_done`, `sim_results[12]` | as described above |
| example | `p`, `q`, `r`, `pqr_sel` → `z` | `Z = PQ + R`, with the PQ line through a `stuck_at_mux` (sel 0 gives the stuck-at-0 example: Z reduces to R, and only P=Q=1, R=0 detects it) |

To reproduce the reference experiment:

1. Pulse `cnt_clear`.
2. Set `s`.
3. Apply `a` = 0000..1111 on 16 clocks with `cnt_en` high.
4. Read `count`. It is 3 for SA0 (first vector 1100), 9 for SA1 (first
   vector 0000) and 0 for either fault-free code.

## Files

| file | contents |
|------|----------|
| `rtl/ssf_pkg.sv` | sizes, `vec_t`, `line_t`, `fault_sel_e`, `fault_result_t`, fault-list functions |
| `rtl/stuck_at_mux.sv`, `rtl/xor_fault_injector.sv` | fault models of one line |
| `rtl/two_stage_cut.sv` | fault-free circuit |
| `rtl/faulty_two_stage.sv` | circuit with a fault model on every line |
| `rtl/detect_counter.sv` | comparator and detection counter |
| `rtl/vector_generator.sv`, `rtl/golden_response_mem.sv`, `rtl/serial_fault_sim.sv` | serial fault simulator |
| `rtl/pq_r_example.sv` | `Z = PQ + R` example |
| `rtl/ssf_fault_sim_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog that counts a failure if it hangs. From the project root,
run:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      --top-module tb_ssf_fault_sim_top -y rtl -y tb +libext+.sv \
      rtl/ssf_pkg.sv tb/tb_ssf_fault_sim_top.sv
    ./obj_dir/Vtb_ssf_fault_sim_top

Replace the top-module name to run any other testbench.

`tb_ssf_fault_sim_top` runs the whole design at its default parameters:

* all line-5 fault sweeps (SA0, SA1, both fault-free codes, inversion);
* a double sweep that saturates the counter;
* a full serial run with and without fault dropping, including its cycle
  count;
* the example circuit.

It also counts how often each mechanism occurred, and fails if one never
did.

The unit testbenches compare against independent reference evaluations, not
against the RTL:

* the combinational blocks are checked exhaustively;
* the counter is checked against a cycle-by-cycle model under random
  stimulus;
* the serial simulator is checked for all 12 results and its run length,
  in both modes.

Two modules carry concurrent assertions, which are checked when simulating
with `--assert`:

* `vector_generator`: a pass never ends before 1111.
* `serial_fault_sim`: `busy` and `done` are never high together, and a
  save cycle only follows a fault pass.

All testbenches pass, and each one was shown to fail against a
deliberately broken copy of its module.

## Where this design departs from the reference, or fills gaps

* **Clocked counting.** The reference implementation counted detecting
  vectors without any registers. Here the counter is a clocked, saturating
  4-bit register with enable and clear. The `first_vec`/`detected` outputs
  are additions.
* **One counter instead of three.** The reference simulation shows three
  4-bit counts, but not what each one counts. Only one counter is brought
  out for the line-5 model. The serial simulator gives per-fault counts
  instead.
* **Select codes 2 and 3.** The reference defines select 0 = SA0 and
  select 1 = SA1, and says the other select values give the fault-free
  output. Both unused codes of the 2-bit select pass the line.
* **Fault sites.** The reference puts a selector only on line 5. Here every
  line has one, chosen at run time.
* **Serial simulator structure.** The reference describes the algorithm
  only. The FSM, the fault-list order, the save cycle and the optional
  dropping are choices of this design. So are the hardware response store
  (the algorithm saves responses to a file) and the vector generator.
* **Two-valued logic.** Lines may also be considered stuck at an unknown
  value X, and a simulator may carry X and Z. This design is two-valued and
  models SA0, SA1 and line inversion only.
* **Gate delays.** These are taken as equal, and the model has zero delay.
* **Reset.** All state has an asynchronous active-low reset.
* **Multiple faults.** A multiple stuck-at fault can in principle be built
  with this selector approach, but it is not supported. `site` selects one
  line at a time.
* **Omitted example.** A further example circuit with inputs X1..X5, a
  latch and output Z, and its four test vectors, is not included. Its gate
  types and function are not known.
