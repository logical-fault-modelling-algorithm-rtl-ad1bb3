// ssf_fault_sim_top: single stuck-at fault modelling and simulation of the
// two-stage circuit Y = AB + CD.
//
// Three parts stand side by side:
//   * The fault model of the reference circuit: a faulty_two_stage with its
//     fault site fixed at line 5 (gate 1 output V0 feeding gate 3 as X0),
//     driven from the ports a, s and f, next to a fault-free two_stage_cut
//     driven by the same vector. flag1 is high whenever the two outputs
//     differ; a detect_counter counts, on each clock with cnt_en high, the
//     vectors that detect the fault, and remembers the first one.
//   * A serial_fault_sim that, on sim_start, walks the whole list of 12
//     single stuck-at faults (lines 1..6, SA0 and SA1) over all 16 vectors
//     and reports per fault whether, how often and first where it is
//     detected.
//   * The introductory example Z = PQ + R with a selectable fault on its PQ
//     line (pq_r_example).
//
// Timing: the fault model and the example are combinational; the counter
// and the simulator are clocked by clk, with an asynchronous active-low
// reset. The port names of the fault model (a, s, y, v0, y0, x0, flag1,
// count) follow the reference simulation; the fixed site is the parameter
// FIG4_SITE.
module ssf_fault_sim_top
  import ssf_pkg::*;
#(
  parameter line_t FIG4_SITE = line_t'(5)
) (
  input  logic          clk,
  input  logic          rst_n,
  // fault model of the reference circuit
  input  vec_t          a,
  input  fault_sel_e    s,
  input  logic          f,
  input  logic          cnt_en,
  input  logic          cnt_clear,
  output logic          y,
  output logic          v0,
  output logic          y0,
  output logic          x0,
  output logic          flag1,
  output count_t        count,
  output logic          detected,
  output vec_t          first_vec,
  // serial fault simulator
  input  logic          sim_start,
  input  logic          sim_drop_en,
  output logic          sim_busy,
  output logic          sim_done,
  output fault_result_t sim_results [NUM_FAULTS],
  // introductory example Z = PQ + R
  input  logic          p,
  input  logic          q,
  input  logic          r,
  input  fault_sel_e    pqr_sel,
  output logic          z
);

  logic y_good, good_l5, good_l6;

  faulty_two_stage u_faulty (
    .a    (a),
    .site (FIG4_SITE),
    .sel  (s),
    .flip (f),
    .v0   (v0),
    .x0   (x0),
    .y0   (y0),
    .y    (y)
  );

  two_stage_cut u_good (
    .a     (a),
    .line5 (good_l5),
    .line6 (good_l6),
    .y     (y_good)
  );

  detect_counter u_count (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (cnt_clear),
    .valid     (cnt_en),
    .vec       (a),
    .y_good    (y_good),
    .y_fault   (y),
    .flag      (flag1),
    .detected  (detected),
    .count     (count),
    .first_vec (first_vec)
  );

  serial_fault_sim u_sim (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (sim_start),
    .drop_en (sim_drop_en),
    .busy    (sim_busy),
    .done    (sim_done),
    .results (sim_results)
  );

  pq_r_example u_pqr (
    .p   (p),
    .q   (q),
    .r   (r),
    .sel (pqr_sel),
    .z   (z)
  );

endmodule
