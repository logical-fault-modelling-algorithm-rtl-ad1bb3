// pq_r_example: the introductory stuck-at example Z = PQ + R.
//
// An AND gate forms PQ, an OR gate adds R. The line between the AND and the
// OR gate is the one shown stuck at 0 in the example; here it passes through
// a stuck_at_mux so the same circuit can be run fault free (sel = 2 or 3),
// with that line stuck at 0 (sel = 0, the case of the example) or stuck at
// 1 (sel = 1). Purely combinational.
//
// Ports: p, q, r (inputs), sel (fault select for the PQ line), z (output).
module pq_r_example
  import ssf_pkg::*;
(
  input  logic       p,
  input  logic       q,
  input  logic       r,
  input  fault_sel_e sel,
  output logic       z
);

  logic pq, pq_f;

  always_comb pq = p & q;

  stuck_at_mux u_sa (
    .sel   (sel),
    .z     (pq),
    .z_out (pq_f)
  );

  always_comb z = pq_f | r;

endmodule
