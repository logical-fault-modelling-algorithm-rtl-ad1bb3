// two_stage_cut: fault-free two-stage combinational circuit under test.
//
// Gate 1 (AND) combines lines 1 (A) and 2 (B) into line 5, gate 2 (AND)
// combines lines 3 (C) and 4 (D) into line 6, and gate 3 (OR) combines lines
// 5 and 6 into the output Y = AB + CD. All gates are taken to have the same
// delay; the model is zero-delay combinational logic.
//
// Ports: a (test vector, bit 3 = A .. bit 0 = D), y (output), line5, line6
// (internal interconnects, brought out for observation).
module two_stage_cut
  import ssf_pkg::*;
(
  input  vec_t a,
  output logic line5,
  output logic line6,
  output logic y
);

  always_comb begin
    line5 = a[3] & a[2];   // gate 1
    line6 = a[1] & a[0];   // gate 2
    y     = line5 | line6; // gate 3
  end

endmodule
