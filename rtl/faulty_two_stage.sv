// faulty_two_stage: the two-stage circuit Y = AB + CD with a fault model
// inserted in its interconnects.
//
// Each of the six numbered lines (1 = A, 2 = B, 3 = C, 4 = D, 5 = AB,
// 6 = CD) passes through a stuck_at_mux followed by an xor_fault_injector
// before it reaches the next gate. Only the line chosen by `site` sees the
// fault inputs; all other lines get the fault-free select code and f = 0.
// With site = 5 this is the reference single stuck-at model, where a
// multiplexer sits between gate 1 (output V0) and gate 3 (input X0).
// Putting a selector on every line, chosen at run time, is this design's
// generalisation so that a serial fault simulator can walk through the
// complete fault list with one circuit instance.
//
// Ports: a (test vector), site (faulty line, 0 = none), sel (stuck-at
// select for that line), flip (functional fault: invert that line),
// v0 (gate 1 output before the fault model), x0 (line 5 as seen by
// gate 3), y0 (line 6 as seen by gate 3), y (circuit output).
// Purely combinational.
module faulty_two_stage
  import ssf_pkg::*;
(
  input  vec_t       a,
  input  line_t      site,
  input  fault_sel_e sel,
  input  logic       flip,
  output logic       v0,
  output logic       x0,
  output logic       y0,
  output logic       y
);

  // Fault-free value of each line (index 1..6) and value after the fault model.
  logic [NUM_LINES:1] line_ff;
  logic [NUM_LINES:1] line_sa;
  logic [NUM_LINES:1] line_out;
  fault_sel_e         line_sel [NUM_LINES:1];
  logic [NUM_LINES:1] line_flip;

  for (genvar i = 1; i <= NUM_LINES; i++) begin : g_line
    always_comb begin
      line_sel[i]  = (site == line_t'(i)) ? sel : SEL_FREE;
      line_flip[i] = (site == line_t'(i)) & flip;
    end
    stuck_at_mux u_sa (
      .sel   (line_sel[i]),
      .z     (line_ff[i]),
      .z_out (line_sa[i])
    );
    xor_fault_injector u_xf (
      .z     (line_sa[i]),
      .f     (line_flip[i]),
      .z_out (line_out[i])
    );
  end

  always_comb begin
    line_ff[1] = a[3];
    line_ff[2] = a[2];
    line_ff[3] = a[1];
    line_ff[4] = a[0];
    line_ff[5] = line_out[1] & line_out[2];   // gate 1 (AND)
    line_ff[6] = line_out[3] & line_out[4];   // gate 2 (AND)
    y          = line_out[5] | line_out[6];   // gate 3 (OR)
    v0         = line_ff[5];
    x0         = line_out[5];
    y0         = line_out[6];
  end

endmodule
