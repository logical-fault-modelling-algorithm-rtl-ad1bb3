// stuck_at_mux: the multiplexer that models a single stuck-at fault on one
// signal line.
//
// A 4-to-1 selector whose data inputs are constant 0, constant 1 and (twice)
// the fault-free value of the line. Select 0 puts a stuck-at-0 on the line,
// select 1 a stuck-at-1; the two remaining select codes leave the line fault
// free. The select encoding is the one the fault model defines; which of the
// unused codes feed the fault-free value is this design's choice (both do).
//
// Ports: sel (ssf_pkg::fault_sel_e), z (fault-free line), z_out (line as
// seen by the following gates). Purely combinational, no clock.
module stuck_at_mux
  import ssf_pkg::*;
(
  input  fault_sel_e sel,
  input  logic       z,
  output logic       z_out
);

  always_comb begin
    unique case (sel)
      SEL_SA0: z_out = 1'b0;
      SEL_SA1: z_out = 1'b1;
      default: z_out = z;
    endcase
  end

endmodule
