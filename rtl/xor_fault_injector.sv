// xor_fault_injector: functional (non-classical) fault model for one line.
//
// A selector inserted in a line z turns it into z' = z when the fault input
// f is 0 and z' = z xor f when f is 1; with f = 1 the line is inverted, which
// for example turns a buffer z = x into an inverter z = not x. The circuit
// with f = 0 behaves exactly like the original one.
//
// Ports: z (original line), f (functional fault enable), z_out (modified
// line). Purely combinational.
module xor_fault_injector (
  input  logic z,
  input  logic f,
  output logic z_out
);

  always_comb z_out = f ? (z ^ f) : z;

endmodule
