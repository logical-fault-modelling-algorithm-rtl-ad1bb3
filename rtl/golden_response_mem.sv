// golden_response_mem: store of the fault-free (true-value) responses.
//
// During the true-value pass of the serial fault simulation every test
// vector's fault-free output is written here, addressed by the vector. During
// the faulty passes it is read with the current vector, so the faulty output
// can be compared with the saved one. One bit per vector, NUM_VECTORS words.
//
// Timing: synchronous write on the rising edge when `we` is high;
// asynchronous (combinational) read. Reset clears all words.
module golden_response_mem
  import ssf_pkg::*;
#(
  parameter int unsigned DEPTH = NUM_VECTORS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic                     wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic                     rdata
);

  logic mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= 1'b0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb rdata = mem[raddr];

endmodule
