// vector_generator: exhaustive test-pattern source for the 4-input circuit.
//
// A `start` pulse makes the generator present vector 0000 on the next clock
// edge; it then steps through 0001, 0010, ... up to 1111, one vector per
// cycle, with `valid` high. `last` marks the cycle that holds 1111; after it
// `valid` drops unless `start` is given again. `start` while running
// restarts at 0000 (used to abandon a fault early). The exhaustive order
// 0000..1111 follows the reference simulation; the start/valid/last
// handshake is this design's choice.
//
// Timing: one vector per cycle, 16 cycles per pass. rst_n is asynchronous,
// active low.
module vector_generator
  import ssf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output vec_t vec,
  output logic valid,
  output logic last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec   <= '0;
      valid <= 1'b0;
    end else if (start) begin
      vec   <= '0;
      valid <= 1'b1;
    end else if (valid) begin
      vec   <= vec + 1'b1;
      valid <= (vec != '1);
    end
  end

  always_comb last = valid && (vec == '1);

  // a pass ends only after 1111: valid can only fall right after last
  a_no_early_end: assert property (@(posedge clk) disable iff (!rst_n)
                                   (valid && !last && !start) |=> valid);

endmodule
