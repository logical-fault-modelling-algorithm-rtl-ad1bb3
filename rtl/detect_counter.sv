// detect_counter: response comparator and detection counter.
//
// The faulty circuit's output is compared with the fault-free output of the
// same test vector; `flag` is high whenever they differ (combinational, not
// gated). On every clock edge where `valid` is high and the outputs differ,
// the counter of detecting vectors is incremented (saturating at its maximum,
// 15 for the 4-bit width), `detected` is set, and the first detecting vector
// is captured. `clear` (synchronous, priority over counting) restarts the
// count for a new fault. Counting on a clock, reset and saturation are this
// design's choices; the count itself and its 4-bit width follow the
// reference simulation.
//
// Timing: flag is combinational; count, detected and first_vec update on the
// rising clock edge after a detecting vector. rst_n is asynchronous, active low.
module detect_counter
  import ssf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   valid,
  input  vec_t   vec,
  input  logic   y_good,
  input  logic   y_fault,
  output logic   flag,
  output logic   detected,
  output count_t count,
  output vec_t   first_vec
);

  always_comb flag = y_good ^ y_fault;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      detected  <= 1'b0;
      first_vec <= '0;
    end else if (clear) begin
      count     <= '0;
      detected  <= 1'b0;
      first_vec <= '0;
    end else if (valid && flag) begin
      if (count != '1) count <= count + 1'b1;
      if (!detected) first_vec <= vec;
      detected <= 1'b1;
    end
  end

endmodule
