// ssf_pkg: types and constants shared by the single stuck-at fault (SSF)
// modelling and serial fault simulation blocks.
//
// The circuit under test is the two-stage network Y = AB + CD. Its six
// interconnects are numbered as in the reference drawing of that circuit:
// 1 = A, 2 = B, 3 = C, 4 = D (primary input lines), 5 = output of the first
// AND gate (AB), 6 = output of the second AND gate (CD). Line number 0 means
// "no fault site". Every line can be stuck at 0 or at 1, which gives a fault
// list of 12 single stuck-at faults; fault index k covers line k/2 + 1,
// stuck at k % 2.
//
// The fault select code follows the multiplexer-based fault model: select 0
// forces the line to 0, select 1 forces it to 1, and the remaining codes of
// the 2-bit select leave the line fault free.
package ssf_pkg;

  // Primary inputs A, B, C, D; a test vector is written A B C D from left to
  // right, so vector 4'b1001 means A=1, B=0, C=0, D=1.
  localparam int unsigned NUM_INPUTS  = 4;
  localparam int unsigned NUM_VECTORS = 1 << NUM_INPUTS;   // 0000 .. 1111
  localparam int unsigned NUM_LINES   = 6;                 // interconnects 1..6
  localparam int unsigned NUM_FAULTS  = 2 * NUM_LINES;     // SA0 and SA1 per line
  localparam int unsigned COUNT_W     = 4;                 // detection counter width
  localparam int unsigned FIDX_W      = $clog2(NUM_FAULTS);

  typedef logic [NUM_INPUTS-1:0] vec_t;   // bit 3 = A ... bit 0 = D
  typedef logic [2:0]            line_t;  // 0 = none, 1..6 = interconnect
  typedef logic [COUNT_W-1:0]    count_t;
  typedef logic [FIDX_W-1:0]     fidx_t;

  typedef enum logic [1:0] {
    SEL_SA0      = 2'd0,   // line stuck at logic 0
    SEL_SA1      = 2'd1,   // line stuck at logic 1
    SEL_FREE     = 2'd2,   // fault free
    SEL_FREE_ALT = 2'd3    // fault free
  } fault_sel_e;

  // Outcome of simulating one fault over the whole test set.
  typedef struct packed {
    logic   detected;    // at least one vector gave a faulty output
    count_t det_count;   // number of vectors that detected the fault (saturating)
    vec_t   first_vec;   // first detecting vector (valid when detected)
  } fault_result_t;

  // Fault site of fault index k.
  function automatic line_t fault_line(input int unsigned k);
    return line_t'(k / 2 + 1);
  endfunction

  // Stuck value (select code) of fault index k.
  function automatic fault_sel_e fault_sel(input int unsigned k);
    return (k % 2 == 0) ? SEL_SA0 : SEL_SA1;
  endfunction

endpackage
