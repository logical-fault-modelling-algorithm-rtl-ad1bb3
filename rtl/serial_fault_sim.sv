// serial_fault_sim: serial fault simulator for the two-stage circuit.
//
// The simplest fault simulation algorithm, run in hardware:
//   1. True-value pass: the circuit is evaluated fault free for every test
//      vector 0000..1111 and each output is saved in golden_response_mem.
//   2. Faulty passes: the single stuck-at faults are injected one at a time
//      (fault index k = line k/2+1 stuck at k%2, so line 1 SA0, line 1 SA1,
//      ..., line 6 SA1) into the same circuit instance, and every vector is
//      applied again. The faulty output is compared with the saved one; the
//      number of detecting vectors and the first of them are recorded.
//   3. With fault dropping enabled (drop_en sampled at start), a fault's pass
//      is abandoned at its first detecting vector, as the algorithm turns off
//      a fault circuit once it is identified; otherwise the whole test set is
//      applied so the full count of detecting vectors is obtained.
//
// Timing: start is accepted while idle or done. The true-value pass takes 16
// cycles. Each fault takes one cycle per applied vector (16, or up to and
// including the first detecting vector when dropping) plus one cycle to save
// its result. `done` rises after the last fault and stays high until the
// next start; `results` is valid while `done` is high. rst_n is asynchronous,
// active low. The FSM, the save cycle and the dropping switch are this
// design's choices; the reference only describes the algorithm.
module serial_fault_sim
  import ssf_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          drop_en,
  output logic          busy,
  output logic          done,
  output fault_result_t results [NUM_FAULTS]
);

  typedef enum logic [2:0] {S_IDLE, S_GOOD, S_FAULT, S_SAVE, S_DONE} state_e;

  state_e     state;
  fidx_t      fidx;
  logic       drop_q;

  logic       vg_start, vg_valid, vg_last;
  vec_t       vec;
  line_t      site;
  fault_sel_e sel;
  logic       y_cut, y_good;
  logic       v0_unused, x0_unused, y0_unused;
  logic       mem_we;
  logic       dc_clear, dc_valid, flag, det;
  count_t     cnt;
  vec_t       fvec;
  logic       last_fault, fault_end;

  vector_generator u_vgen (
    .clk   (clk),
    .rst_n (rst_n),
    .start (vg_start),
    .vec   (vec),
    .valid (vg_valid),
    .last  (vg_last)
  );

  faulty_two_stage u_cut (
    .a    (vec),
    .site (site),
    .sel  (sel),
    .flip (1'b0),
    .v0   (v0_unused),
    .x0   (x0_unused),
    .y0   (y0_unused),
    .y    (y_cut)
  );

  golden_response_mem #(.DEPTH(NUM_VECTORS)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (mem_we),
    .waddr (vec),
    .wdata (y_cut),
    .raddr (vec),
    .rdata (y_good)
  );

  detect_counter u_det (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (dc_clear),
    .valid     (dc_valid),
    .vec       (vec),
    .y_good    (y_good),
    .y_fault   (y_cut),
    .flag      (flag),
    .detected  (det),
    .count     (cnt),
    .first_vec (fvec)
  );

  always_comb begin
    last_fault = (fidx == fidx_t'(NUM_FAULTS - 1));
    site       = (state == S_FAULT) ? fault_line(int'(fidx)) : '0;
    sel        = (state == S_FAULT) ? fault_sel(int'(fidx))  : SEL_FREE;
    mem_we     = (state == S_GOOD) && vg_valid;
    dc_valid   = (state == S_FAULT) && vg_valid;
    fault_end  = vg_last || (drop_q && vg_valid && flag);
    vg_start   = 1'b0;
    dc_clear   = 1'b0;
    unique case (state)
      S_IDLE, S_DONE: begin vg_start = start;    dc_clear = start;   end
      S_GOOD:         begin vg_start = vg_last;  dc_clear = vg_last; end
      S_SAVE:         begin vg_start = !last_fault; dc_clear = 1'b1; end
      default: ;
    endcase
    busy = (state == S_GOOD) || (state == S_FAULT) || (state == S_SAVE);
    done = (state == S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      fidx   <= '0;
      drop_q <= 1'b0;
      for (int k = 0; k < int'(NUM_FAULTS); k++) results[k] <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          state  <= S_GOOD;
          fidx   <= '0;
          drop_q <= drop_en;
          for (int k = 0; k < int'(NUM_FAULTS); k++) results[k] <= '0;
        end
        S_GOOD:  if (vg_last) state <= S_FAULT;
        S_FAULT: if (fault_end) state <= S_SAVE;
        S_SAVE: begin
          results[fidx] <= '{detected: det, det_count: cnt, first_vec: fvec};
          if (last_fault) begin
            state <= S_DONE;
          end else begin
            fidx  <= fidx + 1'b1;
            state <= S_FAULT;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // busy and done are never high together; a save only follows a fault pass.
  a_busy_done: assert property (@(posedge clk) disable iff (!rst_n) !(busy && done));
  a_save_order: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == S_SAVE) |-> $past(state) == S_FAULT);

endmodule
