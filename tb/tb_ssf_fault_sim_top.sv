// tb_ssf_fault_sim_top: end-to-end self-check of the complete design at its
// default parameters.
//   1. Fault model of the reference circuit (fault on line 5): all 16
//      vectors 0000..1111 are swept with the select at SA0, SA1 and both
//      fault-free codes, and with the functional (inverting) fault. y, v0,
//      y0, x0 and flag1 are compared vector by vector with an independent
//      evaluation; the detection count and first detecting vector are
//      checked at the end of every sweep (SA0: 3 vectors from 1100, SA1: 9
//      vectors from 0000, fault free: none, inverted line: 12). A double
//      sweep without clearing drives the counter into saturation.
//   2. Serial fault simulation of all 12 faults, without and with fault
//      dropping; results and run length are compared with a reference.
//   3. The example Z = PQ + R, fault free and with its PQ line stuck at 0.
// Each mechanism (SA0 detection, SA1 detection, fault-free sweep,
// functional fault, counter saturation, complete serial run, early fault
// drop, example fault) is counted, and one that never happened is a failure.
module tb_ssf_fault_sim_top;
  import ssf_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  vec_t          a;
  fault_sel_e    s;
  logic          f, cnt_en, cnt_clear;
  logic          y, v0, y0, x0, flag1, detected;
  count_t        count;
  vec_t          first_vec;
  logic          sim_start, sim_drop_en, sim_busy, sim_done;
  fault_result_t sim_results [NUM_FAULTS];
  logic          p, q, r, z;
  fault_sel_e    pqr_sel;

  int checks = 0, failures = 0;
  int n_sa0_det = 0, n_sa1_det = 0, n_free_sweep = 0, n_func_det = 0;
  int n_saturate = 0, n_full_run = 0, n_drop = 0, n_pqr_det = 0;

  ssf_fault_sim_top dut (
    .clk(clk), .rst_n(rst_n),
    .a(a), .s(s), .f(f), .cnt_en(cnt_en), .cnt_clear(cnt_clear),
    .y(y), .v0(v0), .y0(y0), .x0(x0), .flag1(flag1),
    .count(count), .detected(detected), .first_vec(first_vec),
    .sim_start(sim_start), .sim_drop_en(sim_drop_en), .sim_busy(sim_busy),
    .sim_done(sim_done), .sim_results(sim_results),
    .p(p), .q(q), .r(r), .pqr_sel(pqr_sel), .z(z)
  );

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: Y = AB + CD with line `site` (1..6) forced to `val`
  // (0 or 1), inverted when val = 2, left alone when val = 3; site 0 =
  // fault free.
  function automatic bit ref_line(bit x, int i, int site, int val);
    if (i != site || val == 3) return x;
    if (val == 2) return !x;
    return val[0];
  endfunction

  function automatic bit [3:0] ref_eval(int v, int site, int val);
    bit l1, l2, l3, l4, l5, l6, rv0;
    l1  = ref_line(v[3], 1, site, val);
    l2  = ref_line(v[2], 2, site, val);
    l3  = ref_line(v[1], 3, site, val);
    l4  = ref_line(v[0], 4, site, val);
    rv0 = l1 && l2;
    l5  = ref_line(rv0, 5, site, val);
    l6  = ref_line(l3 && l4, 6, site, val);
    return {l5 || l6, rv0, l6, l5};   // {y, v0, y0, x0}
  endfunction

  // Sweep 0000..1111 through the line-5 fault model with counting enabled.
  task automatic sweep(fault_sel_e sel, bit flip, bit clear_first, int ref_val,
                       int exp_count, int exp_first);
    bit [3:0] e;
    bit       good_y;
    if (clear_first) begin
      @(negedge clk);
      cnt_clear = 1;
      cnt_en    = 0;
      @(negedge clk);
      cnt_clear = 0;
    end
    for (int v = 0; v < 16; v++) begin
      @(negedge clk);
      a      = vec_t'(v);
      s      = sel;
      f      = flip;
      cnt_en = 1;
      #1;
      e      = ref_eval(v, 5, ref_val);
      good_y = ref_eval(v, 0, 0) >> 3;
      checks++;
      if ({y, v0, y0, x0} !== e || flag1 !== (e[3] ^ good_y)) begin
        failures++;
        $display("FAIL sel=%0d f=%0d a=%b: y,v0,y0,x0,flag1=%b%b%b%b%b expected %b%b", sel, flip,
                 a, y, v0, y0, x0, flag1, e, e[3] ^ good_y);
      end
    end
    @(negedge clk);
    cnt_en = 0;
    checks++;
    if (count !== count_t'(exp_count) || detected !== (exp_count > 0) ||
        (exp_count > 0 && first_vec !== vec_t'(exp_first))) begin
      failures++;
      $display("FAIL sel=%0d f=%0d: count=%0d detected=%0d first=%b, expected %0d first %0d",
               sel, flip, count, detected, first_vec, exp_count, exp_first);
    end
  endtask

  function automatic bit ref_y(int v, int site, int val);
    bit [3:0] e;
    e = ref_eval(v, site, val);
    return e[3];
  endfunction

  task automatic serial_run(bit drop);
    int edges, exp_edges, n, first;
    @(negedge clk);
    sim_start   = 1;
    sim_drop_en = drop;
    @(posedge clk);
    @(negedge clk);
    sim_start = 0;
    edges = 0;
    while (!sim_done && edges < 1000) begin
      @(negedge clk);
      edges++;
    end
    exp_edges = 16;
    for (int k = 0; k < NUM_FAULTS; k++) begin
      n     = 0;
      first = -1;
      for (int v = 0; v < 16; v++)
        if (ref_y(v, k / 2 + 1, k % 2) != ref_y(v, 0, 0)) begin
          n++;
          if (first < 0) first = v;
        end
      exp_edges += (drop && first >= 0) ? first + 2 : 17;
      if (drop && first >= 0 && first < 15) n_drop++;
      checks++;
      if (sim_results[k].detected !== (n > 0) ||
          sim_results[k].det_count !== count_t'(drop ? (n > 0 ? 1 : 0) : n) ||
          (n > 0 && sim_results[k].first_vec !== vec_t'(first))) begin
        failures++;
        $display("FAIL drop=%0d fault %0d: det=%0d cnt=%0d first=%b, expected %0d %0d %0d", drop,
                 k, sim_results[k].detected, sim_results[k].det_count, sim_results[k].first_vec,
                 n > 0, n, first);
      end
    end
    checks++;
    if (edges != exp_edges) begin
      failures++;
      $display("FAIL drop=%0d run took %0d cycles, expected %0d", drop, edges, exp_edges);
    end else if (!drop) begin
      n_full_run++;
    end
  endtask

  task automatic mechanism(string name, int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    a = '0; s = SEL_FREE; f = 0; cnt_en = 0; cnt_clear = 0;
    sim_start = 0; sim_drop_en = 0;
    p = 0; q = 0; r = 0; pqr_sel = SEL_FREE;
    #12 rst_n = 1'b1;

    // 1. fault model on line 5
    sweep(SEL_SA0, 0, 1, 0, 3, 12);
    if (count == 3) n_sa0_det++;
    sweep(SEL_SA1, 0, 1, 1, 9, 0);
    if (count == 9) n_sa1_det++;
    sweep(SEL_FREE, 0, 1, 3, 0, 0);
    if (count == 0) n_free_sweep++;
    sweep(SEL_FREE_ALT, 0, 1, 3, 0, 0);
    if (count == 0) n_free_sweep++;
    sweep(SEL_FREE, 1, 1, 2, 12, 0);
    if (count == 12) n_func_det++;
    sweep(SEL_SA1, 0, 1, 1, 9, 0);
    sweep(SEL_SA1, 0, 0, 1, 15, 0);   // 18 detections saturate at 15
    if (count == 15) n_saturate++;

    // 2. serial fault simulation
    serial_run(0);
    serial_run(1);

    // 3. Z = PQ + R
    for (int sel = 0; sel < 4; sel++) begin
      for (int v = 0; v < 8; v++) begin
        bit exp_z, good_z;
        {p, q, r} = v[2:0];
        pqr_sel   = fault_sel_e'(sel);
        #1;
        good_z = (v[2] && v[1]) || v[0];
        exp_z  = (sel == 0) ? v[0] : (sel == 1) ? 1'b1 : good_z;
        checks++;
        if (z !== exp_z) begin
          failures++;
          $display("FAIL pqr sel=%0d pqr=%b z=%0d expected %0d", sel, v[2:0], z, exp_z);
        end
        if (sel == 0 && z != good_z) n_pqr_det++;
      end
    end

    mechanism("SA0 detected", n_sa0_det);
    mechanism("SA1 detected", n_sa1_det);
    mechanism("fault-free sweep", n_free_sweep);
    mechanism("functional fault", n_func_det);
    mechanism("counter saturation", n_saturate);
    mechanism("complete serial run", n_full_run);
    mechanism("fault dropped early", n_drop);
    mechanism("PQ line SA0 detected", n_pqr_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
