// tb_serial_fault_sim: self-check of the serial fault simulator.
// The simulator is run twice, without and with fault dropping. For each of
// the 12 faults the expected outcome (detected, number of detecting vectors,
// first detecting vector) is derived from an independent evaluation of
// Y = AB + CD with the faulty line overridden. The number of cycles from
// the accepted start to done is checked against 16 cycles for the
// true-value pass plus, per fault, one cycle per applied vector and one save
// cycle. A start while busy must be ignored.
module tb_serial_fault_sim;
  import ssf_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start, drop_en, busy, done;
  fault_result_t results [NUM_FAULTS];
  int            checks = 0, failures = 0;
  int            drops_seen = 0;

  serial_fault_sim dut (.clk(clk), .rst_n(rst_n), .start(start), .drop_en(drop_en),
                        .busy(busy), .done(done), .results(results));

  always #5 clk = !clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_y(int v, int s_site, int s_val);
    bit l [1:6];
    l[1] = v[3]; l[2] = v[2]; l[3] = v[1]; l[4] = v[0];
    for (int i = 1; i <= 4; i++) if (i == s_site) l[i] = s_val[0];
    l[5] = l[1] && l[2];
    if (s_site == 5) l[5] = s_val[0];
    l[6] = l[3] && l[4];
    if (s_site == 6) l[6] = s_val[0];
    return l[5] || l[6];
  endfunction

  task automatic run(bit drop);
    int cycles, exp_cycles, n, first;
    @(negedge clk);
    start   = 1;
    drop_en = drop;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    cycles = 0;   // clock edges after the edge that accepted start
    // a start while busy must not restart the run
    start = 1;
    @(negedge clk);
    start = 0;
    cycles++;
    while (!done) begin
      @(negedge clk);
      cycles++;
      if (cycles > 1000) break;
    end
    exp_cycles = 16;
    for (int k = 0; k < 12; k++) begin
      int site, val;
      site  = k / 2 + 1;
      val   = k % 2;
      n     = 0;
      first = -1;
      for (int v = 0; v < 16; v++)
        if (ref_y(v, site, val) != ref_y(v, 0, 0)) begin
          n++;
          if (first < 0) first = v;
        end
      if (drop) exp_cycles += ((first >= 0) ? first + 1 : 16) + 1;
      else      exp_cycles += 16 + 1;
      if (drop && first >= 0 && first < 15) drops_seen++;
      checks++;
      if (results[k].detected !== (n > 0) ||
          results[k].det_count !== count_t'(drop ? (n > 0 ? 1 : 0) : n) ||
          (n > 0 && results[k].first_vec !== vec_t'(first))) begin
        failures++;
        $display("FAIL drop=%0d fault %0d (line %0d SA%0d): det=%0d cnt=%0d first=%b, expected %0d %0d %0d",
                 drop, k, site, val, results[k].detected, results[k].det_count,
                 results[k].first_vec, n > 0, n, first);
      end
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL drop=%0d cycles %0d expected %0d", drop, cycles, exp_cycles);
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy with done"); end
  endtask

  initial begin
    start = 0; drop_en = 0;
    #12 rst_n = 1'b1;
    checks++;
    if (done || busy) begin failures++; $display("FAIL not idle after reset"); end
    run(0);
    run(1);
    run(0);
    checks++;
    if (drops_seen == 0) begin failures++; $display("FAIL no fault dropped early"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
