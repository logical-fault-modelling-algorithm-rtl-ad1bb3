// tb_detect_counter: self-check of the response comparator and detection
// counter. Random good/faulty responses, valid and clear are applied for
// many cycles and compared with a cycle-by-cycle reference (combinational
// flag, saturating count, sticky detected, first detecting vector). A long
// run of detections without clear exercises the saturation at 15.
module tb_detect_counter;
  import ssf_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   clear, valid, y_good, y_fault;
  vec_t   vec;
  logic   flag, detected;
  count_t count;
  vec_t   first_vec;
  int     checks = 0, failures = 0;

  int     m_count;
  bit     m_det;
  vec_t   m_first;
  int     saturations = 0;

  detect_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .valid(valid), .vec(vec),
                      .y_good(y_good), .y_fault(y_fault), .flag(flag), .detected(detected),
                      .count(count), .first_vec(first_vec));

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit c, bit v, bit g, bit fv, vec_t x);
    clear = c; valid = v; y_good = g; y_fault = fv; vec = x;
    #1;
    checks++;
    if (flag !== (g ^ fv)) begin failures++; $display("FAIL flag"); end
    @(posedge clk);
    if (c) begin
      m_count = 0; m_det = 0; m_first = '0;
    end else if (v && (g != fv)) begin
      if (m_count == 15) saturations++;
      else m_count++;
      if (!m_det) m_first = x;
      m_det = 1;
    end
    #1;
    checks++;
    if (count !== count_t'(m_count) || detected !== m_det || first_vec !== m_first) begin
      failures++;
      $display("FAIL count=%0d/%0d det=%0d/%0d first=%b/%b", count, m_count, detected, m_det,
               first_vec, m_first);
    end
  endtask

  initial begin
    clear = 0; valid = 0; y_good = 0; y_fault = 0; vec = '0;
    m_count = 0; m_det = 0; m_first = '0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 1000; i++)
      step(($urandom % 40) == 0, ($urandom % 4) != 0, $urandom % 2 == 1, $urandom % 2 == 1,
           vec_t'($urandom));
    step(1, 0, 0, 0, '0);
    for (int i = 0; i < 20; i++) step(0, 1, 1, 0, vec_t'(i + 3));
    checks++;
    if (saturations == 0) begin failures++; $display("FAIL saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
