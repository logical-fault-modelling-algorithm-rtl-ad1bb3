// tb_vector_generator: self-check of the exhaustive pattern source. After a
// start pulse the generator must present 0000..1111 on 16 consecutive cycles
// with valid high and last only on 1111, then go idle. A second start in the
// middle of a pass must restart at 0000.
module tb_vector_generator;
  import ssf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  vec_t vec;
  logic valid, last;
  int   checks = 0, failures = 0;

  vector_generator dut (.clk(clk), .rst_n(rst_n), .start(start), .vec(vec),
                        .valid(valid), .last(last));

  always #5 clk = !clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(bit ev, int evec, bit elast);
    checks++;
    if (valid !== ev || (ev && vec !== vec_t'(evec)) || last !== elast) begin
      failures++;
      $display("FAIL valid=%0d vec=%b last=%0d expected %0d %0d %0d", valid, vec, last,
               ev, evec, elast);
    end
  endtask

  initial begin
    start = 0;
    #12 rst_n = 1'b1;
    @(posedge clk); #1;
    expect_state(0, 0, 0);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    for (int i = 0; i < 16; i++) begin
      expect_state(1, i, i == 15);
      @(posedge clk); #1;
    end
    repeat (3) begin
      expect_state(0, 0, 0);
      @(posedge clk); #1;
    end
    // restart in the middle of a pass
    start = 1;
    @(posedge clk); #1;
    start = 0;
    repeat (5) @(posedge clk);
    #1;
    expect_state(1, 5, 0);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    for (int i = 0; i < 16; i++) begin
      expect_state(1, i, i == 15);
      @(posedge clk); #1;
    end
    expect_state(0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
