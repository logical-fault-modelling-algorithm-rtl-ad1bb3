// tb_two_stage_cut: exhaustive self-check of the fault-free circuit
// Y = AB + CD. The expected output is taken from a truth table written out
// as a 16-bit constant (bit v = Y for vector v = ABCD): Y is 1 for 0011,
// 0111, 1011 and 1100..1111.
module tb_two_stage_cut;
  import ssf_pkg::*;

  localparam logic [15:0] Y_TABLE = 16'b1111_1000_1000_1000;

  vec_t a;
  logic line5, line6, y;
  int   checks = 0, failures = 0;

  two_stage_cut dut (.a(a), .line5(line5), .line6(line6), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = vec_t'(v);
      #1;
      checks += 3;
      if (y !== Y_TABLE[v]) begin
        failures++;
        $display("FAIL a=%b y=%0d expected %0d", a, y, Y_TABLE[v]);
      end
      if (line5 !== (v >= 12)) begin
        failures++;
        $display("FAIL a=%b line5=%0d", a, line5);
      end
      if (line6 !== (v % 4 == 3)) begin
        failures++;
        $display("FAIL a=%b line6=%0d", a, line6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
