// tb_pq_r_example: exhaustive self-check of Z = PQ + R with the PQ line
// fault free, stuck at 0 and stuck at 1. With the line stuck at 0 the
// circuit must reduce to Z = R, so P = Q = 1, R = 0 is the only detecting
// input; with it stuck at 1, Z must be constant 1.
module tb_pq_r_example;
  import ssf_pkg::*;

  logic       p, q, r, z;
  fault_sel_e sel;
  int         checks = 0, failures = 0;
  int         sa0_detect = 0;

  pq_r_example dut (.p(p), .q(q), .r(r), .sel(sel), .z(z));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp, good;
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 8; v++) begin
        {p, q, r} = v[2:0];
        sel = fault_sel_e'(s);
        #1;
        good = (v >= 6) || (v % 2 == 1);
        case (s)
          0: exp = v[0];
          1: exp = 1'b1;
          default: exp = good;
        endcase
        if (s == 0 && exp != good) sa0_detect++;
        checks++;
        if (z !== exp) begin
          failures++;
          $display("FAIL sel=%0d pqr=%b z=%0d expected %0d", s, v[2:0], z, exp);
        end
      end
    end
    checks++;
    if (sa0_detect != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
