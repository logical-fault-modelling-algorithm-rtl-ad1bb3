// tb_stuck_at_mux: exhaustive self-check of the stuck-at multiplexer.
// Every select code is applied with both line values; the expected output
// is 0 for SA0, 1 for SA1 and the line value otherwise.
module tb_stuck_at_mux;
  import ssf_pkg::*;

  fault_sel_e sel;
  logic       z, z_out;
  int         checks = 0, failures = 0;

  stuck_at_mux dut (.sel(sel), .z(z), .z_out(z_out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 2; v++) begin
        sel = fault_sel_e'(s);
        z   = v[0];
        #1;
        if (s == 0)      exp = 1'b0;
        else if (s == 1) exp = 1'b1;
        else             exp = v[0];
        checks++;
        if (z_out !== exp) begin
          failures++;
          $display("FAIL sel=%0d z=%0d z_out=%0d expected %0d", s, v, z_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
