// tb_xor_fault_injector: exhaustive self-check of the functional fault
// model. With f = 0 the line must pass unchanged, with f = 1 it must be
// inverted.
module tb_xor_fault_injector;
  logic z, f, z_out;
  int   checks = 0, failures = 0;

  xor_fault_injector dut (.z(z), .f(f), .z_out(z_out));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int i = 0; i < 4; i++) begin
      z = i[0];
      f = i[1];
      #1;
      exp = (f == 1'b0) ? z : !z;
      checks++;
      if (z_out !== exp) begin
        failures++;
        $display("FAIL z=%0d f=%0d z_out=%0d expected %0d", z, f, z_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
