// tb_golden_response_mem: self-check of the true-value response store.
// After reset every word must read 0; random words are then written and the
// whole store is read back and compared with a shadow copy, several rounds.
module tb_golden_response_mem;
  import ssf_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       we, wdata, rdata;
  logic [3:0] waddr, raddr;
  bit         shadow [16];
  int         checks = 0, failures = 0;

  golden_response_mem dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                           .raddr(raddr), .rdata(rdata));

  always #5 clk = !clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i);
      #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        $display("FAIL addr %0d read %0d expected %0d", i, rdata, shadow[i]);
      end
    end
  endtask

  initial begin
    we = 0; wdata = 0; waddr = '0; raddr = '0;
    foreach (shadow[i]) shadow[i] = 0;
    #12 rst_n = 1'b1;
    read_all();
    for (int round = 0; round < 8; round++) begin
      for (int n = 0; n < 12; n++) begin
        @(negedge clk);
        we    = 1;
        waddr = 4'($urandom);
        wdata = 1'($urandom);
        raddr = waddr;
        @(posedge clk);
        shadow[waddr] = wdata;
        #1 we = 0;
      end
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
