// tb_faulty_two_stage: exhaustive self-check of the circuit with its fault
// models. Every fault site (none, lines 1..6), select code, functional-fault
// bit and test vector is applied and compared with a reference evaluation of
// Y = AB + CD in which the chosen line is overridden. In addition, the
// detecting vectors of the reference case (line 5 stuck at 0 or 1) are
// checked vector by vector against hand-derived sets: SA0 on AB is seen only
// for AB = 1, CD = 0 (3 vectors), SA1 only for AB = 0, CD = 0 (9 vectors).
module tb_faulty_two_stage;
  import ssf_pkg::*;

  vec_t       a;
  line_t      site;
  fault_sel_e sel;
  logic       flip;
  logic       v0, x0, y0, y;
  int         checks = 0, failures = 0;

  // Fault-free Y = AB + CD, bit v = output for vector v = ABCD.
  localparam logic [15:0] Y_TABLE = 16'b1111_1000_1000_1000;

  faulty_two_stage dut (.a(a), .site(site), .sel(sel), .flip(flip),
                        .v0(v0), .x0(x0), .y0(y0), .y(y));

  // Value of line `i` after the fault model.
  function automatic bit apply(bit val, int i, int s_site, int s_sel, bit s_flip);
    bit r;
    if (i != s_site) return val;
    r = (s_sel == 0) ? 1'b0 : (s_sel == 1) ? 1'b1 : val;
    return s_flip ? !r : r;
  endfunction

  function automatic bit ref_y(int v, int s_site, int s_sel, bit s_flip,
                               output bit o_v0, output bit o_x0, output bit o_y0);
    bit l1, l2, l3, l4;
    l1 = apply(v[3] == 1'b1, 1, s_site, s_sel, s_flip);
    l2 = apply(v[2] == 1'b1, 2, s_site, s_sel, s_flip);
    l3 = apply(v[1] == 1'b1, 3, s_site, s_sel, s_flip);
    l4 = apply(v[0] == 1'b1, 4, s_site, s_sel, s_flip);
    o_v0 = l1 && l2;
    o_x0 = apply(o_v0, 5, s_site, s_sel, s_flip);
    o_y0 = apply(l3 && l4, 6, s_site, s_sel, s_flip);
    return o_x0 || o_y0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ey, ev0, ex0, ey0;

    for (int st = 0; st <= 6; st++) begin
      for (int s = 0; s < 4; s++) begin
        for (int fl = 0; fl < 2; fl++) begin
          for (int v = 0; v < 16; v++) begin
            a    = vec_t'(v);
            site = line_t'(st);
            sel  = fault_sel_e'(s);
            flip = fl[0];
            #1;
            ey = ref_y(v, st, s, fl[0], ev0, ex0, ey0);
            checks++;
            if ({y, v0, x0, y0} !== {ey, ev0, ex0, ey0}) begin
              failures++;
              $display("FAIL site=%0d sel=%0d flip=%0d a=%b got y,v0,x0,y0=%b%b%b%b exp %b%b%b%b",
                       st, s, fl, a, y, v0, x0, y0, ey, ev0, ex0, ey0);
            end
          end
        end
      end
    end
    // Detecting vectors of line 5 stuck at 0 (AB = 1, CD = 0: 1100, 1101,
    // 1110) and stuck at 1 (AB = 0, CD = 0: the 9 vectors where Y = 0).
    for (int s = 0; s < 2; s++) begin
      for (int v = 0; v < 16; v++) begin
        bit exp_det;
        a    = vec_t'(v);
        site = line_t'(5);
        sel  = fault_sel_e'(s);
        flip = 1'b0;
        #1;
        exp_det = (s == 0) ? (v >= 12 && v <= 14) : (Y_TABLE[v] == 1'b0);
        checks++;
        if ((y != Y_TABLE[v]) != exp_det) begin
          failures++;
          $display("FAIL line 5 SA%0d vector %b: detected=%0d expected %0d", s, a,
                   y != Y_TABLE[v], exp_det);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
