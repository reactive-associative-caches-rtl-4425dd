// tb_probe0_way_mux: exhaustive check of the probe0 way# multiplexor.
// Every select code and every combination of the three way numbers (2-bit ways)
// is applied; the output must equal the way chosen by the select and the one-hot
// select must have exactly the selected bit set.
module tb_probe0_way_mux;
  import ra_pkg::*;
  int checks = 0, failures = 0;
  probe_sel_e sel;
  logic [1:0] dm, pr, p1, way;
  logic [2:0] oh;

  probe0_way_mux #(.WAY_W(2)) dut (.sel, .dm_way(dm), .pred_way(pr), .p1_way(p1), .sel_onehot(oh), .way);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp;
    for (int s = 0; s < 3; s++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          for (int c = 0; c < 4; c++) begin
            sel = probe_sel_e'(s); dm = 2'(a); pr = 2'(b); p1 = 2'(c);
            #1;
            exp = (s == 0) ? 2'(a) : (s == 1) ? 2'(b) : 2'(c);
            checks++;
            if (way !== exp || oh !== 3'(1 << s)) begin
              failures++;
              $display("FAIL sel=%0d dm=%0d pr=%0d p1=%0d way=%0d oh=%b", s, a, b, c, way, oh);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
