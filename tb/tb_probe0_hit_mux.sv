// tb_probe0_hit_mux: exhaustive check of the probe0 hit multiplexor for 4 ways:
// every match vector and every probe0 way; hit must be the match bit of that way.
module tb_probe0_hit_mux;
  int checks = 0, failures = 0;
  logic [3:0] match;
  logic [1:0] way;
  logic       hit;

  probe0_hit_mux #(.WAYS(4)) dut (.match, .way, .hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 16; m++)
      for (int w = 0; w < 4; w++) begin
        match = 4'(m); way = 2'(w);
        #1;
        checks++;
        if (hit !== ((m >> w) & 1)) begin
          failures++;
          $display("FAIL match=%b way=%0d hit=%b", match, way, hit);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
