// tb_probe1_way_encoder: checks the probe1 way encoder and overall-hit OR for 8
// ways: no match gives hit 0, each single match gives its way number and hit 1.
module tb_probe1_way_encoder;
  int checks = 0, failures = 0;
  logic [7:0] match;
  logic [2:0] way;
  logic       hit;

  probe1_way_encoder #(.WAYS(8)) dut (.match, .way, .hit);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    match = '0;
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit without match"); end
    for (int w = 0; w < 8; w++) begin
      match = 8'(1 << w);
      #1;
      checks++;
      if (hit !== 1'b1 || way !== 3'(w)) begin
        failures++;
        $display("FAIL match=%b way=%0d hit=%b", match, way, hit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
