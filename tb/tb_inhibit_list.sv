// tb_inhibit_list: self-checking test of the 2048-bit inhibit list. Random PCs
// are inhibited and compared with a reference bit vector indexed by PC[12:2];
// clear_all must empty the list, and a PC that differs only above bit 12 must
// alias to the same bit.
module tb_inhibit_list;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] rd_pc, set_pc;
  logic        rd_inhibit, set_en, clear_all;
  logic [2047:0] model;

  inhibit_list dut (.clk, .rst_n, .rd_pc, .rd_inhibit, .set_en, .set_pc, .clear_all);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] pc);
    rd_pc = pc;
    #1;
    checks++;
    if (rd_inhibit !== model[pc[12:2]]) begin failures++; $display("FAIL pc=%h got %b", pc, rd_inhibit); end
  endtask

  initial begin
    set_en = 0; clear_all = 0; set_pc = 0; rd_pc = 0; model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 500; i++) begin
        @(negedge clk);
        set_en = 1; set_pc = $urandom & 32'h0000_3ffc;
        @(posedge clk);
        model[set_pc[12:2]] = 1'b1;
        @(negedge clk);
        set_en = 0;
        check($urandom & 32'h0000_3ffc);
        check(set_pc ^ 32'h0010_0000);    // alias above the index bits
      end
      @(negedge clk);
      clear_all = 1;
      @(posedge clk);
      model = '0;
      @(negedge clk);
      clear_all = 0;
      for (int i = 0; i < 50; i++) check($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
