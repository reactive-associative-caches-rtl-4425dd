// tb_data_array: self-checking test of the direct-mapped data array at its
// default size (64 sets x 4 ways of 256-bit blocks, 64-bit words). Whole-block
// and single-word writes go to random (way, set) rows; a reference copy in the
// testbench is compared with every read. Also checks that rows {way, set} are
// distinct: writing one way of a set leaves the other ways of that set alone.
module tb_data_array;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]   rd_way, wr_way;
  logic [5:0]   rd_set, wr_set;
  logic [255:0] rd_data, wr_data;
  logic         wr_en;
  logic [3:0]   wr_word_en;

  data_array dut (.clk, .rd_way, .rd_set, .rd_data, .wr_en, .wr_way, .wr_set, .wr_word_en, .wr_data);

  logic [255:0] model [4][64];

  function automatic logic [255:0] rand256();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_way = 0; wr_set = 0; wr_word_en = 0; wr_data = 0; rd_way = 0; rd_set = 0;
    // fill every row
    for (int w = 0; w < 4; w++)
      for (int s = 0; s < 64; s++) begin
        @(negedge clk);
        wr_en = 1; wr_way = 2'(w); wr_set = 6'(s); wr_word_en = '1; wr_data = rand256();
        model[w][s] = wr_data;
      end
    @(negedge clk);
    wr_en = 0;
    for (int w = 0; w < 4; w++)
      for (int s = 0; s < 64; s++) begin
        rd_way = 2'(w); rd_set = 6'(s);
        #1;
        checks++;
        if (rd_data !== model[w][s]) begin failures++; $display("FAIL row w=%0d s=%0d", w, s); end
      end
    // random word writes mixed with reads
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en = 1; wr_way = 2'($urandom); wr_set = 6'($urandom); wr_word_en = 4'($urandom); wr_data = rand256();
      for (int k = 0; k < 4; k++)
        if (wr_word_en[k]) model[wr_way][wr_set][k*64 +: 64] = wr_data[k*64 +: 64];
      @(negedge clk);
      wr_en = 0;
      for (int w = 0; w < 4; w++) begin
        rd_way = 2'(w); rd_set = wr_set;
        #1;
        checks++;
        if (rd_data !== model[w][wr_set]) begin failures++; $display("FAIL word write w=%0d s=%0d", w, wr_set); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
