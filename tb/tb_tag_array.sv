// tb_tag_array: self-checking test of the set-associative tag array at its
// default size (64 sets, 4 ways, 21-bit tags). A reference model of valid bits
// and tags is kept in the testbench; random writes and invalidations are applied
// and after each the match lines, valid bits and tags of a random set are
// compared with the model. Reset must clear every valid bit.
module tb_tag_array;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0]  rd_set, wr_set;
  logic [20:0] cmp_tag, wr_tag;
  logic [3:0]  match, rd_valid;
  logic [3:0][20:0] rd_tag;
  logic        wr_en, wr_valid;
  logic [1:0]  wr_way;

  tag_array dut (.clk, .rst_n, .rd_set, .cmp_tag, .match, .rd_valid, .rd_tag,
                 .wr_en, .wr_set, .wr_way, .wr_valid, .wr_tag);

  logic        m_valid [64][4];
  logic [20:0] m_tag   [64][4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_set(input logic [5:0] s, input logic [20:0] t);
    logic [3:0] exp_m, exp_v;
    rd_set = s; cmp_tag = t;
    #1;
    for (int w = 0; w < 4; w++) begin
      exp_v[w] = m_valid[s][w];
      exp_m[w] = m_valid[s][w] && m_tag[s][w] == t;
    end
    checks++;
    if (match !== exp_m || rd_valid !== exp_v) begin
      failures++;
      $display("FAIL set=%0d tag=%h match=%b exp=%b valid=%b exp=%b", s, t, match, exp_m, rd_valid, exp_v);
    end
    for (int w = 0; w < 4; w++)
      if (m_valid[s][w]) begin
        checks++;
        if (rd_tag[w] !== m_tag[s][w]) begin failures++; $display("FAIL tag readback"); end
      end
  endtask

  initial begin
    wr_en = 0; wr_set = 0; wr_way = 0; wr_valid = 0; wr_tag = 0; rd_set = 0; cmp_tag = 0;
    for (int s = 0; s < 64; s++) for (int w = 0; w < 4; w++) begin m_valid[s][w] = 0; m_tag[s][w] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 64; s += 7) check_set(6'(s), 21'h0);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      wr_en = 1;
      wr_set = 6'($urandom_range(0, 7));       // few sets so that hits are common
      wr_way = 2'($urandom);
      wr_valid = ($urandom_range(0, 4) != 0);
      wr_tag = 21'($urandom_range(0, 5));
      @(posedge clk);
      m_valid[wr_set][wr_way] = wr_valid;
      m_tag[wr_set][wr_way] = wr_tag;
      @(negedge clk);
      wr_en = 0;
      check_set(6'($urandom_range(0, 7)), 21'($urandom_range(0, 5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
