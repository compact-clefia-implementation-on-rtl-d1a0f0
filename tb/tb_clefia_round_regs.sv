// tb_clefia_round_regs: checks the four branch registers against a model.
//
// Random loads, single-word writes and loads that collide with a write are
// applied for many cycles; both read ports and the word array are compared
// with the model each cycle.  A load must take priority over a write.
module tb_clefia_round_regs;
  import clefia_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, wr_en = 1'b0;
  block_t blk = '0;
  logic [1:0] wr_idx = '0, ia = '0, ib = '0;
  word_t wr_data = '0, ra, rb;
  word_t words [4];
  word_t model [4];
  int checks = 0, failures = 0, n_collide = 0;

  clefia_round_regs dut (.clk, .rst_n, .load, .blk, .wr_en, .wr_idx, .wr_data,
                         .rd_idx_a(ia), .rd_a(ra), .rd_idx_b(ib), .rd_b(rb), .words);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      load = ($urandom_range(0, 7) == 0);
      wr_en = ($urandom_range(0, 1) == 0);
      blk = {$urandom, $urandom, $urandom, $urandom};
      wr_idx = 2'($urandom); wr_data = $urandom;
      ia = 2'($urandom); ib = 2'($urandom);
      #1;
      chk("read a", ra == model[ia]);
      chk("read b", rb == model[ib]);
      for (int i = 0; i < 4; i++) chk("words", words[i] == model[i]);
      if (load && wr_en) n_collide++;
      if (load) for (int i = 0; i < 4; i++) model[i] = blk[127-32*i -: 32];
      else if (wr_en) model[wr_idx] = wr_data;
    end
    chk("load/write collision seen", n_collide > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
