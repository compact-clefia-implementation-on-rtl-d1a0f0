// tb_clefia_key_ram: checks the expanded-key memory.
//
// All 64 words are written with random data through port A, then read back
// through port A and port B at different addresses in the same cycle.  A
// read of the address being written must return the old word.  Read data
// must appear exactly one cycle after the address.
module tb_clefia_key_ram;
  import clefia_pkg::*;

  logic clk = 1'b0;
  logic we = 1'b0;
  key_addr_t aa = '0, ab = '0;
  word_t wd = '0, qa, qb;
  word_t model [64];
  int checks = 0, failures = 0;

  clefia_key_ram dut (.clk, .we_a(we), .addr_a(aa), .wdata_a(wd), .q_a(qa), .addr_b(ab), .q_b(qb));

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
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1'b1; aa = key_addr_t'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      aa = key_addr_t'(i); ab = key_addr_t'(63 - i);
      @(posedge clk);
      #1;
      chk($sformatf("port a %0d", i), qa == model[i]);
      chk($sformatf("port b %0d", 63 - i), qb == model[63 - i]);
    end
    // read during write returns the old word; the next read the new one
    for (int i = 0; i < 16; i++) begin
      int a;
      a = $urandom_range(0, 63);
      @(negedge clk);
      we = 1'b1; aa = key_addr_t'(a); ab = key_addr_t'(a); wd = $urandom;
      @(posedge clk);
      #1;
      chk("read-during-write old a", qa == model[a]);
      chk("read-during-write old b", qb == model[a]);
      model[a] = wd;
      @(negedge clk);
      we = 1'b0;
      @(posedge clk);
      #1;
      chk("new data a", qa == model[a]);
      chk("new data b", qb == model[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
