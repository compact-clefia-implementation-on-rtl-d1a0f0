// tb_clefia_tbox_bram: checks both merged T-box memories.
//
// Every address of both tables is read on both ports and compared with the
// product of the S-box output and the matching diffusion-matrix column,
// computed here from the matrices M0/M1.  Then random 32-bit words are
// looked up byte-wise (bytes 0/1 on port a, bytes 2/3 on port b) and the
// XOR of the four words, with the port-b words rotated by 16 bits, must equal
// the reference F0/F1.  Read latency is one cycle.
module tb_clefia_tbox_bram;
  import clefia_pkg::*;
  import clefia_ref_pkg::*;

  logic clk = 1'b0;
  logic [8:0] a0 = '0, b0 = '0, a1 = '0, b1 = '0;
  word_t qa0, qb0, qa1, qb1;
  int checks = 0, failures = 0;

  clefia_tbox_bram #(.TABLE_ID(0)) u0 (.clk, .addr_a(a0), .addr_b(b0), .q_a(qa0), .q_b(qb0));
  clefia_tbox_bram #(.TABLE_ID(1)) u1 (.clk, .addr_a(a1), .addr_b(b1), .q_a(qa1), .q_b(qb1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // column j of M0 (sel 0) or M1 (sel 1) times the S-box value of byte x
  function automatic word_t col(bit sel, int j, byte_t x);
    byte_t m [2][4][4] = '{'{'{1, 2, 4, 6}, '{2, 1, 6, 4}, '{4, 6, 1, 2}, '{6, 4, 2, 1}},
                           '{'{1, 8, 2, 10}, '{8, 1, 10, 2}, '{2, 10, 1, 8}, '{10, 2, 8, 1}}};
    byte_t s;
    s = ((j % 2 == 0) ^ sel) ? sbox0(x) : sbox1(x);
    return {ref_mul(m[sel][0][j], s), ref_mul(m[sel][1][j], s),
            ref_mul(m[sel][2][j], s), ref_mul(m[sel][3][j], s)};
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      a0 = 9'(i); b0 = 9'(511 - i); a1 = 9'(i); b1 = 9'(511 - i);
      @(negedge clk);  // data valid one cycle after the address edge
      chk($sformatf("t0a %0d", i), qa0 == col(i[8], 0, i[7:0]));
      chk($sformatf("t0b %0d", i), qb0 == col(~i[8], 0, 8'(255 - i)));
      chk($sformatf("t1a %0d", i), qa1 == col(i[8], 1, i[7:0]));
      chk($sformatf("t1b %0d", i), qb1 == col(~i[8], 1, 8'(255 - i)));
    end
    // table 0 rotated by 16 bits is column 2, table 1 rotated is column 3
    for (int i = 0; i < 512; i += 37) begin
      @(negedge clk);
      a0 = 9'(i); a1 = 9'(i);
      @(negedge clk);
      chk("col2", rot16(qa0) == col(i[8], 2, i[7:0]));
      chk("col3", rot16(qa1) == col(i[8], 3, i[7:0]));
    end
    for (int i = 0; i < 200; i++) begin
      word_t x;
      bit    sel;
      x = $urandom;
      sel = i[0];
      @(negedge clk);
      a0 = {sel, x[31:24]}; a1 = {sel, x[23:16]}; b0 = {sel, x[15:8]}; b1 = {sel, x[7:0]};
      @(posedge clk);
      #1;
      chk($sformatf("F%0d(%h)", sel, x),
          (qa0 ^ qa1 ^ rot16(qb0) ^ rot16(qb1)) == ref_f(sel, 32'h0, x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
