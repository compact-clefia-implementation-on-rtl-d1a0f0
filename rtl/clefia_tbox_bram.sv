// clefia_tbox_bram: merged CLEFIA T-box held in one dual-port block RAM.
//
// A T-box replaces an S-box lookup and one column of a diffusion matrix by
// a single 8-bit -> 32-bit table.  Here the F0 and F1 versions of a T-box
// share one 512 x 32 memory: address bit 8 selects the F-function, bits 7..0
// are the data byte.  TABLE_ID 0 holds the tables for bytes 0 and 2, TABLE_ID
// 1 those for bytes 1 and 3 (see clefia_pkg::tbox_entry).  Both ports read
// the same contents; the byte-2/3 users rotate the word by 16 bits outside
// the memory, so two lookups share one memory as the design intends.
//
// Timing: synchronous read on both ports, data one cycle after the address
// (the address register of an FPGA block RAM).  The contents are computed at
// elaboration from the S-box definitions, no data file is needed.
module clefia_tbox_bram
  import clefia_pkg::*;
#(
  parameter int unsigned TABLE_ID = 0   // 0: T_x0/T_x2, 1: T_x1/T_x3
) (
  input  logic       clk,
  input  logic [8:0] addr_a,
  input  logic [8:0] addr_b,
  output word_t      q_a,
  output word_t      q_b
);

  word_t rom [512];

  initial begin
    for (int i = 0; i < 512; i++) rom[i] = tbox_entry(TABLE_ID, 9'(i));
  end

  always_ff @(posedge clk) begin
    q_a <= rom[addr_a];
    q_b <= rom[addr_b];
  end

endmodule
