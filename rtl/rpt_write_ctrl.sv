// rpt_write_ctrl - write controller of the register-program table.
//
// While the loop control function bit (LCF) is set, every instruction word that
// reaches the predecode stage from program memory is written into the RPT at
// the location given by the low AW bits of its address, the way a move from
// memory to a register would. The SEGED word that closes the segment is not
// written: it ends the copy. Words read from the RPT itself (H bit set) are
// never written back, and a word squashed by a branch of the core is dropped.
//
// Interface: word_valid/word describe the predecode word, word_addr holds the
// low AW bits of its address, from_mem says
// it came over the program data bus, squash cancels it. The write port drives
// the RPT in the same cycle (the RPT writes on the next clock edge). Purely
// combinational.
module rpt_write_ctrl
  import rpx_pkg::*;
#(
  parameter int unsigned AW = 10
) (
  input  logic               lcf,
  input  logic               word_valid,
  input  logic               from_mem,
  input  logic               squash,
  input  logic [INSTR_W-1:0] word,
  input  logic [AW-1:0]      word_addr,
  output logic               we,
  output logic [AW-1:0]      waddr,
  output logic [INSTR_W-1:0] wdata
);

  always_comb begin
    we    = lcf && word_valid && from_mem && !squash
            && (decode_special(word) != SP_SEGED);
    waddr = word_addr;
    wdata = word;
  end

endmodule
