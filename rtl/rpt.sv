// rpt - register-program table.
//
// A table of DEPTH registers, each holding one normal INSTR_W-bit instruction
// copied from program memory. An instruction lives at the location given by the
// low log2(DEPTH) bits of its program memory address, so the program counter
// addresses the table directly (1024 locations use PC bits 9..0). It is built
// as a register file rather than a cache: there is no tag and no hit check;
// software decides which segment is resident.
//
// Interface: one synchronous write port (we, waddr, wdata) and one read port
// (raddr, rdata). The read is combinational so that it fits in the predecode
// stage, next to the multiplexer that picks between the table and the fetched
// word. A write is visible to a read of the same location from the next cycle.
// The contents are not reset: a location holds a meaningful word only after a
// SEGST..SEGED pass has written it.
module rpt #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end

  assign rdata = regs[raddr];

endmodule
