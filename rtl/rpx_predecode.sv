// rpx_predecode - predecode stage modified for register-program execution.
//
// Between the fetch pipeline register and the decoder pipeline register sits
// the added logic: the register-program table and a 2:1 multiplexer whose
// select is the H bit. Input 0 is the word fetched from program memory
// (fq_*); input 1 is the RPT location addressed by the low bits of the program
// counter. With H set, the program counter addresses the table in the same
// cycle, so the two fetch stages are skipped: one instruction per cycle
// without touching the program buses.
//
// The selected word (pd_*) goes to the control unit and the RPT write
// controller in the same cycle. The control unit answers with issue, and the
// word is then registered towards the instruction decoder (dec_*), one cycle
// later. The RPT write port is driven from outside by the write controller.
module rpx_predecode
  import rpx_pkg::*;
#(
  parameter int unsigned RPT_DEPTH = 1024,
  parameter int unsigned PC_W      = 16,
  localparam int unsigned AW       = $clog2(RPT_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               h,
  input  logic [PC_W-1:0]    pc,
  input  logic               fq_valid,
  input  logic [PC_W-1:0]    fq_pc,
  input  logic [INSTR_W-1:0] fq_word,
  input  logic               rpt_we,
  input  logic [AW-1:0]      rpt_waddr,
  input  logic [INSTR_W-1:0] rpt_wdata,
  input  logic               issue,
  output logic               pd_valid,
  output logic [INSTR_W-1:0] pd_word,
  output logic [PC_W-1:0]    pd_pc,
  output logic               pd_from_mem,
  output logic               dec_valid,
  output logic [INSTR_W-1:0] dec_instr,
  output logic [PC_W-1:0]    dec_pc
);

  logic [INSTR_W-1:0] rpt_rdata;

  rpt #(.DEPTH(RPT_DEPTH), .W(INSTR_W)) u_rpt (
    .clk  (clk),
    .we   (rpt_we),
    .waddr(rpt_waddr),
    .wdata(rpt_wdata),
    .raddr(pc[AW-1:0]),
    .rdata(rpt_rdata)
  );

  // The multiplexer of the modified stage: 1 = RPT, 0 = program memory.
  always_comb begin
    pd_from_mem = !h;
    if (h) begin
      pd_valid = 1'b1;
      pd_word  = rpt_rdata;
      pd_pc    = pc;
    end else begin
      pd_valid = fq_valid;
      pd_word  = fq_word;
      pd_pc    = fq_pc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_instr <= '0;
      dec_pc    <= '0;
    end else begin
      dec_valid <= issue;
      if (issue) begin
        dec_instr <= pd_word;
        dec_pc    <= pd_pc;
      end
    end
  end

endmodule
