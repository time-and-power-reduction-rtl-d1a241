// rpx_frontend - instruction front end of a 16-bit DSP core with
// register-program execution.
//
// Frequently executed program segments (loops, subroutines) are copied once
// into a register-program table (RPT) inside the CPU and then executed from
// there. While they run, the program address and data buses are floated, so
// they stop toggling, and the two fetch stages are skipped, so every change of
// flow costs fewer cycles.
//
// Structure (all blocks are instantiated here):
//   rpx_pc         program counter, shared by program memory and the RPT
//   rpx_fetch      Initiate-Fetch and Complete-Fetch stages
//   tristate_buf   x2, on the program address bus and program data bus,
//                  enabled while the H bit is clear
//   rpx_predecode  RPT plus the H-selected multiplexer, and the register
//                  towards the instruction decoder
//   rpt_write_ctrl copies fetched words into the RPT while LCF is set
//   rpx_ctrl       timing and control unit: LCF, H bit, SEREG and the four
//                  instructions SEGST, SEGED, HBUS, RBUS
//
// Interface:
//   pm_ab, pm_req    program address bus (high impedance while H is set) and
//                    a read strobe; program memory answers on pm_db one cycle
//                    after a strobe (synchronous read).
//   pm_db            program data bus from memory.
//   dec_*            one instruction per cycle to the core's instruction
//                    decoder; the four special instructions are passed on too
//                    and the core treats them as no-operations. Words copied
//                    into the RPT are not passed on.
//   redirect_*       a branch, call or return of the core, given in the same
//                    cycle as the dec_* word that causes it; it squashes the
//                    younger word in predecode and refetches from redirect_pc.
//   h_bit, lcf,      state of the scheme, for observation.
//   sereg
// Timing: a word fetched from memory reaches dec_* three cycles after its
// address is put on pm_ab; a word read from the RPT reaches dec_* one cycle
// after the program counter points at it. A taken branch therefore costs three
// bubbles from memory and one from the RPT.
module rpx_frontend
  import rpx_pkg::*;
#(
  parameter int unsigned RPT_DEPTH = 1024,
  parameter int unsigned PC_W      = 16,
  parameter logic [PC_W-1:0] RESET_PC = '0,
  localparam int unsigned AW       = $clog2(RPT_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // program memory side
  output tri   [PC_W-1:0]    pm_ab,
  output logic               pm_req,
  input  logic [INSTR_W-1:0] pm_db,
  // instruction decoder side
  output logic               dec_valid,
  output logic [INSTR_W-1:0] dec_instr,
  output logic [PC_W-1:0]    dec_pc,
  input  logic               redirect_valid,
  input  logic [PC_W-1:0]    redirect_pc,
  // status
  output logic               h_bit,
  output logic               lcf,
  output logic [PC_W-1:0]    sereg
);

  logic [PC_W-1:0]    pc;
  logic               pc_load;
  logic [PC_W-1:0]    pc_load_val;
  logic               flush;
  logic [PC_W-1:0]    pm_addr;
  tri   [INSTR_W-1:0] db_int;
  logic               fq_valid;
  logic [PC_W-1:0]    fq_pc;
  logic [INSTR_W-1:0] fq_word;
  logic               pd_valid;
  logic [INSTR_W-1:0] pd_word;
  logic [PC_W-1:0]    pd_pc;
  logic               pd_from_mem;
  logic               issue;
  logic               squash;
  logic               rpt_we;
  logic [AW-1:0]      rpt_waddr;
  logic [INSTR_W-1:0] rpt_wdata;

  rpx_pc #(.PC_W(PC_W), .RESET_PC(RESET_PC)) u_pc (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (pc_load),
    .load_val(pc_load_val),
    .adv     (h_bit || pm_req),
    .pc      (pc)
  );

  rpx_fetch #(.PC_W(PC_W), .INSTR_W(INSTR_W)) u_fetch (
    .clk     (clk),
    .rst_n   (rst_n),
    .h       (h_bit),
    .flush   (flush),
    .pc      (pc),
    .db_in   (db_int),
    .pm_addr (pm_addr),
    .pm_req  (pm_req),
    .fq_valid(fq_valid),
    .fq_pc   (fq_pc),
    .fq_word (fq_word)
  );

  tristate_buf #(.W(PC_W)) u_ab_buf (
    .a   (pm_addr),
    .oe_n(h_bit),
    .y   (pm_ab)
  );

  tristate_buf #(.W(INSTR_W)) u_db_buf (
    .a   (pm_db),
    .oe_n(h_bit),
    .y   (db_int)
  );

  rpx_predecode #(.RPT_DEPTH(RPT_DEPTH), .PC_W(PC_W)) u_pd (
    .clk        (clk),
    .rst_n      (rst_n),
    .h          (h_bit),
    .pc         (pc),
    .fq_valid   (fq_valid),
    .fq_pc      (fq_pc),
    .fq_word    (fq_word),
    .rpt_we     (rpt_we),
    .rpt_waddr  (rpt_waddr),
    .rpt_wdata  (rpt_wdata),
    .issue      (issue),
    .pd_valid   (pd_valid),
    .pd_word    (pd_word),
    .pd_pc      (pd_pc),
    .pd_from_mem(pd_from_mem),
    .dec_valid  (dec_valid),
    .dec_instr  (dec_instr),
    .dec_pc     (dec_pc)
  );

  rpt_write_ctrl #(.AW(AW)) u_wc (
    .lcf       (lcf),
    .word_valid(pd_valid),
    .from_mem  (pd_from_mem),
    .squash    (squash),
    .word      (pd_word),
    .word_addr (pd_pc[AW-1:0]),
    .we        (rpt_we),
    .waddr     (rpt_waddr),
    .wdata     (rpt_wdata)
  );

  rpx_ctrl #(.PC_W(PC_W)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .pd_valid      (pd_valid),
    .pd_word       (pd_word),
    .pd_pc         (pd_pc),
    .pd_from_mem   (pd_from_mem),
    .redirect_valid(redirect_valid),
    .redirect_pc   (redirect_pc),
    .h             (h_bit),
    .lcf           (lcf),
    .sereg         (sereg),
    .issue         (issue),
    .squash        (squash),
    .flush         (flush),
    .pc_load       (pc_load),
    .pc_load_val   (pc_load_val)
  );

  // Rules of the scheme: no program memory access while the buses are held,
  // the table is written only while copying from memory, and a copied word is
  // never passed to the decoder.
  a_no_fetch_when_held: assert property (@(posedge clk) disable iff (!rst_n)
    h_bit |-> !pm_req);
  a_write_only_when_copying: assert property (@(posedge clk) disable iff (!rst_n)
    rpt_we |-> (lcf && !h_bit));
  a_copied_not_issued: assert property (@(posedge clk) disable iff (!rst_n)
    rpt_we |-> !issue);

endmodule
