// rpx_fetch - the two fetch stages of the core, Initiate-Fetch and Complete-Fetch.
//
// Initiate-Fetch puts the program counter on the program address bus and raises
// the fetch strobe pm_req. In the next cycle, Complete-Fetch, program memory
// returns the word on the program data bus, and at the end of that cycle it is
// captured with its address in the pipeline register (fq_*) that feeds the
// predecode stage. A word fetched at cycle n is therefore seen by predecode at
// cycle n+2.
//
// While the H bit is set the stages are idle: no strobe, no captures, and the
// buses are floated by the tri-state buffers outside this module. flush
// (a branch of the core, SEGED, HBUS or RBUS) cancels both stages and
// suppresses the strobe in that cycle, since the program counter is being
// reloaded. The strobe is this design's addition: it tells program memory when
// to read, since a floating address bus cannot.
module rpx_fetch #(
  parameter int unsigned PC_W    = 16,
  parameter int unsigned INSTR_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               h,
  input  logic               flush,
  input  logic [PC_W-1:0]    pc,
  input  logic [INSTR_W-1:0] db_in,
  output logic [PC_W-1:0]    pm_addr,
  output logic               pm_req,
  output logic               fq_valid,
  output logic [PC_W-1:0]    fq_pc,
  output logic [INSTR_W-1:0] fq_word
);

  logic            cf_valid;
  logic [PC_W-1:0] cf_pc;

  assign pm_addr = pc;
  assign pm_req  = !h && !flush;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cf_valid <= 1'b0;
      cf_pc    <= '0;
      fq_valid <= 1'b0;
      fq_pc    <= '0;
      fq_word  <= '0;
    end else begin
      // Initiate-Fetch -> Complete-Fetch
      cf_valid <= pm_req;
      cf_pc    <= pc;
      // Complete-Fetch -> pipeline register ahead of predecode
      fq_valid <= cf_valid && !flush;
      fq_pc    <= cf_pc;
      if (cf_valid) fq_word <= db_in;
    end
  end

endmodule
