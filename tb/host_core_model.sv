// host_core_model - behavioural stand-in for the DSP core behind the front end
// (testbench only). It executes each instruction that the front end delivers on
// dec_* in the cycle it appears, using the instruction set of host_isa_pkg, and
// answers taken branches, calls and returns in the same cycle on redirect_*.
// After HALT it ignores further instructions. acc, ar, cnt, executed and
// halted are visible to the testbench.
module host_core_model
  import host_isa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dec_valid,
  input  logic [15:0] dec_instr,
  input  logic [15:0] dec_pc,
  output logic        redirect_valid,
  output logic [15:0] redirect_pc
);

  logic [15:0] acc, ar, cnt;
  logic [15:0] stack [16];
  logic [3:0]  sp;
  logic        halted;
  int unsigned executed;
  int unsigned taken_branches;

  logic [3:0]  op;
  logic [11:0] arg;
  logic [15:0] page_target;

  always_comb begin
    op             = dec_instr[15:12];
    arg            = dec_instr[11:0];
    page_target    = {dec_pc[15:12], arg};
    redirect_valid = 1'b0;
    redirect_pc    = page_target;
    if (dec_valid && !halted && dec_instr[15:8] != 8'hFF) begin
      unique case (op)
        H_B, H_CALL: redirect_valid = 1'b1;
        H_RET:  begin redirect_valid = 1'b1; redirect_pc = stack[sp - 4'd1]; end
        H_BANZ: redirect_valid = (ar != 0);
        H_BCNZ: redirect_valid = (cnt != 0);
        H_LB:   begin redirect_valid = 1'b1; redirect_pc = {arg, 4'h0}; end
        default: ;
      endcase
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; ar <= '0; cnt <= '0; sp <= '0; halted <= 1'b0;
      executed <= 0; taken_branches <= 0;
    end else if (dec_valid && !halted) begin
      executed <= executed + 1;
      if (redirect_valid) taken_branches <= taken_branches + 1;
      if (dec_instr[15:8] != 8'hFF) begin
        unique case (op)
          H_ADD:   acc <= acc + 16'(arg);
          H_XOR:   acc <= acc ^ 16'(arg);
          H_CALL:  begin stack[sp] <= dec_pc + 16'd1; sp <= sp + 4'd1; end
          H_RET:   sp <= sp - 4'd1;
          H_BANZ:  if (ar != 0) ar <= ar - 16'd1;
          H_BCNZ:  if (cnt != 0) cnt <= cnt - 16'd1;
          H_LDAR:  ar <= 16'(arg);
          H_LDCNT: cnt <= 16'(arg);
          H_HALT:  halted <= 1'b1;
          default: ;
        endcase
      end
    end
  end

endmodule
