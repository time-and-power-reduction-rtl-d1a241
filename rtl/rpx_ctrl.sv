// rpx_ctrl - timing and control unit for register-program execution.
//
// Holds the three state elements of the scheme and acts on the word in the
// predecode stage:
//   LCF   loop control function bit: set by SEGST, cleared by SEGED. While it
//         is set, words arriving from program memory are copied into the RPT
//         (by the write controller) instead of being executed.
//   SEREG loaded by SEGST with the address after the SEGST, copied back to the
//         program counter by SEGED, so execution resumes right after SEGST.
//   H     set by HBUS, cleared by RBUS. It floats the program address and data
//         buses and makes the predecode stage read instructions from the RPT.
// A SEGED met while LCF is clear is a no-operation, which lets the same SEGED
// be passed over once the segment has run.
//
// Each cycle the unit decides whether the predecode word goes on to the
// decoder (issue), and whether the program counter is reloaded (pc_load,
// pc_load_val) and the fetch stages flushed (flush). HBUS and RBUS reload the
// counter with the next address so that the first instruction from the new
// source is read there. A branch of the core (redirect_*) has priority and
// squashes the predecode word, which is on the wrong path. Both the action
// and the priority order are combinational; the state changes at the clock.
module rpx_ctrl
  import rpx_pkg::*;
#(
  parameter int unsigned PC_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pd_valid,
  input  logic [INSTR_W-1:0] pd_word,
  input  logic [PC_W-1:0]    pd_pc,
  input  logic               pd_from_mem,
  input  logic               redirect_valid,
  input  logic [PC_W-1:0]    redirect_pc,
  output logic               h,
  output logic               lcf,
  output logic [PC_W-1:0]    sereg,
  output logic               issue,
  output logic               squash,
  output logic               flush,
  output logic               pc_load,
  output logic [PC_W-1:0]    pc_load_val
);

  special_e        kind;
  logic            act;
  logic            copying;
  logic            h_n, lcf_n;
  logic [PC_W-1:0] sereg_n;

  always_comb begin
    kind        = decode_special(pd_word);
    act         = pd_valid && !redirect_valid;
    copying     = lcf && pd_from_mem;
    squash      = redirect_valid;
    issue       = 1'b0;
    flush       = 1'b0;
    pc_load     = 1'b0;
    pc_load_val = pd_pc + 1'b1;
    h_n         = h;
    lcf_n       = lcf;
    sereg_n     = sereg;
    if (redirect_valid) begin
      flush       = 1'b1;
      pc_load     = 1'b1;
      pc_load_val = redirect_pc;
    end else if (act && copying) begin
      // Segment copy: only SEGED acts; every other word is written to the RPT.
      if (kind == SP_SEGED) begin
        lcf_n       = 1'b0;
        flush       = 1'b1;
        pc_load     = 1'b1;
        pc_load_val = sereg;
      end
    end else if (act) begin
      issue = 1'b1;
      unique case (kind)
        SP_SEGST: begin
          lcf_n   = 1'b1;
          sereg_n = pd_pc + 1'b1;
        end
        SP_HBUS: begin
          h_n     = 1'b1;
          flush   = 1'b1;
          pc_load = 1'b1;
        end
        SP_RBUS: begin
          h_n     = 1'b0;
          flush   = 1'b1;
          pc_load = 1'b1;
        end
        default: ;  // SEGED with LCF clear, or an ordinary instruction
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h     <= 1'b0;
      lcf   <= 1'b0;
      sereg <= '0;
    end else begin
      h     <= h_n;
      lcf   <= lcf_n;
      sereg <= sereg_n;
    end
  end

endmodule
