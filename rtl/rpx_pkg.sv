// rpx_pkg - shared types and constants of the register-program execution front end.
//
// The front end adds a register-program table (RPT) to the predecode stage of a
// 16-bit DSP core. Four instructions drive it: SEGST (start copying a segment
// into the RPT), SEGED (end of segment), HBUS (put the program buses in high
// impedance and execute from the RPT) and RBUS (release the buses). The names
// and meanings of the four instructions are the scheme's own; their 16-bit
// encodings below are this design's choice, taken from the top of the opcode
// space so that they do not collide with ordinary instructions of the core.
package rpx_pkg;

  // Instruction word width: the RPT stores normal 16-bit instructions.
  localparam int unsigned INSTR_W = 16;

  localparam logic [INSTR_W-1:0] OP_SEGST = 16'hFF00;
  localparam logic [INSTR_W-1:0] OP_SEGED = 16'hFF01;
  localparam logic [INSTR_W-1:0] OP_HBUS  = 16'hFF02;
  localparam logic [INSTR_W-1:0] OP_RBUS  = 16'hFF03;

  typedef enum logic [2:0] {
    SP_NONE,
    SP_SEGST,
    SP_SEGED,
    SP_HBUS,
    SP_RBUS
  } special_e;

  // Classify an instruction word as one of the four special instructions.
  function automatic special_e decode_special(input logic [INSTR_W-1:0] w);
    unique case (w)
      OP_SEGST: return SP_SEGST;
      OP_SEGED: return SP_SEGED;
      OP_HBUS:  return SP_HBUS;
      OP_RBUS:  return SP_RBUS;
      default:  return SP_NONE;
    endcase
  endfunction

endpackage
