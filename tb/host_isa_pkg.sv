// host_isa_pkg - a small stand-in instruction set for the DSP core that the
// front end feeds (testbench only). It provides just enough control flow to
// exercise register-program execution: branches, calls and returns, and two
// counted branches. Encoding: opcode in bits 15:12, operand in bits 11:0.
//   0x0--- NOP            0x1iii ADD  acc += iii     0x8iii XOR  acc ^= iii
//   0x2aaa B    aaa       0x3aaa CALL aaa            0x4--- RET
//   0x5aaa BANZ aaa: if (ar != 0) { ar--; branch }   0x6iii LDAR ar = iii
//   0xBaaa BCNZ aaa: if (cnt != 0) { cnt--; branch } 0xCiii LDCNT cnt = iii
//   0xAppp LB: branch to {ppp, 4'h0}                 0x7--- HALT
// B, CALL, BANZ and BCNZ targets stay in the current 4K page: {pc[15:12], aaa}.
// 0xFF00..0xFF03 are the front end's SEGST, SEGED, HBUS, RBUS (no-ops here).
package host_isa_pkg;
  localparam logic [3:0] H_NOP = 4'h0, H_ADD = 4'h1, H_B = 4'h2, H_CALL = 4'h3,
                         H_RET = 4'h4, H_BANZ = 4'h5, H_LDAR = 4'h6, H_HALT = 4'h7,
                         H_XOR = 4'h8, H_LB = 4'hA, H_BCNZ = 4'hB, H_LDCNT = 4'hC;

  function automatic logic [15:0] enc(input logic [3:0] op, input logic [11:0] arg);
    return {op, arg};
  endfunction
endpackage
