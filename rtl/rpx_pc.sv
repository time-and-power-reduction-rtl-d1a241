// rpx_pc - program counter of the front end.
//
// Holds the address of the next instruction to fetch from program memory or to
// read from the register-program table. Each cycle it either loads a new value
// or advances by one:
//   * load  - a branch, call or return of the core, SEREG on SEGED, or the
//             address after HBUS/RBUS when the instruction source changes;
//   * adv   - an instruction was issued to program memory (H bit clear) or read
//             from the RPT (H bit set);
//   * otherwise it holds.
// load wins over adv. Reset sets RESET_PC. The same counter addresses both the
// program memory and the RPT, as in the scheme; its width is this design's
// choice (16 bits, the core's program address space without paging).
module rpx_pc #(
  parameter int unsigned PC_W     = 16,
  parameter logic [PC_W-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [PC_W-1:0] load_val,
  input  logic            adv,
  output logic [PC_W-1:0] pc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    pc <= RESET_PC;
    else if (load) pc <= load_val;
    else if (adv)  pc <= pc + 1'b1;
  end

endmodule
