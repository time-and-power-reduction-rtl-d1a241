// rpx_size_run - one run of the table-size workload (testbench only).
//
// Builds a program of four counted loops, loop j having a body of LOOPj words
// run ITERj times, one loop per 4K page. When CONFIGURE is set, every loop whose
// table segment (HBUS + body + BANZ + RBUS) fits in DEPTH locations is wrapped
// in SEGST/HBUS ... RBUS/SEGED, the way software would use a table of that
// size; loops that do not fit stay in program memory. Runs a front end with
// RPT_DEPTH = DEPTH, program memory and the stand-in core until HALT and
// reports cycles, memory reads, bus toggles and the core's accumulator.
module rpx_size_run
  import rpx_pkg::*;
  import host_isa_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter bit          CONFIGURE = 1'b1,
  parameter int unsigned LOOP0     = 100,
  parameter int unsigned LOOP1     = 200,
  parameter int unsigned LOOP2     = 450,
  parameter int unsigned LOOP3     = 900,
  parameter int unsigned ITER0     = 200,
  parameter int unsigned ITER1     = 100,
  parameter int unsigned ITER2     = 40,
  parameter int unsigned ITER3     = 20
) (
  input  logic        clk,
  output logic        done,
  output int unsigned cycles,
  output int unsigned reads,
  output int unsigned toggles,
  output int unsigned wrapped,
  output logic [15:0] acc
);

  logic        rst_n = 1'b0;
  tri   [15:0] pm_ab;
  logic        pm_req;
  logic [15:0] pm_db;
  logic        dec_valid, redirect_valid, h_bit, lcf;
  logic [15:0] dec_instr, dec_pc, redirect_pc, sereg;

  rpx_frontend #(.RPT_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .pm_ab, .pm_req, .pm_db, .dec_valid, .dec_instr, .dec_pc,
    .redirect_valid, .redirect_pc, .h_bit, .lcf, .sereg
  );
  prog_mem_model u_mem (.clk(clk), .req(pm_req), .addr(pm_ab), .data(pm_db));
  host_core_model u_core (
    .clk, .rst_n, .dec_valid, .dec_instr, .dec_pc, .redirect_valid, .redirect_pc
  );

  function automatic int unsigned loop_len(input int j);
    return (j == 0) ? LOOP0 : (j == 1) ? LOOP1 : (j == 2) ? LOOP2 : LOOP3;
  endfunction

  function automatic int unsigned loop_iter(input int j);
    return (j == 0) ? ITER0 : (j == 1) ? ITER1 : (j == 2) ? ITER2 : ITER3;
  endfunction

  initial begin
    int unsigned a, head, c;
    done = 1'b0; cycles = 0; wrapped = 0;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = 16'h0000;
    u_mem.mem[0] = enc(H_LB, 12'h100);                 // reset: go to 0x1000
    for (int j = 0; j < 4; j++) begin
      bit wrap;
      wrap = CONFIGURE && (loop_len(j) + 3 <= DEPTH);
      a = 32'h1000 * (j + 1);
      u_mem.mem[a] = enc(H_LDAR, 12'(loop_iter(j) - 1)); a++;
      if (wrap) begin
        wrapped++;
        u_mem.mem[a] = OP_SEGST; a++;
        u_mem.mem[a] = OP_HBUS;  a++;
      end
      head = a;
      for (int i = 0; i < int'(loop_len(j)); i++) begin
        u_mem.mem[a] = (i % 4 == 3) ? enc(H_XOR, 12'((i * 97 + j) & 'hFFF))
                                    : enc(H_ADD, 12'((i * 7 + j) & 'hFF));
        a++;
      end
      u_mem.mem[a] = enc(H_BANZ, 12'(head)); a++;
      if (wrap) begin
        u_mem.mem[a] = OP_RBUS;  a++;
        u_mem.mem[a] = OP_SEGED; a++;
      end
      u_mem.mem[a] = (j == 3) ? enc(H_HALT, 12'h0) : enc(H_LB, 12'(16'h100 * (j + 2)));
    end
    repeat (3) @(posedge clk);
    u_mem.clear_counts();
    #1 rst_n = 1'b1;
    c = 0;
    while (!u_core.halted && c < 1000000) begin
      @(posedge clk);
      c++;
    end
    cycles  = c;
    reads   = u_mem.reads;
    toggles = u_mem.addr_toggles + u_mem.data_toggles;
    acc     = u_core.acc;
    done    = u_core.halted;
  end

endmodule
