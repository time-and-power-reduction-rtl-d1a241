// tb_rpx_ctrl - test of the timing and control unit. Feeds predecode words one
// cycle at a time and checks, in that cycle, issue, flush and the PC load, and
// after the clock the LCF, H bit and SEREG. Covers SEGST, copying with LCF set,
// SEGED ending a copy, SEGED as a no-operation, HBUS, RBUS, a branch of the
// core squashing a special instruction, and ordinary words from the table.
module tb_rpx_ctrl;
  import rpx_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        pd_valid, pd_from_mem, redirect_valid;
  logic [15:0] pd_word, pd_pc, redirect_pc;
  logic        h, lcf, issue, squash, flush, pc_load;
  logic [15:0] sereg, pc_load_val;
  int unsigned checks = 0, failures = 0;

  rpx_ctrl #(.PC_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Present one word; check the combinational answer, then clock it.
  task automatic step(input bit v, input logic [15:0] w, input logic [15:0] a, input bit mem,
                      input bit rd, input logic [15:0] rpc,
                      input bit e_issue, input bit e_flush, input bit e_load,
                      input logic [15:0] e_val, input string what);
    pd_valid = v; pd_word = w; pd_pc = a; pd_from_mem = mem;
    redirect_valid = rd; redirect_pc = rpc;
    #1;
    check(issue == e_issue, {what, ": issue"});
    check(flush == e_flush, {what, ": flush"});
    check(pc_load == e_load && (!e_load || pc_load_val == e_val),
          $sformatf("%s: pc load %b/%h, expected %b/%h", what, pc_load, pc_load_val, e_load, e_val));
    check(squash == rd, {what, ": squash"});
    @(negedge clk);
  endtask

  initial begin
    pd_valid = 0; pd_word = '0; pd_pc = '0; pd_from_mem = 1; redirect_valid = 0; redirect_pc = '0;
    repeat (2) @(negedge clk);
    check(!h && !lcf, "reset state");
    rst_n = 1'b1;
    step(1, 16'h1001, 16'h8011, 1, 0, 0, 1, 0, 0, 0, "ordinary word");
    step(1, OP_SEGST, 16'h8012, 1, 0, 0, 1, 0, 0, 0, "SEGST");
    check(lcf && sereg == 16'h8013, "SEGST sets LCF and SEREG");
    step(1, OP_HBUS, 16'h8013, 1, 0, 0, 0, 0, 0, 0, "HBUS while copying");
    check(!h && lcf, "copied HBUS does not act");
    step(0, 16'h0, 16'h0, 1, 0, 0, 0, 0, 0, 0, "empty slot while copying");
    step(1, 16'h2014, 16'h8014, 1, 0, 0, 0, 0, 0, 0, "word while copying");
    step(1, OP_SEGED, 16'h8015, 1, 0, 0, 0, 1, 1, 16'h8013, "SEGED ends copy");
    check(!lcf, "SEGED clears LCF");
    step(1, OP_HBUS, 16'h8013, 1, 0, 0, 1, 1, 1, 16'h8014, "HBUS");
    check(h, "HBUS sets H");
    step(1, 16'h1003, 16'h8014, 0, 0, 0, 1, 0, 0, 0, "word from the table");
    step(1, 16'h5014, 16'h8015, 0, 1, 16'h8014, 0, 1, 1, 16'h8014, "branch of the core");
    step(1, OP_RBUS, 16'h8015, 0, 1, 16'h8014, 0, 1, 1, 16'h8014, "branch squashes RBUS");
    check(h, "squashed RBUS leaves H set");
    step(1, OP_RBUS, 16'h8022, 0, 0, 0, 1, 1, 1, 16'h8023, "RBUS");
    check(!h, "RBUS clears H");
    step(1, OP_SEGED, 16'h8023, 1, 0, 0, 1, 0, 0, 0, "SEGED with LCF clear");
    check(!lcf && !h && sereg == 16'h8013, "SEGED with LCF clear changes nothing");
    step(1, OP_HBUS, 16'h8030, 1, 1, 16'h8100, 0, 1, 1, 16'h8100, "branch squashes HBUS");
    check(!h, "squashed HBUS leaves H clear");
    step(1, OP_SEGST, 16'h8040, 1, 1, 16'h8100, 0, 1, 1, 16'h8100, "branch squashes SEGST");
    check(!lcf, "squashed SEGST leaves LCF clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
