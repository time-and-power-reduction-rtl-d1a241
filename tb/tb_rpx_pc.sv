// tb_rpx_pc - test of the program counter: reset value, advance, hold, load,
// and load taking priority over advance, against a model kept here.
module tb_rpx_pc;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        load, adv;
  logic [15:0] load_val, pc, model;
  int unsigned checks = 0, failures = 0;

  rpx_pc #(.PC_W(16), .RESET_PC(16'h8000)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; adv = 0; load_val = '0;
    repeat (2) @(negedge clk);
    check(pc == 16'h8000, "reset value");
    rst_n = 1'b1;
    model = 16'h8000;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom % 5) == 0; adv = $urandom % 2; load_val = 16'($urandom);
      @(posedge clk);
      if (load) model = load_val; else if (adv) model = model + 16'd1;
      #1 check(pc == model, $sformatf("step %0d: pc %h, expected %h", i, pc, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
