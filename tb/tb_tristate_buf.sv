// tb_tristate_buf - test of the tri-state bus buffer. The output net has a
// pull-up, so a released bus reads all ones; a driven bus reads the input.
module tb_tristate_buf;
  logic [15:0] a;
  logic        oe_n;
  tri1  [15:0] y;
  int unsigned checks = 0, failures = 0;

  tristate_buf #(.W(16)) dut (.a(a), .oe_n(oe_n), .y(y));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = 16'($urandom) & 16'h7FFF; oe_n = 1'($urandom);
      #1;
      if (oe_n) check(y == 16'hFFFF, $sformatf("released bus reads %h", y));
      else      check(y == a, $sformatf("driven bus reads %h, expected %h", y, a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
