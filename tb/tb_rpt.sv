// tb_rpt - test of the register-program table at its default size (1024 x 16).
// Fills every location with a pseudo-random word, reads all of them back and
// compares with a shadow copy kept here; checks that the read is combinational
// and that a write becomes visible only after its clock edge.
module tb_rpt;
  localparam int unsigned DEPTH = 1024, W = 16, AW = 10;
  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [W-1:0]  shadow [DEPTH];
  int unsigned   checks = 0, failures = 0;

  rpt #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      raddr = AW'(a);
      #1 check(rdata == shadow[a], $sformatf("read %0d: %h, expected %h", a, rdata, shadow[a]));
    end
    // Write and read the same location: old value until the edge, new after.
    @(negedge clk);
    raddr = 10'd513; we = 1'b1; waddr = 10'd513; wdata = ~shadow[513];
    #1 check(rdata == shadow[513], "same-cycle read returns the old word");
    @(negedge clk) we = 1'b0;
    check(rdata == ~shadow[513], "new word after the clock edge");
    // A disabled write changes nothing.
    waddr = 10'd7; wdata = ~shadow[7]; raddr = 10'd7;
    @(negedge clk);
    check(rdata == shadow[7], "no write without we");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
