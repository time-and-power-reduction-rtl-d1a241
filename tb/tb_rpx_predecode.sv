// tb_rpx_predecode - test of the modified predecode stage at its default size.
// Writes the table through the write port, then checks the multiplexer: with
// the H bit set the stage presents the table word at the PC (always valid,
// not from memory), with it clear the fetched word. Checks that an issued
// word reaches the decoder register one cycle later and that nothing is
// presented to the decoder without issue.
module tb_rpx_predecode;
  localparam int unsigned N = 1024;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        h, fq_valid, rpt_we, issue;
  logic [15:0] pc, fq_pc, fq_word, rpt_wdata;
  logic [9:0]  rpt_waddr;
  logic        pd_valid, pd_from_mem, dec_valid;
  logic [15:0] pd_word, pd_pc, dec_instr, dec_pc;
  logic [15:0] shadow [N];
  int unsigned checks = 0, failures = 0;

  rpx_predecode #(.RPT_DEPTH(N), .PC_W(16)) dut (.*);

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
    h = 0; fq_valid = 0; fq_pc = '0; fq_word = '0; rpt_we = 0; rpt_waddr = '0;
    rpt_wdata = '0; issue = 0; pc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!dec_valid, "decoder register empty after reset");
    for (int a = 0; a < int'(N); a++) begin
      rpt_we = 1; rpt_waddr = 10'(a); rpt_wdata = 16'($urandom); shadow[a] = rpt_wdata;
      @(negedge clk);
    end
    rpt_we = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] ew, ep;
      bit ev, iss;
      h = 1'($urandom); pc = 16'($urandom); fq_valid = 1'($urandom);
      fq_pc = 16'($urandom); fq_word = 16'($urandom); iss = 1'($urandom); issue = iss;
      #1;
      ev = h ? 1'b1 : fq_valid;
      ew = h ? shadow[pc[9:0]] : fq_word;
      ep = h ? pc : fq_pc;
      check(pd_valid == ev && pd_word == ew && pd_pc == ep && pd_from_mem == !h,
            $sformatf("step %0d: mux h=%b word %h expected %h", i, h, pd_word, ew));
      @(negedge clk);
      check(dec_valid == iss && (!iss || (dec_instr == ew && dec_pc == ep)),
            $sformatf("step %0d: decoder register", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
