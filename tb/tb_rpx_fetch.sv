// tb_rpx_fetch - test of the two fetch stages. A synchronous memory model here
// answers each strobe one cycle later with a word derived from the address.
// Random PC values, H bit and flushes are applied; the strobe, the address
// and the pipeline register (valid, address, word two cycles after the
// strobe, cancelled by a flush) are compared with a model kept here.
module tb_rpx_fetch;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        h, flush;
  logic [15:0] pc, db_in, pm_addr, fq_pc, fq_word;
  logic        pm_req, fq_valid;
  int unsigned checks = 0, failures = 0;

  rpx_fetch #(.PC_W(16), .INSTR_W(16)) dut (.*);

  function automatic logic [15:0] f(input logic [15:0] a);
    return (a * 16'd3) ^ 16'hA5C3;
  endfunction

  always @(posedge clk) if (pm_req) db_in <= f(pm_addr);
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

  bit          m_cf_valid = 0, exp_valid;
  logic [15:0] m_cf_pc = '0, exp_pc;
  bit          req_now;
  int unsigned n_valid = 0, n_flushed = 0;

  initial begin
    h = 1; flush = 0; pc = '0; db_in = '0;
    repeat (2) @(negedge clk);
    check(!fq_valid, "nothing valid after reset");
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      h = ($urandom % 6) == 0; flush = ($urandom % 8) == 0; pc = 16'($urandom);
      #1;
      req_now = !h && !flush;
      check(pm_req == req_now && pm_addr == pc, $sformatf("step %0d: strobe/address", i));
      @(posedge clk);
      exp_valid  = m_cf_valid && !flush;
      exp_pc     = m_cf_pc;
      if (m_cf_valid && flush) n_flushed++;
      m_cf_valid = req_now;
      m_cf_pc    = pc;
      #1;
      check(fq_valid == exp_valid, $sformatf("step %0d: fq_valid %b, expected %b", i, fq_valid, exp_valid));
      if (exp_valid) begin
        n_valid++;
        check(fq_pc == exp_pc && fq_word == f(exp_pc),
              $sformatf("step %0d: fq %h/%h, expected %h/%h", i, fq_pc, fq_word, exp_pc, f(exp_pc)));
      end
    end
    check(n_valid > 1000 && n_flushed > 100, "enough fetches and flushes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
