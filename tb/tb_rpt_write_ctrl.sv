// tb_rpt_write_ctrl - test of the RPT write controller. Directed cases for the
// copy rules (LCF set, word from memory, not squashed, SEGED not written) and
// random vectors compared with the rule written out here.
module tb_rpt_write_ctrl;
  localparam int unsigned AW = 10;
  logic          lcf, word_valid, from_mem, squash;
  logic [15:0]   word;
  logic [AW-1:0] word_addr;
  logic          we;
  logic [AW-1:0] waddr;
  logic [15:0]   wdata;
  int unsigned   checks = 0, failures = 0;

  rpt_write_ctrl #(.AW(AW)) dut (.*);

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

  task automatic drive(input bit l, v, m, s, input logic [15:0] w, input logic [AW-1:0] a);
    lcf = l; word_valid = v; from_mem = m; squash = s; word = w; word_addr = a;
    #1;
  endtask

  initial begin
    drive(1, 1, 1, 0, 16'h1234, 10'h013);
    check(we && waddr == 10'h013 && wdata == 16'h1234, "copy an ordinary word");
    drive(1, 1, 1, 0, 16'hFF02, 10'h014);
    check(we && wdata == 16'hFF02, "HBUS is copied like any word");
    drive(1, 1, 1, 0, 16'hFF01, 10'h023);
    check(!we, "SEGED is not copied");
    drive(0, 1, 1, 0, 16'h1234, 10'h013);
    check(!we, "no copy with LCF clear");
    drive(1, 1, 0, 0, 16'h1234, 10'h013);
    check(!we, "no copy of a word read from the table");
    drive(1, 1, 1, 1, 16'h1234, 10'h013);
    check(!we, "no copy of a squashed word");
    drive(1, 0, 1, 0, 16'h1234, 10'h013);
    check(!we, "no copy of an empty slot");
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] w;
      bit exp;
      w = (i % 4 == 0) ? 16'hFF01 : 16'($urandom);
      drive(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), w, AW'($urandom));
      exp = lcf && word_valid && from_mem && !squash && word != 16'hFF01;
      check(we == exp && (!exp || (waddr == word_addr && wdata == word)),
            $sformatf("vector %0d: we %b expected %b", i, we, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
