// tb_rpx_frontend - end-to-end test of the register-program execution front end
// at its default size (1024-entry table, 16-bit program counter).
//
// The front end runs together with a behavioural program memory and a small
// stand-in core (host_core_model). Each program is loaded into memory, a long
// branch to it is placed at the reset address, and the design runs until the
// core halts. Results are compared with an instruction-level reference model
// written here (ref_run), which implements SEGST/SEGED/HBUS/RBUS and the table
// without any pipeline, and with hand-worked cycle counts:
//   * a loop executed from the table takes K+1 cycles per iteration (K
//     instructions plus one bubble for the taken branch), from memory K+3;
//   * while the H bit is set, program memory sees no read strobe.
// Programs: a loop configured at run time (copy, SEGED, HBUS, RBUS, SEGED as a
// no-op) next to the same loop unconfigured; a subroutine configured on its
// first call and re-entered at its HBUS on later calls; a loop re-configured
// each time it is branched to; a branch that squashes an HBUS on the wrong
// path; a program held entirely in the table (pre-configured, endless); and a
// 1000-instruction loop that fills most of the table. Each mechanism is counted
// and must occur at least once.
module tb_rpx_frontend;
  import rpx_pkg::*;
  import host_isa_pkg::*;

  localparam int unsigned N = 1024;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  tri   [15:0] pm_ab;
  logic        pm_req;
  logic [15:0] pm_db;
  logic        dec_valid;
  logic [15:0] dec_instr, dec_pc;
  logic        redirect_valid;
  logic [15:0] redirect_pc;
  logic        h_bit, lcf;
  logic [15:0] sereg;

  rpx_frontend dut (
    .clk, .rst_n, .pm_ab, .pm_req, .pm_db, .dec_valid, .dec_instr, .dec_pc,
    .redirect_valid, .redirect_pc, .h_bit, .lcf, .sereg
  );

  prog_mem_model u_mem (.clk(clk), .req(pm_req), .addr(pm_ab), .data(pm_db));

  host_core_model u_core (
    .clk, .rst_n, .dec_valid, .dec_instr, .dec_pc, .redirect_valid, .redirect_pc
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ program image + ref
  logic [15:0] img  [65536];
  logic [15:0] rrpt [N];

  task automatic put(input logic [15:0] a, input logic [15:0] w);
    img[a] = w;
    u_mem.mem[a] = w;
  endtask

  function automatic logic [15:0] I(input logic [3:0] op, input int arg);
    return enc(op, 12'(arg));
  endfunction

  // Instruction-level reference: no pipeline, same architectural rules.
  task automatic ref_run(input int unsigned max_issue, output logic [15:0] racc,
                         output int unsigned issued);
    logic [15:0] pc, acc, ar, cnt, sr, w;
    logic [15:0] stk [16];
    int          sp;
    logic        l, hh;
    longint      guard;
    pc = 0; acc = 0; ar = 0; cnt = 0; sr = 0; sp = 0; l = 0; hh = 0; issued = 0;
    guard = 0;
    while (issued < max_issue && guard < 64'd10000000) begin
      guard++;
      w = hh ? rrpt[pc[9:0]] : img[pc];
      if (l && !hh) begin
        if (w == OP_SEGED) begin l = 0; pc = sr; end
        else begin rrpt[pc[9:0]] = w; pc++; end
        continue;
      end
      issued++;
      if (w[15:8] == 8'hFF) begin
        if (w == OP_SEGST) begin l = 1; sr = pc + 1; end
        if (w == OP_HBUS) hh = 1;
        if (w == OP_RBUS) hh = 0;
        pc++;
        continue;
      end
      case (w[15:12])
        H_ADD:   begin acc = acc + 16'(w[11:0]); pc++; end
        H_XOR:   begin acc = acc ^ 16'(w[11:0]); pc++; end
        H_B:     pc = {pc[15:12], w[11:0]};
        H_LB:    pc = {w[11:0], 4'h0};
        H_CALL:  begin stk[sp] = pc + 1; sp++; pc = {pc[15:12], w[11:0]}; end
        H_RET:   begin sp--; pc = stk[sp]; end
        H_BANZ:  if (ar != 0) begin ar--; pc = {pc[15:12], w[11:0]}; end else pc++;
        H_BCNZ:  if (cnt != 0) begin cnt--; pc = {pc[15:12], w[11:0]}; end else pc++;
        H_LDAR:  begin ar = 16'(w[11:0]); pc++; end
        H_LDCNT: begin cnt = 16'(w[11:0]); pc++; end
        H_HALT:  break;
        default: pc++;
      endcase
    end
    racc = acc;
  endtask

  // --------------------------------------------------- mechanism observation
  int unsigned n_copy = 0, n_seged_end = 0, n_seged_nop = 0, n_hbus = 0, n_rbus = 0;
  int unsigned n_br_rpt = 0, n_br_mem = 0, n_squash_special = 0, n_rpt_issue = 0;
  int unsigned n_bus_violation = 0;
  logic prev_h = 1'b0, prev_lcf = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (dut.rpt_we) n_copy++;
    if (prev_lcf && !lcf) n_seged_end++;
    if (!prev_h && h_bit) n_hbus++;
    if (prev_h && !h_bit) n_rbus++;
    if (dec_valid && dec_instr == OP_SEGED) n_seged_nop++;
    if (redirect_valid && h_bit) n_br_rpt++;
    if (redirect_valid && !h_bit) n_br_mem++;
    if (redirect_valid && dut.pd_valid && decode_special(dut.pd_word) != SP_NONE)
      n_squash_special++;
    if (dut.issue && h_bit) n_rpt_issue++;
    if (h_bit && pm_req) n_bus_violation++;
    prev_h   <= h_bit;
    prev_lcf <= lcf;
  end

  // Loop-period monitor: cycles between consecutive deliveries of head.
  // Only iterations entered from the loop's own back branch (tail) count.
  logic [15:0]     head = 16'hFFFF, tail = 16'hFFFF, prev_dec_pc = 16'hFFFF;
  int unsigned     period_expect = 0, period_seen = 0, period_bad = 0;
  longint unsigned last_head = 0;
  always @(posedge clk) if (rst_n && dec_valid) prev_dec_pc <= dec_pc;
  always @(posedge clk) if (rst_n && dec_valid && dec_pc == head && !u_core.halted) begin
    if (last_head != 0 && prev_dec_pc == tail) begin
      period_seen++;
      if (cyc - last_head != longint'(period_expect)) begin
        period_bad++;
        $display("  head %h period %0d, expected %0d", head, cyc - last_head, period_expect);
      end
    end
    last_head <= cyc;
  end

  // Run the program at start until the core halts; returns the cycle count.
  task automatic run(input logic [15:0] start, input int unsigned max_cyc,
                     output longint unsigned cycles);
    longint unsigned c0;
    put(16'h0000, I(H_LB, int'(start[15:4])));
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    u_mem.clear_counts();
    last_head = 0;
    #1 rst_n = 1'b1;
    c0 = cyc;
    while (!u_core.halted && cyc - c0 < longint'(max_cyc)) @(posedge clk);
    cycles = cyc - c0;
  endtask

  task automatic check_result(input string name, input int unsigned max_issue);
    logic [15:0] racc;
    int unsigned issued;
    ref_run(max_issue, racc, issued);
    check(u_core.halted, {name, ": core halted"});
    check(u_core.acc == racc, $sformatf("%s: acc %h, reference %h", name, u_core.acc, racc));
    check(u_core.executed == issued,
          $sformatf("%s: %0d instructions executed, reference %0d", name, u_core.executed, issued));
  endtask

  // ------------------------------------------------------------------ tests
  longint unsigned cyc_plain, cyc_conf, cyc_big;
  int unsigned     reads_plain, reads_conf, tog_plain, tog_conf, s_copy, s_end, s_hbus;
  logic [15:0]     racc;
  int unsigned     issued;

  initial begin
    for (int a = 0; a < 65536; a++) put(16'(a), 16'h0000);
    for (int a = 0; a < int'(N); a++) rrpt[a] = 16'h0000;

    // P1: the loop of the run-time configured example, and the same loop plain.
    put(16'h8010, I(H_LDAR, 39));
    put(16'h8011, I(H_NOP, 0));
    put(16'h8012, OP_SEGST);
    put(16'h8013, OP_HBUS);
    put(16'h8014, I(H_ADD, 3));
    put(16'h8015, I(H_XOR, 'h05A));
    for (int i = 0; i < 11; i++) put(16'h8016 + 16'(i), I(H_ADD, 16 * i + 1));
    put(16'h8021, I(H_BANZ, 'h014));
    put(16'h8022, OP_RBUS);
    put(16'h8023, OP_SEGED);
    put(16'h8024, I(H_ADD, 'h100));
    put(16'h8025, I(H_HALT, 0));

    put(16'h8410, I(H_LDAR, 39));
    put(16'h8411, I(H_NOP, 0));
    put(16'h8412, I(H_ADD, 3));
    put(16'h8413, I(H_XOR, 'h05A));
    for (int i = 0; i < 11; i++) put(16'h8414 + 16'(i), I(H_ADD, 16 * i + 1));
    put(16'h841F, I(H_BANZ, 'h412));
    put(16'h8420, I(H_ADD, 'h100));
    put(16'h8421, I(H_HALT, 0));

    head = 16'h8412; tail = 16'h841F; period_expect = 14 + 3; period_seen = 0; period_bad = 0;
    run(16'h8410, 5000, cyc_plain);
    check_result("plain loop", 100000);
    reads_plain = u_mem.reads; tog_plain = u_mem.addr_toggles + u_mem.data_toggles;
    check(period_seen == 39 && period_bad == 0,
          $sformatf("plain loop: %0d periods, %0d not %0d cycles", period_seen, period_bad, period_expect));
    racc = u_core.acc;

    s_copy = n_copy; s_end = n_seged_end;
    head = 16'h8014; tail = 16'h8021; period_expect = 14 + 1; period_seen = 0; period_bad = 0;
    run(16'h8010, 5000, cyc_conf);
    check_result("configured loop", 100000);
    check(u_core.acc == racc, "configured loop: same result as plain loop");
    reads_conf = u_mem.reads; tog_conf = u_mem.addr_toggles + u_mem.data_toggles;
    check(period_seen == 39 && period_bad == 0,
          $sformatf("configured loop: %0d periods, %0d not %0d cycles", period_seen, period_bad, period_expect));
    check(n_copy - s_copy == 32'h8022 - 32'h8013 + 1,
          $sformatf("configured loop: %0d words copied", n_copy - s_copy));
    check(n_seged_end - s_end == 1, "configured loop: one segment end");
    check(cyc_conf < cyc_plain, $sformatf("configured loop faster: %0d vs %0d cycles", cyc_conf, cyc_plain));
    check(reads_conf < reads_plain, $sformatf("configured loop reads memory less: %0d vs %0d", reads_conf, reads_plain));
    $display("P1: plain %0d cycles %0d reads %0d toggles; configured %0d cycles %0d reads %0d toggles",
             cyc_plain, reads_plain, tog_plain, cyc_conf, reads_conf, tog_conf);

    // P2: subroutine configured on the first call, re-entered at HBUS later.
    put(16'h8100, I(H_ADD, 1));
    put(16'h8101, I(H_CALL, 'h200));
    put(16'h8102, I(H_XOR, 'h0FF));
    put(16'h8103, I(H_CALL, 'h201));
    put(16'h8104, I(H_ADD, 2));
    put(16'h8105, I(H_CALL, 'h201));
    put(16'h8106, I(H_HALT, 0));
    put(16'h8200, OP_SEGST);
    put(16'h8201, OP_HBUS);
    put(16'h8202, I(H_LDAR, 4));
    put(16'h8203, I(H_ADD, 5));
    put(16'h8204, I(H_XOR, 'h033));
    put(16'h8205, I(H_BANZ, 'h203));
    put(16'h8206, OP_RBUS);
    put(16'h8207, I(H_RET, 0));
    put(16'h8208, OP_SEGED);
    s_copy = n_copy; s_end = n_seged_end; s_hbus = n_hbus;
    head = 16'h8203; tail = 16'h8205; period_expect = 3 + 1; period_seen = 0; period_bad = 0;
    run(16'h8100, 5000, cyc_conf);
    check_result("repeated calls", 100000);
    check(n_copy - s_copy == 7, $sformatf("repeated calls: %0d words copied", n_copy - s_copy));
    check(n_seged_end - s_end == 1, "repeated calls: configured once");
    check(n_hbus - s_hbus == 3, $sformatf("repeated calls: %0d HBUS", n_hbus - s_hbus));
    check(period_seen == 12 && period_bad == 0,
          $sformatf("repeated calls: %0d periods, %0d wrong", period_seen, period_bad));

    // P3: a loop re-configured each time another segment branches to it.
    put(16'h8300, I(H_LDCNT, 1));
    put(16'h8301, I(H_ADD, 1));
    put(16'h8302, OP_SEGST);
    put(16'h8303, OP_HBUS);
    put(16'h8304, I(H_LDAR, 2));
    put(16'h8305, I(H_ADD, 2));
    put(16'h8306, I(H_BANZ, 'h305));
    put(16'h8307, OP_RBUS);
    put(16'h8308, OP_SEGED);
    put(16'h8309, I(H_ADD, 'h010));
    put(16'h830A, I(H_BCNZ, 'h302));
    put(16'h830B, I(H_XOR, 'h0AA));
    put(16'h830C, I(H_HALT, 0));
    s_end = n_seged_end;
    head = 16'hFFFF;
    run(16'h8300, 5000, cyc_conf);
    check_result("branch to segment", 100000);
    check(n_seged_end - s_end == 2, "branch to segment: configured twice");

    // P6: a taken branch squashes an HBUS that follows it.
    put(16'h8500, I(H_B, 'h502));
    put(16'h8501, OP_HBUS);
    put(16'h8502, I(H_ADD, 7));
    put(16'h8503, I(H_HALT, 0));
    s_hbus = n_hbus;
    run(16'h8500, 1000, cyc_conf);
    check_result("squashed HBUS", 100000);
    check(n_hbus == s_hbus, "squashed HBUS: H bit never set");

    // P5: a 1000-instruction loop, 1003 words in the table.
    put(16'hA000, I(H_LDAR, 2));
    put(16'hA001, OP_SEGST);
    put(16'hA002, OP_HBUS);
    for (int i = 0; i < 1000; i++)
      put(16'hA003 + 16'(i), (i % 3 == 2) ? I(H_XOR, (i * 37) & 'hFFF) : I(H_ADD, (i * 7) & 'hFF));
    put(16'hA3EB, I(H_BANZ, 'h003));
    put(16'hA3EC, OP_RBUS);
    put(16'hA3ED, OP_SEGED);
    put(16'hA3EE, I(H_HALT, 0));
    s_copy = n_copy;
    head = 16'hA003; tail = 16'hA3EB; period_expect = 1001 + 1; period_seen = 0; period_bad = 0;
    run(16'hA000, 20000, cyc_big);
    check_result("large loop", 100000);
    check(n_copy - s_copy == 1003, $sformatf("large loop: %0d words copied", n_copy - s_copy));
    check(period_seen == 2 && period_bad == 0,
          $sformatf("large loop: %0d periods, %0d wrong", period_seen, period_bad));

    // P4: pre-configured execution, endless program held in the table.
    put(16'h9000, OP_SEGST);
    put(16'h9001, OP_HBUS);
    put(16'h9002, I(H_LDAR, 0));
    put(16'h9003, I(H_ADD, 1));
    put(16'h9004, I(H_XOR, 'h0F0));
    put(16'h9005, I(H_ADD, 'h011));
    put(16'h9006, I(H_B, 'h003));
    put(16'h9007, OP_SEGED);
    head = 16'h9003; tail = 16'h9006; period_expect = 4 + 1; period_seen = 0; period_bad = 0;
    begin
      longint unsigned c;
      int unsigned r0, e;
      run(16'h9000, 100, c);
      check(h_bit, "pre-configured: running from the table");
      r0 = u_mem.reads;
      repeat (2000) @(posedge clk);
      check(u_mem.reads == r0, $sformatf("pre-configured: %0d memory reads while resident", u_mem.reads - r0));
      check(period_bad == 0 && period_seen > 300, "pre-configured: loop period");
      @(negedge clk);
      e = u_core.executed + 37;
      while (u_core.executed < e) @(negedge clk);
      ref_run(e, racc, issued);
      check(u_core.acc == racc, $sformatf("pre-configured: acc %h, reference %h", u_core.acc, racc));
    end

    // Every mechanism must have happened.
    check(n_copy > 0,           "mechanism: segment copy");
    check(n_seged_end > 0,      "mechanism: SEGED ends copy and reloads PC");
    check(n_seged_nop > 0,      "mechanism: SEGED as no-operation");
    check(n_hbus > 0,           "mechanism: HBUS");
    check(n_rbus > 0,           "mechanism: RBUS");
    check(n_br_rpt > 0,         "mechanism: branch while executing from the table");
    check(n_br_mem > 0,         "mechanism: branch while executing from memory");
    check(n_squash_special > 0, "mechanism: special instruction squashed by a branch");
    check(n_rpt_issue > 0,      "mechanism: instructions issued from the table");
    check(n_bus_violation == 0, $sformatf("no memory strobe while H set (%0d)", n_bus_violation));
    $display("events: copy=%0d seged_end=%0d seged_nop=%0d hbus=%0d rbus=%0d br_rpt=%0d br_mem=%0d squash=%0d rpt_issue=%0d",
             n_copy, n_seged_end, n_seged_nop, n_hbus, n_rbus, n_br_rpt, n_br_mem, n_squash_special, n_rpt_issue);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
