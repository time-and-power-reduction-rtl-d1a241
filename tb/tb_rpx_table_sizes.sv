// tb_rpx_table_sizes - execution time and bus activity against table size.
//
// Runs the same four-loop program (bodies of 100, 200, 450 and 900
// instructions, run 200, 100, 40 and 20 times) once unconfigured and once for
// each table size 128, 256, 512, 1024 and 2048, where every loop that fits in
// the table is configured at run time. Checks, against values worked out here:
//   * the accumulator, from the loop bodies alone;
//   * the number of loops configured (1, 2, 3, 4, 4);
//   * the cycle count: configuring a loop of S words run IT times changes it by
//     S + 12 - 2*(IT - 1) cycles (S+3 copied words, 3 bubbles after SEGED,
//     2 after RBUS, 4 issue slots for the special instructions, 2 bubbles
//     saved on each of the IT-1 taken back branches);
//   * memory reads fall with every size that holds one more loop.
// Prints the time and toggle reduction of each size against the plain run.
module tb_rpx_table_sizes;
  localparam int unsigned NS = 6;
  localparam int unsigned L [4] = '{100, 200, 450, 900};
  localparam int unsigned IT [4] = '{200, 100, 40, 20};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        done    [NS];
  int unsigned cycles  [NS], reads [NS], toggles [NS], wrapped [NS];
  logic [15:0] acc     [NS];
  int unsigned checks = 0, failures = 0;

  rpx_size_run #(.DEPTH(1024), .CONFIGURE(1'b0), .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r_plain (
    .clk, .done(done[0]), .cycles(cycles[0]), .reads(reads[0]), .toggles(toggles[0]),
    .wrapped(wrapped[0]), .acc(acc[0]));
  rpx_size_run #(.DEPTH(128),  .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r128 (
    .clk, .done(done[1]), .cycles(cycles[1]), .reads(reads[1]), .toggles(toggles[1]),
    .wrapped(wrapped[1]), .acc(acc[1]));
  rpx_size_run #(.DEPTH(256),  .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r256 (
    .clk, .done(done[2]), .cycles(cycles[2]), .reads(reads[2]), .toggles(toggles[2]),
    .wrapped(wrapped[2]), .acc(acc[2]));
  rpx_size_run #(.DEPTH(512),  .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r512 (
    .clk, .done(done[3]), .cycles(cycles[3]), .reads(reads[3]), .toggles(toggles[3]),
    .wrapped(wrapped[3]), .acc(acc[3]));
  rpx_size_run #(.DEPTH(1024), .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r1024 (
    .clk, .done(done[4]), .cycles(cycles[4]), .reads(reads[4]), .toggles(toggles[4]),
    .wrapped(wrapped[4]), .acc(acc[4]));
  rpx_size_run #(.DEPTH(2048), .LOOP0(L[0]), .LOOP1(L[1]), .LOOP2(L[2]), .LOOP3(L[3]), .ITER0(IT[0]), .ITER1(IT[1]), .ITER2(IT[2]), .ITER3(IT[3])) r2048 (
    .clk, .done(done[5]), .cycles(cycles[5]), .reads(reads[5]), .toggles(toggles[5]),
    .wrapped(wrapped[5]), .acc(acc[5]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Accumulator after the program, from the loop bodies alone.
  function automatic logic [15:0] expected_acc();
    logic [15:0] x = '0;
    for (int j = 0; j < 4; j++) begin
      for (int it = 0; it < int'(IT[j]); it++)
        for (int i = 0; i < int'(L[j]); i++)
          if (i % 4 == 3) x = x ^ 16'((i * 97 + j) & 'hFFF);
          else            x = x + 16'((i * 7 + j) & 'hFF);
    end
    return x;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned depth [NS];
    int unsigned fit   [NS];
    longint      exp_cyc;
    logic [15:0] ex;
    depth = '{0, 128, 256, 512, 1024, 2048};
    fit   = '{0, 1, 2, 3, 4, 4};
    ex = expected_acc();
    @(posedge clk);  // the runs clear done at time 0
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    #1;
    for (int s = 0; s < int'(NS); s++) begin
      check(acc[s] == ex, $sformatf("size %0d: acc %h, expected %h", depth[s], acc[s], ex));
      check(wrapped[s] == fit[s], $sformatf("size %0d: %0d loops configured", depth[s], wrapped[s]));
      exp_cyc = longint'(cycles[0]);
      for (int j = 0; j < int'(fit[s]); j++)
        exp_cyc += longint'(L[j]) + 12 - 2 * (longint'(IT[j]) - 1);
      check(longint'(cycles[s]) == exp_cyc,
            $sformatf("size %0d: %0d cycles, expected %0d", depth[s], cycles[s], exp_cyc));
      if (s == 0)
        $display("plain      : %0d cycles, %0d reads, %0d toggles", cycles[0], reads[0], toggles[0]);
      else
        $display("RPT %4d   : %0d cycles (%0d vs plain), %0d reads, %0d toggles (%0d%% less)",
                 depth[s], cycles[s], longint'(cycles[s]) - longint'(cycles[0]),
                 reads[s], toggles[s],
                 100 * (longint'(toggles[0]) - longint'(toggles[s])) / longint'(toggles[0]));
    end
    for (int s = 1; s < int'(NS) - 1; s++)
      check(reads[s] < reads[s - 1], $sformatf("size %0d reads fewer than the previous run", depth[s]));
    check(reads[5] == reads[4], "2048 entries read no less than 1024 once all loops fit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
