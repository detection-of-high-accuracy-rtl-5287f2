// bist_controller_tb: follows the controller cycle by cycle with a counter
// model of the address sweep.  Checks addresses, partition and group, the
// step and run framing outputs in every cycle, that reads follow each other
// with no gap (a test of G groups takes exactly G * 2^n * R * M cycles) and
// that done pulses once.  Runs the n = 2, M = 2 array in fast-column and
// fast-row order with the group counter wrapping, a zero group count, and
// one group of the default n = 5, M = 16 array.
module bist_controller_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // small instance
  logic start_s, fr_s; logic [1:0] gf_s; logic [2:0] gc_s;
  logic [3:0] ra_s; logic [0:0] wa_s; logic [1:0] p_s, g_s;
  logic v_s, rst_s, wst_s, f_s, l_s, b_s, d_s;
  bist_controller #(.N(2), .WB(1)) dut_s (
    .clk, .rst_n, .start(start_s), .fast_row(fr_s), .group_first(gf_s), .group_count(gc_s),
    .row_addr(ra_s), .word_addr(wa_s), .partition(p_s), .group(g_s), .addr_valid(v_s),
    .row_step(rst_s), .word_step(wst_s), .run_first(f_s), .run_last(l_s), .busy(b_s), .done(d_s));

  // default instance
  logic start_d; logic [4:0] gf_d; logic [5:0] gc_d;
  logic [9:0] ra_d; logic [3:0] wa_d; logic [4:0] p_d, g_d;
  logic v_d, rst_d, wst_d, f_d, l_d, b_d, d_d;
  bist_controller dut_d (
    .clk, .rst_n, .start(start_d), .fast_row(1'b0), .group_first(gf_d), .group_count(gc_d),
    .row_addr(ra_d), .word_addr(wa_d), .partition(p_d), .group(g_d), .addr_valid(v_d),
    .row_step(rst_d), .word_step(wst_d), .run_first(f_d), .run_last(l_d), .busy(b_d), .done(d_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (700000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_small(input bit fast_row, input int gfirst, input int gcount);
    int cycles = 0, dones = 0;
    int exp_cycles = gcount * 4 * 16 * 2;
    @(negedge clk);
    start_s = 1; fr_s = fast_row; gf_s = 2'(gfirst); gc_s = 3'(gcount);
    @(negedge clk);
    start_s = 0;
    fr_s = ~fast_row;   // the order is sampled at start only
    for (int gi = 0; gi < gcount; gi++)
      for (int p = 0; p < 4; p++)
        for (int i = 0; i < 32; i++) begin
          int r = fast_row ? i % 16 : i / 2;
          int w = fast_row ? i / 16 : i % 2;
          check(v_s && b_s, "valid during test");
          check(ra_s == 4'(r) && wa_s == 1'(w), $sformatf("addr i=%0d: r=%0d w=%0d", i, ra_s, wa_s));
          check(p_s == 2'(p) && g_s == 2'((gfirst + gi) % 4), "partition/group");
          check(rst_s == (fast_row || w == 1), "row_step");
          check(wst_s == (!fast_row || r == 15), "word_step");
          check(f_s == (i == 0) && l_s == (i == 31), "run framing");
          cycles++;
          @(negedge clk);
          if (d_s) dones++;
        end
    check(cycles == exp_cycles, "cycle count");
    check(dones == 1 && !v_s && !b_s, "done once, then idle");
    repeat (3) begin
      @(negedge clk);
      check(!v_s && !d_s, "stays idle");
    end
  endtask

  initial begin
    int cycles, dones;
    {start_s, fr_s, gf_s, gc_s, start_d, gf_d, gc_d} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_small(0, 1, 2);
    run_small(1, 3, 2);      // group counter wraps 3 -> 0
    run_small(0, 0, 4);
    // zero groups: done at once, no reads
    @(negedge clk);
    start_s = 1; gc_s = 0;
    @(negedge clk);
    start_s = 0;
    check(d_s && !v_s, "zero group count");
    // default size, one group: 32 runs of 16384 reads
    @(negedge clk);
    start_d = 1; gf_d = 5'd5; gc_d = 6'd1;
    @(negedge clk);
    start_d = 0;
    cycles = 0; dones = 0;
    while (!d_d) begin
      if (v_d) begin
        cycles++;
        check({p_d, ra_d, wa_d} == 19'(cycles - 1) && g_d == 5'd5, "default sweep order");
      end
      @(negedge clk);
    end
    check(cycles == 32 * 1024 * 16, $sformatf("default cycle count %0d", cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
