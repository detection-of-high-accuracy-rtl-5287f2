// row_selector_tb: drives the row selector through complete sweeps of the
// row address space, back to back as the BIST controller does, and
// compares observe_row in every cycle with formula (1).
//   - n = 2, partition 2, group 3, fast-row order: rows 2, 5, 11, 12 must
//     be observed, at cycles 2, 5, 11 and 12 of the run (worked example).
//   - n = 2, every partition and group; every partition must hold exactly
//     one row per block.
//   - n = 5 (default), a spread of partitions and groups, fast-row order
//     and fast-column order (row address held for 4 words).
module row_selector_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] ra2;  logic st2;  logic [1:0] p2, g2;  logic obs2;
  logic [9:0] ra5;  logic st5;  logic [4:0] p5, g5;  logic obs5;

  row_selector #(.N(2)) dut2 (.clk, .rst_n, .row_addr(ra2), .row_step(st2),
                              .partition(p2), .group(g2), .observe_row(obs2));
  row_selector dut5 (.clk, .rst_n, .row_addr(ra5), .row_step(st5),
                     .partition(p5), .group(g5), .observe_row(obs5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int observed_cycles[$];

  task automatic sweep2(input int p, input int g);
    int count = 0;
    observed_cycles.delete();
    p2 = 2'(p); g2 = 2'(g);
    for (int r = 0; r < 16; r++) begin
      ra2 = 4'(r); st2 = 1;
      #1;
      check(obs2 == row_in_partition(2, r, p, g), $sformatf("n=2 p=%0d g=%0d r=%0d", p, g, r));
      if (obs2) begin count++; observed_cycles.push_back(r); end
      @(negedge clk);
    end
    check(count == 4, "n=2 one row per block");
  endtask

  task automatic sweep5(input int p, input int g, input int words);
    int count = 0;
    p5 = 5'(p); g5 = 5'(g);
    for (int r = 0; r < 1024; r++)
      for (int w = 0; w < words; w++) begin
        ra5 = 10'(r); st5 = (w == words - 1);
        #1;
        check(obs5 == row_in_partition(5, r, p, g), $sformatf("n=5 p=%0d g=%0d r=%0d", p, g, r));
        if (obs5) count++;
        @(negedge clk);
      end
    check(count == 32 * words, "n=5 one row per block");
  endtask

  initial begin
    {ra2, st2, p2, g2, ra5, st5, p5, g5} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    sweep2(2, 3);
    check(observed_cycles.size() == 4 && observed_cycles[0] == 2 && observed_cycles[1] == 5 &&
          observed_cycles[2] == 11 && observed_cycles[3] == 12, "worked example rows 2,5,11,12");
    for (int g = 0; g < 4; g++)
      for (int p = 0; p < 4; p++) sweep2(p, g);
    for (int i = 0; i < 6; i++) sweep5((i * 7 + 3) % 32, (i * 11 + 1) % 32, 1);
    sweep5(31, 0, 1);
    sweep5(5, 17, 4);
    sweep5(0, 30, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
