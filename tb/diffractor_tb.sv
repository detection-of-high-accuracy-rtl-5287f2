// diffractor_tb: checks the diffractor trajectory against field arithmetic
// (g * alpha^k) for every non-zero group number at n = 5 and n = 2, that it
// cycles with period 2^n - 1, that load is visible in the same cycle, and
// that the published 2-bit example trajectory 1 -> 2 -> 3 -> 1 holds.
module diffractor_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       load5, step5;
  logic [4:0] lv5, st5;
  logic       load2, step2;
  logic [1:0] lv2, st2;

  diffractor #(.N(5)) dut5 (.clk, .rst_n, .load(load5), .load_val(lv5), .step(step5), .state_o(st5));
  diffractor #(.N(2)) dut2 (.clk, .rst_n, .load(load2), .load_val(lv2), .step(step2), .state_o(st2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {load5, step5, lv5, load2, step2, lv2} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // n = 5: every group number, one full period.
    for (int g = 0; g < 32; g++) begin
      @(negedge clk);
      load5 = 1; lv5 = 5'(g); step5 = 0;
      #1 check(st5 == 5'(g), $sformatf("load-through g=%0d", g));
      @(negedge clk);
      load5 = 0;
      for (int k = 0; k <= 31; k++) begin
        #1;
        check(st5 == 5'(gf_scale(g, k, 5)), $sformatf("g=%0d k=%0d got %0d", g, k, st5));
        if (g != 0 && k > 0 && k < 31) check(st5 != 5'(g), "period shorter than 31");
        step5 = 1;
        @(negedge clk);
      end
      step5 = 0;
    end
    // Load and step together: the loaded value is advanced once.
    @(negedge clk);
    load5 = 1; step5 = 1; lv5 = 5'd7;
    @(negedge clk);
    load5 = 0; step5 = 0;
    #1;
    check(st5 == 5'(gf_scale(7, 1, 5)), "load+step");
    // n = 2 example trajectory 1 -> 2 -> 3 -> 1.
    @(negedge clk);
    load2 = 1; lv2 = 2'd1;
    @(negedge clk);
    load2 = 0;
    #1;
    check(st2 == 2'd1, "n=2 start");
    step2 = 1;
    @(negedge clk); #1; check(st2 == 2'd2, "n=2 1->2");
    @(negedge clk); #1; check(st2 == 2'd3, "n=2 2->3");
    @(negedge clk); #1; check(st2 == 2'd1, "n=2 3->1");
    step2 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
