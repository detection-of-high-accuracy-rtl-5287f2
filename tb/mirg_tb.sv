// mirg_tb: the signature register against an independent model of the
// ring with its injector network: random input streams with clear at the
// start of each run and idle (valid low) cycles; then a single error on
// each of the 64 channels in turn must give 64 different non-zero
// signatures, so a failing bit line is told apart by its signature.
module mirg_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        valid, clear;
  logic [63:0] din;
  logic [31:0] sig, model;

  mirg dut (.clk, .rst_n, .valid, .clear, .in_data(din), .signature(sig));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sigs[64];
    {valid, clear, din} = '0;
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++)
      for (int i = 0; i < 200; i++) begin
        valid = ($urandom % 8) != 0 || i == 0;
        clear = (i == 0);
        din   = {$urandom, $urandom};
        if (valid) model = mirg_step(clear ? 32'h0 : model, 256'(din), 64);
        @(negedge clk);
        check(sig == model, $sformatf("run %0d step %0d: %h vs %h", run, i, sig, model));
      end
    // Single-channel errors over a 100-word run.
    for (int c = 0; c < 64; c++) begin
      for (int i = 0; i < 100; i++) begin
        valid = 1; clear = (i == 0);
        din = (i == 37) ? 64'h1 << c : 64'h0;
        @(negedge clk);
      end
      sigs[c] = sig;
      check(sig != 0, $sformatf("channel %0d error vanished", c));
      for (int d = 0; d < c; d++) check(sigs[d] != sig, $sformatf("channels %0d and %0d alias", d, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
