// rom_diag_top_tb: end-to-end tests of the diagnosis logic on two small
// arrays run side by side:
//   - 64 rows of two 32-bit words (n = 3), which uses four column decoders
//     and three phase shifters;
//   - 16 rows of two 8-bit words (n = 2), the size of the worked row and
//     column partitioning examples.
// See rom_diag_bench for what each runs and checks; this module adds up
// their results.
module rom_diag_top_tb;
  rom_diag_bench #(.N(3), .WB(1), .FULL(1'b0), .SOLO(1'b0)) bench_n3 ();
  rom_diag_bench #(.N(2), .WB(1), .FULL(1'b0), .SOLO(1'b0)) bench_n2 ();

  initial begin
    wait (bench_n3.finished && bench_n2.finished);
    $display("TB_RESULT checks=%0d failures=%0d",
             bench_n3.checks + bench_n2.checks, bench_n3.failures + bench_n2.failures);
    $finish;
  end

  initial begin
    #10ms;
    $display("TB_RESULT checks=%0d failures=%0d",
             bench_n3.checks + bench_n2.checks, bench_n3.failures + bench_n2.failures + 1);
    $finish;
  end
endmodule
