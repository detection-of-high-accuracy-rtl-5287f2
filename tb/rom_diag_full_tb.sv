// rom_diag_full_tb: one complete diagnostic test, three groups of 32 runs
// of 16384 reads each, through rom_diag_top at its default size (1024 rows
// of sixteen 64-bit words) with one faulty cell, whose row and column must
// be recovered from the signatures; see rom_diag_bench.
module rom_diag_full_tb;
  rom_diag_bench #(.FULL(1'b1), .N(5), .WB(4)) bench ();
endmodule
