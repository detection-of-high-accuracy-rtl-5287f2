// trellis_correlation_tb: the row-to-column correlation experiment of
// trellis selection on a 1024 x 1024 array (n = 5, diffractor polynomial
// x^5 + x^2 + 1, 32 partitions per group).
//
// Two combined selectors at their default size are swept through every
// partition of all 32 groups, one with the column group equal to the row
// group, one with the +1 incrementer.  The partition every row and every
// column falls into is read from observe_row and col_mask.  For the first
// 3, 4, 5 and all 32 groups (in the order 1, 2, ..., 31, 0) the bench
// builds the histogram of how many of those groups put a row-column pair
// into the same partition.  Expected: without the incrementer 1024 pairs
// share a partition in every group, whatever the number of groups; with
// it, only 32 pairs (those tied by the all-zero states) do.
// The row and column addresses are swept independently (the selectors do
// not interact), 1024 cycles per partition.
module trellis_correlation_tb;
  localparam int R = 1024, C = 1024, P = 32, M = 16, B = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  row_addr;
  logic [3:0]  word_addr;
  logic [4:0]  partition, group;
  logic [1:0]  obs;
  logic [1:0][63:0] mask;

  for (genvar v = 0; v < 2; v++) begin : g_sel
    combined_selector dut (
      .clk, .rst_n, .row_addr, .word_addr, .row_step(1'b1), .word_step(1'b1),
      .partition, .group, .col_group_plus1(v == 1), .observe_row(obs[v]), .col_mask(mask[v]));
  end

  byte rowp[2][P][R];   // [plus1][order index of group][row]
  byte colp[2][P][C];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int sizes[4] = '{3, 4, 5, 32};
    {row_addr, word_addr, partition, group} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < P; gi++) begin
      group = 5'((gi + 1) % P);
      for (int p = 0; p < P; p++) begin
        partition = 5'(p);
        for (int i = 0; i < R; i++) begin
          row_addr = 10'(i); word_addr = 4'(i % M);
          #1;
          for (int v = 0; v < 2; v++) begin
            if (obs[v]) rowp[v][gi][i] = byte'(p);
            if (i < M)
              for (int b = 0; b < B; b++) if (mask[v][b]) colp[v][gi][b * M + i] = byte'(p);
          end
          @(negedge clk);
        end
      end
    end
    for (int v = 0; v < 2; v++)
      foreach (sizes[s]) begin
        automatic int g = sizes[s];
        automatic longint hist[] = new[g + 1];
        automatic longint total = 0;
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c++) begin
            automatic int k = 0;
            for (int gi = 0; gi < g; gi++) if (rowp[v][gi][r] == colp[v][gi][c]) k++;
            hist[k]++;
          end
        foreach (hist[k]) total += hist[k];
        $write("%s, %0d groups: pairs sharing a partition k times, k = 0..%0d:",
               v ? "+1 incrementer" : "same group    ", g, g);
        foreach (hist[k]) $write(" %0d", hist[k]);
        $write("\n");
        checks++;
        if (total != longint'(R) * C) failures++;
        checks++;
        if (hist[g] != (v ? 32 : 1024)) begin
          failures++;
          $display("FAIL: %0d pairs always share a partition", hist[g]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
