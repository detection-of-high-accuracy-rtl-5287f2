// combined_selector_tb: two combined selectors (n = 5, M = 16, B = 64)
// read the same fast-column sweeps, one with the column group equal to the
// row group and one with the +1 incrementer enabled.  For groups 1, 2 and 3
// and every partition, observe_row and col_mask are checked in every cycle
// against the partition rules.  The partition each row and each column
// falls into is recorded per group, and the number of row-column pairs that
// share a partition in all three groups is counted: without the
// incrementer every row is tied to one column (1024 pairs), with it only
// the 32 pairs tied by the all-zero states remain.  A short fast-row sweep checks the other address order.
module combined_selector_tb;
  import tb_ref_pkg::*;

  localparam int N = 5, WB = 4, M = 16, B = 64, R = 1024, C = 1024, G = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [9:0]  row_addr;
  logic [3:0]  word_addr;
  logic        row_step, word_step;
  logic [4:0]  partition, group;
  logic        obs_a, obs_b;
  logic [63:0] mask_a, mask_b;

  combined_selector dut_a (.clk, .rst_n, .row_addr, .word_addr, .row_step, .word_step,
                           .partition, .group, .col_group_plus1(1'b0),
                           .observe_row(obs_a), .col_mask(mask_a));
  combined_selector dut_b (.clk, .rst_n, .row_addr, .word_addr, .row_step, .word_step,
                           .partition, .group, .col_group_plus1(1'b1),
                           .observe_row(obs_b), .col_mask(mask_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference tables for one group.
  logic [63:0] exp_mask[2][32][16];   // [plus1][partition][word]
  int          exp_rowp[1024];        // row -> partition
  int          rowp[G][R];
  int          colp[2][G][C];

  task automatic build_ref(input int g);
    for (int r = 0; r < R; r++)
      for (int p = 0; p < 32; p++) if (row_in_partition(N, r, p, g)) exp_rowp[r] = p;
    for (int v = 0; v < 2; v++)
      for (int p = 0; p < 32; p++)
        for (int w = 0; w < M; w++)
          for (int b = 0; b < B; b++)
            exp_mask[v][p][w][b] = bit_in_partition(N, WB, w, b, p, (g + v) % 32);
  endtask

  initial begin
    int coupled[2];
    {row_addr, word_addr, row_step, word_step, partition, group} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int gi = 0; gi < G; gi++) begin
      automatic int g = gi + 1;
      build_ref(g);
      group = 5'(g);
      for (int p = 0; p < 32; p++) begin
        partition = 5'(p);
        for (int r = 0; r < R; r++)
          for (int w = 0; w < M; w++) begin
            row_addr = 10'(r); word_addr = 4'(w);
            word_step = 1; row_step = (w == M - 1);
            #1;
            check(obs_a == (exp_rowp[r] == p) && obs_b == obs_a,
                  $sformatf("row g=%0d p=%0d r=%0d", g, p, r));
            check(mask_a == exp_mask[0][p][w], $sformatf("mask g=%0d p=%0d w=%0d", g, p, w));
            check(mask_b == exp_mask[1][p][w], $sformatf("mask+1 g=%0d p=%0d w=%0d", g, p, w));
            if (obs_a) rowp[gi][r] = p;
            if (r == 0)
              for (int b = 0; b < B; b++) begin
                if (mask_a[b]) colp[0][gi][b * M + w] = p;
                if (mask_b[b]) colp[1][gi][b * M + w] = p;
              end
            @(negedge clk);
          end
      end
    end
    // Row-column pairs sharing a partition in every group.
    for (int v = 0; v < 2; v++) begin
      coupled[v] = 0;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          automatic bit same = 1;
          for (int gi = 0; gi < G; gi++) if (rowp[gi][r] != colp[v][gi][c]) same = 0;
          if (same) coupled[v]++;
        end
    end
    $display("pairs always in the same partition over %0d groups: same group %0d, +1 group %0d",
             G, coupled[0], coupled[1]);
    check(coupled[0] == 1024, "every row tied to a column without the incrementer");
    check(coupled[1] == 32, "incrementer leaves only the 32 zero-state pairs");
    // Fast-row order: row address changes every cycle.
    build_ref(7);
    group = 5'd7; partition = 5'd9;
    for (int w = 0; w < 2; w++)
      for (int r = 0; r < R; r++) begin
        row_addr = 10'(r); word_addr = 4'(w);
        row_step = 1; word_step = (r == R - 1);
        #1;
        check(obs_a == (exp_rowp[r] == 9), $sformatf("fast-row r=%0d", r));
        check(mask_b == exp_mask[1][9][w], $sformatf("fast-row mask w=%0d", w));
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
