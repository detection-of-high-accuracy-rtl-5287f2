// rom_diag_bench: end-to-end bench for rom_diag_top with the ROM model.
//
// Every test starts the BIST, collects the signature unloaded after each
// run, and compares each one with a signature computed independently: the
// bench re-reads the fill, applies the faults, applies the partition rules
// and the gating rules, and compacts with the reference signature register.
// It also checks the read rate (one word per clock, no gap between runs)
// and, for the diagnostic tests, recovers the injected fault from which
// signatures differ from the fault-free ones:
//   rows    - a row is a suspect if its partition failed in every group;
//   columns - likewise with the column signatures.
// Every mechanism of the design is counted and must occur at least once
// (row, column, trellis and all-cells modes; fast-column and fast-row
// order; +1 column group; group counter wrap; signature unloads).
// With FULL set the top keeps its default size and one diagnostic test
// (three groups of 32 runs, one faulty cell) is run.  With SOLO cleared
// the bench only raises `finished` and leaves reporting to its parent.
module rom_diag_bench #(
  parameter int unsigned N    = 3,
  parameter int unsigned WB   = 1,
  parameter bit          FULL = 1'b0,
  parameter bit          SOLO = 1'b1   // print the result and finish
);
  import tb_ref_pkg::*;

  localparam int unsigned M  = 1 << WB;
  localparam int unsigned B  = ((1 << N) / M) << N;
  localparam int unsigned R  = 1 << (2 * N);
  localparam int unsigned C  = M * B;
  localparam int unsigned P  = 1 << N;
  localparam int unsigned AW = 2 * N + WB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit finished = 0;

  logic                start, fast_row, plus1;
  logic [1:0]          row_dis, col_dis;
  logic [N-1:0]        group_first;
  logic [N:0]          group_count;
  logic                rom_en;
  logic [AW-1:0]       rom_addr;
  logic [B-1:0]        rom_data;
  logic                sig_valid, busy, done;
  logic [N-1:0]        sig_partition, sig_group;
  logic [1:0][31:0]    signature;

  logic        f_row_en, f_col_en, f_cell_en, f_val;
  int unsigned f_row, f_col, f_cell_r, f_cell_c;

  if (FULL) begin : g_full
    rom_diag_top dut (
      .clk, .rst_n, .start, .fast_row, .col_group_plus1(plus1), .row_disable(row_dis),
      .col_disable(col_dis), .group_first, .group_count, .rom_en, .rom_addr, .rom_data,
      .sig_valid, .sig_partition, .sig_group, .signature, .busy, .done);
  end else begin : g_small
    rom_diag_top #(.N(N), .WB(WB)) dut (
      .clk, .rst_n, .start, .fast_row, .col_group_plus1(plus1), .row_disable(row_dis),
      .col_disable(col_dis), .group_first, .group_count, .rom_en, .rom_addr, .rom_data,
      .sig_valid, .sig_partition, .sig_group, .signature, .busy, .done);
  end

  rom_model #(.N(N), .WB(WB)) u_rom (
    .clk, .en(rom_en), .addr(rom_addr), .data(rom_data),
    .fault_row_en(f_row_en), .fault_row(f_row), .fault_col_en(f_col_en), .fault_col(f_col),
    .fault_cell_en(f_cell_en), .cell_row(f_cell_r), .cell_col(f_cell_c), .fault_val(f_val));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    MECH_ROW_MODE, MECH_COL_MODE, MECH_TRELLIS, MECH_ALL_CELLS, MECH_FAST_COL,
    MECH_FAST_ROW, MECH_PLUS1, MECH_GROUP_WRAP, MECH_UNLOAD, MECH_ROW_DIAG,
    MECH_COL_DIAG, MECH_TRELLIS_CLEAN, MECH_COUNT
  } mech_e;
  int mech[MECH_COUNT];

  // ------------------------------------------------------------- reference
  int rowp[R];        // partition of each row in the current group
  int colp[C];        // partition of each column for the column group

  task automatic build_tables(input int g, input int gc);
    for (int r = 0; r < R; r++)
      for (int p = 0; p < P; p++) if (row_in_partition(N, r, p, g)) rowp[r] = p;
    for (int w = 0; w < M; w++)
      for (int b = 0; b < B; b++)
        for (int p = 0; p < P; p++)
          if (bit_in_partition(N, WB, w, b, p, gc)) colp[b * M + w] = p;
  endtask

  function automatic bit ref_cell(input int r, input int w, input int b, input bit faulty);
    logic [31:0] chunk = rom_chunk(r * M + w, b / 32);
    bit v = chunk[b % 32];
    if (faulty) begin
      if (f_row_en && r == f_row) v = f_val;
      if (f_col_en && b * M + w == f_col) v = f_val;
      if (f_cell_en && r == f_cell_r && b * M + w == f_cell_c) v = ~v;
    end
    return v;
  endfunction

  // Expected signatures of one run (tables must hold the run's group).
  task automatic expected_run(input int p, input bit frow, input bit faulty,
                              output logic [1:0][31:0] sig);
    sig = '0;
    for (int i = 0; i < R * M; i++) begin
      int r = frow ? i % R : i / M;
      int w = frow ? i / R : i % M;
      logic [255:0] g0 = '0, g1 = '0;
      for (int b = 0; b < B; b++) begin
        bit v = ref_cell(r, w, b, faulty);
        bit rsel = rowp[r] == p;
        bit csel = colp[b * M + w] == p;
        g0[b] = v & (row_dis[0] | rsel) & (col_dis[0] | csel);
        g1[b] = v & (row_dis[1] | rsel) & (col_dis[1] | csel);
      end
      sig[0] = mirg_step(sig[0], g0, B);
      sig[1] = mirg_step(sig[1], g1, B);
    end
  endtask

  // ------------------------------------------------------------- one test
  logic [1:0][31:0] got[$];
  int               got_p[$], got_g[$];
  logic [1:0][31:0] exp_sig[$], gold_sig[$];
  int               run_group[$];

  task automatic run_test(input bit frow, input bit p1, input logic [1:0] rd,
                          input logic [1:0] cd, input int gfirst, input int gcount);
    int cycles = 0;
    got.delete(); got_p.delete(); got_g.delete();
    exp_sig.delete(); gold_sig.delete(); run_group.delete();
    @(negedge clk);
    start = 1; fast_row = frow; plus1 = p1; row_dis = rd; col_dis = cd;
    group_first = N'(gfirst); group_count = (N + 1)'(gcount);
    @(negedge clk);
    start = 0;
    while (!done) begin
      cycles++;
      if (sig_valid) begin
        got.push_back(signature);
        got_p.push_back(int'(sig_partition));
        got_g.push_back(int'(sig_group));
        mech[MECH_UNLOAD]++;
      end
      @(negedge clk);
    end
    if (sig_valid) begin
      got.push_back(signature);
      got_p.push_back(int'(sig_partition));
      got_g.push_back(int'(sig_group));
      mech[MECH_UNLOAD]++;
    end
    // one read per clock: the reads plus the controller and pipeline delay
    check(cycles == gcount * P * R * M + 1,
          $sformatf("test took %0d cycles, %0d reads", cycles, gcount * P * R * M));
    check(got.size() == gcount * P, $sformatf("%0d signatures unloaded", got.size()));
    // reference
    for (int gi = 0; gi < gcount; gi++) begin
      int g = (gfirst + gi) % P;
      build_tables(g, p1 ? (g + 1) % P : g);
      for (int p = 0; p < P; p++) begin
        logic [1:0][31:0] e, gs;
        expected_run(p, frow, 1'b1, e);
        expected_run(p, frow, 1'b0, gs);
        exp_sig.push_back(e);
        gold_sig.push_back(gs);
        run_group.push_back(g);
      end
    end
    for (int i = 0; i < got.size() && i < exp_sig.size(); i++) begin
      check(got_p[i] == i % P && got_g[i] == run_group[i], $sformatf("run %0d labels", i));
      check(got[i] == exp_sig[i], $sformatf("run %0d signatures %h, expected %h", i, got[i], exp_sig[i]));
    end
    for (int c = 0; c < 2; c++) begin
      case ({rd[c], cd[c]})
        2'b01: mech[MECH_ROW_MODE]++;
        2'b10: mech[MECH_COL_MODE]++;
        2'b00: mech[MECH_TRELLIS]++;
        2'b11: mech[MECH_ALL_CELLS]++;
      endcase
    end
    if (frow) mech[MECH_FAST_ROW]++; else mech[MECH_FAST_COL]++;
    if (p1) mech[MECH_PLUS1]++;
    if (gfirst + gcount > P) mech[MECH_GROUP_WRAP]++;
  endtask

  // Rows (ch 0) or columns (ch 1) whose partition failed in every group.
  task automatic diagnose(input int ch, input bit p1, output int suspects[$]);
    int n = (ch == 0) ? R : C;
    bit all_fail[] = new[n];
    foreach (all_fail[x]) all_fail[x] = 1;
    for (int i = 0; i < got.size(); i += P) begin
      int g = run_group[i];
      build_tables(g, p1 ? (g + 1) % P : g);
      for (int x = 0; x < n; x++) begin
        int p = (ch == 0) ? rowp[x] : colp[x];
        if (got[i + p][ch] == gold_sig[i + p][ch]) all_fail[x] = 0;
      end
    end
    suspects.delete();
    foreach (all_fail[x]) if (all_fail[x]) suspects.push_back(x);
  endtask

  initial begin
    int suspects[$];
    int clean;
    {start, fast_row, plus1, row_dis, col_dis, group_first, group_count} = '0;
    {f_row_en, f_col_en, f_cell_en, f_val} = '0;
    {f_row, f_col, f_cell_r, f_cell_c} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    if (FULL) begin
      // Three groups of the default array with one inverted cell: its row
      // and its column are located from the row and column signatures.
      f_cell_en = 1; f_cell_r = R / 3; f_cell_c = C / 5;
      run_test(0, 1, 2'b10, 2'b01, 1, 3);
      diagnose(0, 1, suspects);
      check(suspects.size() == 1 && suspects[0] == f_cell_r, $sformatf("cell row suspects %p", suspects));
      if (suspects.size() == 1 && suspects[0] == f_cell_r) mech[MECH_ROW_DIAG]++;
      diagnose(1, 1, suspects);
      check(suspects.size() == 1 && suspects[0] == f_cell_c, $sformatf("cell column suspects %p", suspects));
      if (suspects.size() == 1 && suspects[0] == f_cell_c) mech[MECH_COL_DIAG]++;
    end else begin
      // 1. stuck-at-1 row: row and column signatures, 3 groups
      f_row_en = 1; f_row = 37 % R; f_val = 1;
      run_test(0, 0, 2'b10, 2'b01, 1, 3);
      diagnose(0, 0, suspects);
      check(suspects.size() == 1 && suspects[0] == f_row, $sformatf("row suspects %p", suspects));
      if (suspects.size() == 1 && suspects[0] == f_row) mech[MECH_ROW_DIAG]++;
      // 2. stuck-at-0 column, fast-row order, +1 group, groups wrapping
      f_row_en = 0; f_col_en = 1; f_col = 21 % C; f_val = 0;
      run_test(1, 1, 2'b10, 2'b01, P - 2, 3);
      diagnose(1, 1, suspects);
      check(suspects.size() == 1 && suspects[0] == f_col, $sformatf("column suspects %p", suspects));
      if (suspects.size() == 1 && suspects[0] == f_col) mech[MECH_COL_DIAG]++;
      // 3. row and column at once: trellis signatures and a plain one
      f_row_en = 1; f_row = 11 % R; f_val = 1;
      run_test(0, 1, 2'b10, 2'b10, 1, 3);
      clean = 0;
      for (int i = 0; i < got.size(); i++) if (got[i][0] == gold_sig[i][0]) clean++;
      check(clean > 0, "some trellis signatures stay error-free");
      if (clean > 0) mech[MECH_TRELLIS_CLEAN]++;
      check(got[0][1] != gold_sig[0][1], "plain signature sees the failure");
      // 4. single inverted cell, row and column signatures
      f_row_en = 0; f_col_en = 0; f_cell_en = 1; f_cell_r = 50 % R; f_cell_c = 9 % C;
      run_test(0, 1, 2'b10, 2'b01, 2, 3);
      diagnose(0, 1, suspects);
      check(suspects.size() == 1 && suspects[0] == f_cell_r, $sformatf("cell row suspects %p", suspects));
      diagnose(1, 1, suspects);
      check(suspects.size() == 1 && suspects[0] == f_cell_c, $sformatf("cell column suspects %p", suspects));
    end
    for (int m = 0; m < MECH_COUNT; m++) begin
      $display("mechanism %s: %0d", mech_e'(m), mech[m]);
      if (!FULL || m inside {MECH_ROW_MODE, MECH_COL_MODE, MECH_UNLOAD, MECH_ROW_DIAG, MECH_COL_DIAG})
        check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
    end
    finish_bench();
  end

  initial begin
    repeat (FULL ? 3000000 : 200000) @(posedge clk);
    failures++;
    $display("bench N=%0d: watchdog expired", N);
    finish_bench();
  end

  function automatic void finish_bench();
    if (finished) return;
    finished = 1;
    if (SOLO) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endfunction
endmodule
