// column_selector_tb: compares the column selector with the column
// partitioning rule.
//   - n = 2, M = 2, B = 8: the 16 lines of the worked column partitioning
//     table (partition, group 1 and 2, both word addresses) must produce
//     exactly the listed decoder values and observed physical columns
//     (column = bit * M + word).
//   - n = 3, M = 2 (four decoders, three phase shifters): every partition
//     and group against the rule, and every column observed exactly once
//     per group.
//   - n = 5, M = 16, B = 64 (default): several groups, all partitions.
module column_selector_tb;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [0:0] wa2; logic ws2; logic [1:0] p2, g2; logic [7:0]  m2;
  logic [0:0] wa3; logic ws3; logic [2:0] p3, g3; logic [31:0] m3;
  logic [3:0] wa5; logic ws5; logic [4:0] p5, g5; logic [63:0] m5;

  column_selector #(.N(2), .WB(1)) dut2 (.clk, .rst_n, .word_addr(wa2), .word_step(ws2),
                                         .partition(p2), .group(g2), .col_mask(m2));
  column_selector #(.N(3), .WB(1)) dut3 (.clk, .rst_n, .word_addr(wa3), .word_step(ws3),
                                         .partition(p3), .group(g3), .col_mask(m3));
  column_selector dut5 (.clk, .rst_n, .word_addr(wa5), .word_step(ws5),
                        .partition(p5), .group(g5), .col_mask(m5));

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

  // Worked table: {partition, group, observed column a, observed column b}
  // in order of word address 0, 1 for each partition.
  int table_cols[16][2] = '{
    '{0, 14}, '{5, 11}, '{2, 12}, '{7, 9}, '{4, 10}, '{1, 15}, '{6, 8}, '{3, 13},
    '{0, 10}, '{7, 13}, '{2, 8}, '{5, 15}, '{4, 14}, '{3, 9}, '{6, 12}, '{1, 11}};

  initial begin
    int line;
    int seen[];
    {wa2, ws2, p2, g2, wa3, ws3, p3, g3, wa5, ws5, p5, g5} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- worked table, n = 2
    line = 0;
    for (int g = 1; g <= 2; g++)
      for (int p = 0; p < 4; p++)
        for (int w = 0; w < 2; w++) begin
          automatic int cols[$];
          p2 = 2'(p); g2 = 2'(g); wa2 = 1'(w); ws2 = 1;
          #1;
          for (int b = 0; b < 8; b++) if (m2[b]) cols.push_back(b * 2 + w);
          check(cols.size() == 2 && cols[0] == table_cols[line][0] && cols[1] == table_cols[line][1],
                $sformatf("table line %0d: got %p", line, cols));
          line++;
          @(negedge clk);
        end
    // ---- n = 3, four decoders
    for (int g = 0; g < 8; g++) begin
      seen = new[64];
      for (int p = 0; p < 8; p++)
        for (int w = 0; w < 2; w++) begin
          p3 = 3'(p); g3 = 3'(g); wa3 = 1'(w); ws3 = 1;
          #1;
          for (int b = 0; b < 32; b++) begin
            check(m3[b] == bit_in_partition(3, 1, w, b, p, g),
                  $sformatf("n=3 g=%0d p=%0d w=%0d b=%0d", g, p, w, b));
            if (m3[b]) seen[b * 2 + w]++;
          end
          @(negedge clk);
        end
      foreach (seen[c]) check(seen[c] == 1, $sformatf("n=3 g=%0d column %0d covered %0d times", g, c, seen[c]));
    end
    // ---- n = 5 default
    for (int gi = 0; gi < 4; gi++) begin
      automatic int g = (gi * 9 + 1) % 32;
      seen = new[1024];
      for (int p = 0; p < 32; p++)
        for (int w = 0; w < 16; w++) begin
          p5 = 5'(p); g5 = 5'(g); wa5 = 4'(w); ws5 = 1;
          #1;
          for (int b = 0; b < 64; b++) begin
            check(m5[b] == bit_in_partition(5, 4, w, b, p, g),
                  $sformatf("n=5 g=%0d p=%0d w=%0d b=%0d", g, p, w, b));
            if (m5[b]) seen[b * 16 + w]++;
          end
          @(negedge clk);
        end
      foreach (seen[c]) check(seen[c] == 1, $sformatf("n=5 g=%0d column %0d covered %0d times", g, c, seen[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
