// gating_logic_tb: random words, masks and row decisions in all four
// combinations of row_disable / col_disable, compared with the mode rules.
module gating_logic_tb;
  int checks = 0, failures = 0;

  logic [63:0] data, mask, gated, expv;
  logic        obs, rdis, cdis;

  gating_logic dut (.data, .observe_row(obs), .col_mask(mask),
                    .row_disable(rdis), .col_disable(cdis), .gated);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      data = {$urandom, $urandom};
      mask = 64'h1 << ($urandom % 64) | 64'h1 << ($urandom % 64);
      obs  = 1'($urandom);
      {rdis, cdis} = 2'(i % 4);
      #1;
      case ({rdis, cdis})
        2'b01:   expv = obs ? data : 64'h0;          // row mode
        2'b10:   expv = data & mask;                  // column mode
        2'b00:   expv = obs ? (data & mask) : 64'h0;  // trellis mode
        default: expv = data;                         // everything observed
      endcase
      checks++;
      if (gated !== expv) begin
        failures++;
        $display("FAIL: mode %b data %h mask %h obs %b got %h", {rdis, cdis}, data, mask, obs, gated);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
