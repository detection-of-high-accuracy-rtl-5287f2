// column_decoder_tb: exhaustive check of the 1-out-of-32 decoder, enabled
// and disabled.
module column_decoder_tb;
  int checks = 0, failures = 0;

  logic        en;
  logic [4:0]  sel;
  logic [31:0] oh;

  column_decoder dut (.enable(en), .sel(sel), .onehot(oh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 32; s++) begin
        en = e[0]; sel = 5'(s);
        #1;
        checks++;
        if (oh !== (e ? (32'h1 << s) : 32'h0)) begin
          failures++;
          $display("FAIL: en=%0d sel=%0d out=%h", e, s, oh);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
