// phase_shifter_tb: a phase shifter must give the state SHIFT steps further
// along the diffractor trajectory.  Checks the 3-bit example (x^3+x+1,
// diffractor at 1, shifters by 2, 4 and 6 steps give 4, 6 and 5) and the
// default 5-bit shifter for every input against g * alpha^SHIFT.
module phase_shifter_tb;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [2:0] d3, o3a, o3b, o3c;
  logic [4:0] d5, o5;

  phase_shifter #(.N(3), .SHIFT(2)) ps_a (.d_i(d3), .d_o(o3a));
  phase_shifter #(.N(3), .SHIFT(4)) ps_b (.d_i(d3), .d_o(o3b));
  phase_shifter #(.N(3), .SHIFT(6)) ps_c (.d_i(d3), .d_o(o3c));
  phase_shifter dut (.d_i(d5), .d_o(o5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d3 = 3'd1; d5 = '0;
    #1;
    check(o3a == 3'd4, "PS1 from 1");
    check(o3b == 3'd6, "PS2 from 1");
    check(o3c == 3'd5, "PS3 from 1");
    for (int v = 0; v < 8; v++) begin
      d3 = 3'(v);
      #1;
      check(o3a == 3'(gf_scale(v, 2, 3)), "n=3 shift 2");
      check(o3b == 3'(gf_scale(v, 4, 3)), "n=3 shift 4");
      check(o3c == 3'(gf_scale(v, 6, 3)), "n=3 shift 6");
    end
    for (int v = 0; v < 32; v++) begin
      d5 = 5'(v);
      #1;
      check(o5 == 5'(gf_scale(v, 16, 5)), $sformatf("n=5 v=%0d got %0d", v, o5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
