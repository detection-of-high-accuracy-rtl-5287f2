// diffractor: n-bit LFSR that steps through successive powers of the
// generator alpha of GF(2^n), multiplied by the value it was loaded with.
//
// The selectors use it to scramble which row (or column) of each block
// belongs to a partition.  The register is a Galois LFSR with a primitive
// characteristic polynomial (rom_diag_pkg::diff_poly), as the selection
// scheme requires.  An all-zero load keeps it at zero, which is a valid,
// unscrambled partitioning.
//
// Interface and timing:
//   load      - state_o shows load_val in this same cycle (load-through), and
//               the register takes load_val at the clock edge;
//   step      - the register takes alpha * state_o at the clock edge
//               (step has priority over a plain load; with both set the
//               loaded value is advanced once);
//   state_o   - load ? load_val : register.
// The load-through output is this design's own choice: it lets the
// selectors load the group number at address zero without a spare cycle.
module diffractor
  import rom_diag_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [N-1:0] load_val,
  input  logic         step,
  output logic [N-1:0] state_o
);

  logic [N-1:0] state_q;
  logic [N-1:0] advanced;

  assign state_o  = load ? load_val : state_q;
  assign advanced = N'(gf_mul_alpha(16'(state_o), N));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= '0;
    else if (step) state_q <= advanced;
    else if (load) state_q <= load_val;
  end

  initial assert (N >= 2 && N <= 10) else $error("diffractor: N out of range");

endmodule
