// phase_shifter: combinational XOR network that moves a diffractor state
// SHIFT steps further along the diffractor's trajectory.
//
// Because one diffractor step is multiplication by alpha in GF(2^n), the
// shifted state is the input multiplied by the constant alpha^SHIFT.  That
// is a linear map, so each output bit is the XOR of a fixed subset of input
// bits; the subsets are worked out at elaboration time from the diffractor
// polynomial.  With several phase shifters on one diffractor, decoder j is
// given the trajectory offset by j*M states, so the decoders together cover
// every state of a group's trajectory once per word sweep.
//
// Interface: d_i (n bits) in, d_o (n bits) out, no clock, no latency.
module phase_shifter
  import rom_diag_pkg::*;
#(
  parameter int unsigned N     = 5,
  parameter int unsigned SHIFT = 16
) (
  input  logic [N-1:0] d_i,
  output logic [N-1:0] d_o
);

  // Column c of the transform is alpha^SHIFT * (unit vector c).
  typedef logic [N-1:0] col_t;

  function automatic col_t basis_image(input int unsigned c);
    return col_t'(gf_mul_alpha_pow(16'(1) << c, SHIFT % ((1 << N) - 1), N));
  endfunction

  always_comb begin
    d_o = '0;
    for (int unsigned c = 0; c < N; c++)
      if (d_i[c]) d_o = d_o ^ basis_image(c);
  end

endmodule
