// column_decoder: "1 out of 2^n" decoder.  It turns the n-bit column value
// produced by the column selector into a one-hot mask over the 2^n bits of
// one slice of the memory word.  When enable is low all outputs are low.
// Purely combinational.  The decoder itself is part of the published
// column selector; the enable input is an addition of this design.
module column_decoder #(
  parameter int unsigned N = 5
) (
  input  logic              enable,
  input  logic [N-1:0]      sel,
  output logic [(1<<N)-1:0] onehot
);

  always_comb begin
    onehot = '0;
    if (enable) onehot[sel] = 1'b1;
  end

endmodule
