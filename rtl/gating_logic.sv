// gating_logic: AND gates between the memory outputs and the signature
// register.  A bit of the word read reaches the compactor only if the row
// is observed (or row_disable gates the row selector off) and its column is
// observed (or col_disable gates the column selector off):
//   row_disable=0, col_disable=1 : whole words of the selected rows
//   row_disable=1, col_disable=0 : the selected bit lines of every word
//   row_disable=0, col_disable=0 : cells where selected rows and columns meet
//   row_disable=1, col_disable=1 : every cell (plain signature)
// Blocked bits are forced to 0.  Purely combinational.
module gating_logic #(
  parameter int unsigned B = 64
) (
  input  logic [B-1:0] data,
  input  logic         observe_row,
  input  logic [B-1:0] col_mask,
  input  logic         row_disable,
  input  logic         col_disable,
  output logic [B-1:0] gated
);

  logic         row_pass;
  logic [B-1:0] col_pass;

  assign row_pass = row_disable | observe_row;
  assign col_pass = col_mask | {B{col_disable}};
  assign gated    = data & col_pass & {B{row_pass}};

endmodule
