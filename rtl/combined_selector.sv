// combined_selector: row selector and column selector sharing one pair of
// partition and group registers, so that row and column signatures (or
// trellis signatures, at the intersections) can be collected in the same
// sweep of the address space.
//
// Neither selector needs a clock faster than the one that steps its own
// address, so the memory is read at speed in either fast-column or
// fast-row order.  Using the same group number for both diffractors
// couples every row with a fixed column in trellis mode; an n-bit +1
// incrementer between the group register and the column diffractor
// (enabled by col_group_plus1) breaks that coupling.
//
// Interface and timing: all outputs are combinational from the current
// addresses and the selectors' registers; see row_selector and
// column_selector for the step inputs.
module combined_selector #(
  parameter int unsigned N  = 5,
  parameter int unsigned WB = 4,
  localparam int unsigned M = 1 << WB,
  localparam int unsigned B = ((1 << N) / M) << N
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*N-1:0] row_addr,
  input  logic [WB-1:0]  word_addr,
  input  logic           row_step,
  input  logic           word_step,
  input  logic [N-1:0]   partition,
  input  logic [N-1:0]   group,
  input  logic           col_group_plus1,
  output logic           observe_row,
  output logic [B-1:0]   col_mask
);

  logic [N-1:0] col_group;

  assign col_group = col_group_plus1 ? group + 1'b1 : group;

  row_selector #(.N(N)) u_row (
    .clk         (clk),
    .rst_n       (rst_n),
    .row_addr    (row_addr),
    .row_step    (row_step),
    .partition   (partition),
    .group       (group),
    .observe_row (observe_row)
  );

  column_selector #(.N(N), .WB(WB)) u_col (
    .clk       (clk),
    .rst_n     (rst_n),
    .word_addr (word_addr),
    .word_step (word_step),
    .partition (partition),
    .group     (col_group),
    .col_mask  (col_mask)
  );

endmodule
