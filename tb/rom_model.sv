// rom_model: behavioural model of the embedded ROM under test, with fault
// injection.  R = 2^(2n) rows of M = 2^WB words of B bits; bit b of word w
// lies in physical column b*M + w (interleaved words).  Reads are
// synchronous: data for the address presented with en appears after the
// next clock edge.  Contents are the pseudo-random fill of
// tb_ref_pkg::rom_chunk.  Faults (any combination): every cell of row
// fault_row stuck at fault_val, every cell of column fault_col stuck at
// fault_val, and the single cell (cell_row, cell_col) inverted.
module rom_model
  import tb_ref_pkg::*;
#(
  parameter int unsigned N  = 5,
  parameter int unsigned WB = 4,
  localparam int unsigned M  = 1 << WB,
  localparam int unsigned B  = ((1 << N) / M) << N,
  localparam int unsigned AW = 2 * N + WB
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [B-1:0]  data,
  input  logic          fault_row_en,
  input  int unsigned   fault_row,
  input  logic          fault_col_en,
  input  int unsigned   fault_col,
  input  logic          fault_cell_en,
  input  int unsigned   cell_row,
  input  int unsigned   cell_col,
  input  logic          fault_val
);

  always_ff @(posedge clk) begin
    if (en) begin
      logic [255:0] fill;
      logic [B-1:0] word;
      int unsigned  r, w;
      r = addr >> WB;
      w = addr % M;
      for (int unsigned ch = 0; ch < 8; ch++) fill[ch*32 +: 32] = rom_chunk(addr, ch);
      word = fill[B-1:0];
      if (fault_row_en && r == fault_row) word = {B{fault_val}};
      if (fault_col_en && w == fault_col % M) word[fault_col / M] = fault_val;
      if (fault_cell_en && r == cell_row && w == cell_col % M)
        word[cell_col / M] = ~word[cell_col / M];
      data <= word;
    end
  end

  initial data = '0;

endmodule
