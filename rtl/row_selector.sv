// row_selector: decides, row by row, whether the row now being read belongs
// to the partition under test.
//
// The 2n-bit row address is split into a block number k (upper n bits) and
// a row-in-block index (lower n bits); a block holds S = 2^n rows.  Partition
// p of group g contains, in block k, row
//     r = S*k + (p XOR d_k),   d_0 = 0,  d_k = g * alpha^(k-1) for k >= 1,
// so every partition holds exactly one row of every block.
// The circuit is the one of the selection scheme: at the first row of each
// block (lower bits zero, gate N1) a down counter "offset" is loaded with p
// XOR the gated diffractor state; it is decremented on every row step and
// the row at which it shows zero (gate N2) is observed.  The AND gates force
// the diffractor contribution to zero in block 0.  The diffractor is loaded
// with g in block 0 and advanced once per block from block 1 on, so in
// block k it holds the state reached after k-1 steps.
//
// Interface and timing: row_addr is the row currently read; row_step is high
// in a cycle after which the row address changes (every cycle in fast-row
// addressing, once per M words in fast-column addressing).  observe_row is
// combinational from row_addr and the registers.  partition and group must
// be stable during a run.
module row_selector #(
  parameter int unsigned N = 5
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*N-1:0] row_addr,
  input  logic           row_step,
  input  logic [N-1:0]   partition,
  input  logic [N-1:0]   group,
  output logic           observe_row
);

  logic         n1;          // lower n row-address bits are zero
  logic         block_nz;    // block number k != 0 (enables the AND gates)
  logic [N-1:0] diff_state;
  logic [N-1:0] gated;
  logic [N-1:0] offset_load;
  logic [N-1:0] offset_cur;
  logic [N-1:0] offset_q;

  assign n1       = (row_addr[N-1:0] == '0);
  assign block_nz = (row_addr[2*N-1:N] != '0);

  diffractor #(.N(N)) u_diff (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (n1 && !block_nz),
    .load_val (group),
    .step     (row_step && n1 && block_nz),
    .state_o  (diff_state)
  );

  assign gated       = block_nz ? diff_state : '0;
  assign offset_load = partition ^ gated;
  assign offset_cur  = n1 ? offset_load : offset_q;
  assign observe_row = (offset_cur == '0);   // gate N2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        offset_q <= '0;
    else if (row_step) offset_q <= offset_cur - 1'b1;
  end

endmodule
