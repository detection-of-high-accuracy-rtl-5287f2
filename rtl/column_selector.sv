// column_selector: picks which bit lines of the word now being read are
// observed for the current partition and group.
//
// A memory row holds M = 2^WB words of B bits, with the bits of a word
// interleaved along the row (bit b of word w sits in column b*M + w).  The
// M*B = 2^(2n) columns are partitioned like the rows: a partition holds 2^n
// columns, so tau = 2^n / M bits of each word are observed at once.  The
// word is cut into tau slices of 2^n bits, each with its own "1 out of 2^n"
// decoder.  The diffractor is loaded with the group number at word address
// 0 and advances every time the word address increments; decoder j is fed
// through a phase shifter that moves the diffractor state j*M steps along
// its trajectory, so over one sweep of the M words the decoders together
// see every state of the trajectory once.  Decoder 0 at word 0 gets the
// all-zero state from AND gates instead, which supplies the one value a
// diffractor never produces.  Each decoder input is the partition number
// XOR that state.  For n = 2, M = 2 this reproduces the column
// partitioning table of the scheme exactly.
//
// Interface and timing: word_addr is the word currently read; word_step is
// high in a cycle after which the word address changes.  col_mask (B bits)
// is combinational, one bit set per slice.
module column_selector #(
  parameter int unsigned N  = 5,
  parameter int unsigned WB = 4,
  localparam int unsigned M   = 1 << WB,
  localparam int unsigned TAU = (1 << N) / M,
  localparam int unsigned B   = TAU << N
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [WB-1:0] word_addr,
  input  logic          word_step,
  input  logic [N-1:0]  partition,
  input  logic [N-1:0]  group,
  output logic [B-1:0]  col_mask
);

  logic                     word_zero;
  logic [N-1:0]             diff_state;
  logic [TAU-1:0][N-1:0]    shifted;
  logic [TAU-1:0][N-1:0]    dec_sel;

  assign word_zero = (word_addr == '0);

  diffractor #(.N(N)) u_diff (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (word_zero),
    .load_val (group),
    .step     (word_step),
    .state_o  (diff_state)
  );

  for (genvar j = 0; j < TAU; j++) begin : g_slice
    if (j == 0) begin : g_direct
      // AND gates: all-zero state at the first word of the row.
      assign shifted[j] = word_zero ? '0 : diff_state;
    end else begin : g_ps
      phase_shifter #(.N(N), .SHIFT(j * M)) u_ps (
        .d_i (diff_state),
        .d_o (shifted[j])
      );
    end
    assign dec_sel[j] = partition ^ shifted[j];
    column_decoder #(.N(N)) u_dec (
      .enable (1'b1),
      .sel    (dec_sel[j]),
      .onehot (col_mask[j*(1<<N) +: (1<<N)])
    );
  end

  initial assert (WB >= 1 && WB <= N)
    else $error("column_selector: need 2 <= M <= 2^N");

endmodule
