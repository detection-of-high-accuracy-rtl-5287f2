// rom_diag_top: BIST-based diagnosis logic for an embedded ROM of
// R = 2^(2n) rows, each holding M = 2^WB words of B = 2^(2n)/M bits.
//
// The BIST controller reads the whole ROM at speed, once per run, while the
// combined row/column selector decides which of the cells read are passed
// by the gating logic to a signature register.  There are two gating and
// signature channels, each with its own row_disable/col_disable pair, so a
// row signature and a column signature (or any two modes) are collected in
// the same sweep.  Every run gets a fresh signature per channel; at the end
// of the run both are presented with the run's partition and group number
// for the tester to unload.  From which signatures are wrong, an off-chip
// algorithm locates failing rows, columns and cells.
//
// Interface and timing:
//   start        - begins a test (sampled while not busy); fast_row,
//                  col_group_plus1, row_disable, col_disable, group_first
//                  and group_count are sampled with it.
//   rom_addr     - {row, word} read in this cycle (rom_en high); the ROM is
//                  a synchronous read memory whose rom_data comes back one
//                  clock later.  Selector decisions are delayed one stage to
//                  meet the data.
//   sig_valid    - one-cycle pulse two cycles after the last read of a run;
//                  signature[c], sig_partition and sig_group are valid then.
//   done         - pulses with the signature of the last run.
// The two channels, the parallel unload port and the one-cycle ROM latency
// are this design's choices; the selectors, gating and the run structure
// follow the scheme.
module rom_diag_top #(
  parameter int unsigned N     = 5,
  parameter int unsigned WB    = 4,
  parameter int unsigned SIG_W = 32,
  localparam int unsigned M    = 1 << WB,
  localparam int unsigned B    = ((1 << N) / M) << N,
  localparam int unsigned AW   = 2 * N + WB
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      fast_row,
  input  logic                      col_group_plus1,
  input  logic [1:0]                row_disable,
  input  logic [1:0]                col_disable,
  input  logic [N-1:0]              group_first,
  input  logic [N:0]                group_count,
  output logic                      rom_en,
  output logic [AW-1:0]             rom_addr,
  input  logic [B-1:0]              rom_data,
  output logic                      sig_valid,
  output logic [N-1:0]              sig_partition,
  output logic [N-1:0]              sig_group,
  output logic [1:0][SIG_W-1:0]     signature,
  output logic                      busy,
  output logic                      done
);

  // ---------------------------------------------------------------- control
  logic [2*N-1:0] row_addr;
  logic [WB-1:0]  word_addr;
  logic [N-1:0]   partition, group;
  logic           addr_valid, row_step, word_step, run_first, run_last;
  logic           ctrl_busy, ctrl_done;

  logic           plus1_q;
  logic [1:0]     row_dis_q, col_dis_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plus1_q   <= 1'b0;
      row_dis_q <= '0;
      col_dis_q <= '0;
    end else if (start && !ctrl_busy) begin
      plus1_q   <= col_group_plus1;
      row_dis_q <= row_disable;
      col_dis_q <= col_disable;
    end
  end

  bist_controller #(.N(N), .WB(WB)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .fast_row    (fast_row),
    .group_first (group_first),
    .group_count (group_count),
    .row_addr    (row_addr),
    .word_addr   (word_addr),
    .partition   (partition),
    .group       (group),
    .addr_valid  (addr_valid),
    .row_step    (row_step),
    .word_step   (word_step),
    .run_first   (run_first),
    .run_last    (run_last),
    .busy        (ctrl_busy),
    .done        (ctrl_done)
  );

  assign rom_en   = addr_valid;
  assign rom_addr = {row_addr, word_addr};

  // -------------------------------------------------------------- selection
  logic         observe_row;
  logic [B-1:0] col_mask;

  combined_selector #(.N(N), .WB(WB)) u_sel (
    .clk             (clk),
    .rst_n           (rst_n),
    .row_addr        (row_addr),
    .word_addr       (word_addr),
    .row_step        (row_step),
    .word_step       (word_step),
    .partition       (partition),
    .group           (group),
    .col_group_plus1 (plus1_q),
    .observe_row     (observe_row),
    .col_mask        (col_mask)
  );

  // Align selector decisions with the ROM's one-cycle read latency.
  typedef struct packed {
    logic         valid;
    logic         first;
    logic         last;
    logic         observe_row;
    logic [B-1:0] col_mask;
    logic [N-1:0] partition;
    logic [N-1:0] group;
  } stage_t;

  stage_t s1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_q <= '0;
    else begin
      s1_q.valid       <= addr_valid;
      s1_q.first       <= run_first;
      s1_q.last        <= run_last;
      s1_q.observe_row <= observe_row;
      s1_q.col_mask    <= col_mask;
      s1_q.partition   <= partition;
      s1_q.group       <= group;
    end
  end

  // ----------------------------------------------- gating and compaction
  for (genvar c = 0; c < 2; c++) begin : g_chan
    logic [B-1:0] gated;

    gating_logic #(.B(B)) u_gate (
      .data        (rom_data),
      .observe_row (s1_q.observe_row),
      .col_mask    (s1_q.col_mask),
      .row_disable (row_dis_q[c]),
      .col_disable (col_dis_q[c]),
      .gated       (gated)
    );

    mirg #(.IN_W(B), .L(SIG_W)) u_sig (
      .clk       (clk),
      .rst_n     (rst_n),
      .valid     (s1_q.valid),
      .clear     (s1_q.first),
      .in_data   (gated),
      .signature (signature[c])
    );
  end

  // ---------------------------------------------------------------- unload
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_valid     <= 1'b0;
      sig_partition <= '0;
      sig_group     <= '0;
      done          <= 1'b0;
    end else begin
      sig_valid <= s1_q.valid && s1_q.last;
      if (s1_q.valid && s1_q.last) begin
        sig_partition <= s1_q.partition;
        sig_group     <= s1_q.group;
      end
      done <= ctrl_done;
    end
  end

  assign busy = ctrl_busy || s1_q.valid || sig_valid;

  initial assert (SIG_W == 32)
    else $error("rom_diag_top: the signature polynomial is defined for 32 stages");

endmodule
