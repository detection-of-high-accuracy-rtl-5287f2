// bist_controller: sweeps the whole ROM address space once per run, and
// runs again and again while it steps the partition and group counters.
//
// The address counter is {row, word} with the word address changing first
// (fast-column addressing) or, with fast_row set at start, {word, row} with
// the row address changing first.  The partition counter (n bits) extends
// the address counter: it advances after every complete sweep, and the
// group counter advances after all 2^n partitions.  The test starts at
// group group_first and covers group_count groups (modulo 2^n), i.e.
// group_count * 2^n runs of R*M reads each, one read per clock cycle with
// no gap between runs.
//
// Interface and timing: start is sampled in the idle state.  While busy,
// addr_valid is high in every cycle and row_addr/word_addr name the word
// read in that cycle.  row_step/word_step tell the selectors that the
// corresponding address changes at the next edge.  run_first and run_last
// mark the first and last read of a run.  done pulses for one cycle after
// the last read.  A group_count of zero ends the test at once.
// The sweep order, the partition and group counters extending the address
// counter, and the two address orders follow the published scheme; the
// start/done handshake, the choice of groups through group_first and
// group_count, and reading in ascending order only are this design's.
module bist_controller #(
  parameter int unsigned N  = 5,
  parameter int unsigned WB = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           fast_row,
  input  logic [N-1:0]   group_first,
  input  logic [N:0]     group_count,
  output logic [2*N-1:0] row_addr,
  output logic [WB-1:0]  word_addr,
  output logic [N-1:0]   partition,
  output logic [N-1:0]   group,
  output logic           addr_valid,
  output logic           row_step,
  output logic           word_step,
  output logic           run_first,
  output logic           run_last,
  output logic           busy,
  output logic           done
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_e;

  state_e       state_q;
  logic         fast_row_q;
  logic [N:0]   groups_left_q;
  logic         row_last, word_last, part_last;

  assign row_last   = (row_addr == '1);
  assign word_last  = (word_addr == '1);
  assign part_last  = (partition == '1);
  assign addr_valid = (state_q == S_RUN);
  assign busy       = addr_valid;
  assign row_step   = addr_valid && (fast_row_q || word_last);
  assign word_step  = addr_valid && (!fast_row_q || row_last);
  assign run_first  = addr_valid && row_addr == '0 && word_addr == '0;
  assign run_last   = addr_valid && row_last && word_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      fast_row_q    <= 1'b0;
      groups_left_q <= '0;
      row_addr      <= '0;
      word_addr     <= '0;
      partition     <= '0;
      group         <= '0;
      done          <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          fast_row_q    <= fast_row;
          groups_left_q <= group_count;
          row_addr      <= '0;
          word_addr     <= '0;
          partition     <= '0;
          group         <= group_first;
          if (group_count == '0) done    <= 1'b1;
          else                   state_q <= S_RUN;
        end
        S_RUN: begin
          if (row_step)  row_addr  <= row_addr + 1'b1;
          if (word_step) word_addr <= word_addr + 1'b1;
          if (run_last) begin
            partition <= partition + 1'b1;
            if (part_last) begin
              group         <= group + 1'b1;
              groups_left_q <= groups_left_q - 1'b1;
              if (groups_left_q == 1) begin
                state_q <= S_IDLE;
                done    <= 1'b1;
              end
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
