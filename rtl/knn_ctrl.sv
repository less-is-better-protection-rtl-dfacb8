// knn_ctrl - sequencer of one classification.
//
// A classification reads every stored element, feature by feature, in address
// order: element e, feature j at address e*F + j. One word is read per clock.
// The controller issues the reads, then delays the per-word control (feature
// index, first/last feature of an element, element index) by one clock so it
// lines up with the memory's read data at the distance unit. After the last
// read it waits for the pipeline to drain (distance unit, then neighbour
// list), starts the vote, and signals done when the vote is out.
//
// Interface: `start` (one cycle, accepted only when idle) begins a query;
// sel_clear pulses with it to empty the neighbour list. mem_re/mem_raddr
// drive the feature memory; d_valid, d_first, d_last, d_fidx and d_tag are
// aligned with the read data. vote_start pulses once, and done pulses when
// vote_done comes back. Timing: E*F clocks of reads, then 3 clocks of drain
// and vote; `done` is high E*F + 5 clocks after the cycle in which start was
// high. The schedule (one feature per clock, no overlap of queries) is this
// implementation's; the order of work is the kNN algorithm's.
module knn_ctrl #(
  parameter int unsigned E  = 150,
  parameter int unsigned F  = 4,
  parameter int unsigned TW = 16,
  parameter int unsigned AW = (E * F > 1) ? $clog2(E * F) : 1,
  parameter int unsigned FW = (F > 1) ? $clog2(F) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          vote_done,
  output logic          busy,
  output logic          done,
  output logic          sel_clear,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  output logic          d_valid,
  output logic          d_first,
  output logic          d_last,
  output logic [FW-1:0] d_fidx,
  output logic [TW-1:0] d_tag,
  output logic          vote_start
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_VOTE, S_WAIT} state_t;

  state_t        state_q;
  logic [AW-1:0] addr_q;
  logic [FW-1:0] fidx_q;
  logic [TW-1:0] elem_q;
  logic [1:0]    drain_q;

  logic last_word;
  assign last_word = (elem_q == TW'(E - 1)) && (fidx_q == FW'(F - 1));

  assign busy       = (state_q != S_IDLE);
  assign sel_clear  = (state_q == S_IDLE) && start;
  assign mem_re     = (state_q == S_RUN);
  assign mem_raddr  = addr_q;
  assign vote_start = (state_q == S_VOTE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      fidx_q  <= '0;
      elem_q  <= '0;
      drain_q <= '0;
      done    <= 1'b0;
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_fidx  <= '0;
      d_tag   <= '0;
    end else begin
      done    <= 1'b0;
      // Read-side control, one clock behind the read request.
      d_valid <= (state_q == S_RUN);
      d_first <= (fidx_q == '0);
      d_last  <= (fidx_q == FW'(F - 1));
      d_fidx  <= fidx_q;
      d_tag   <= elem_q;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            state_q <= S_RUN;
            addr_q  <= '0;
            fidx_q  <= '0;
            elem_q  <= '0;
          end
        end
        S_RUN: begin
          addr_q <= addr_q + AW'(1);
          if (fidx_q == FW'(F - 1)) begin
            fidx_q <= '0;
            elem_q <= elem_q + TW'(1);
          end else begin
            fidx_q <= fidx_q + FW'(1);
          end
          if (last_word) begin
            state_q <= S_DRAIN;
            drain_q <= 2'd1;
          end
        end
        S_DRAIN: begin
          // Last word's data at the distance unit, then its distance at the
          // neighbour list; the list holds the final set one clock later.
          if (drain_q == '0) state_q <= S_VOTE;
          else drain_q <= drain_q - 2'd1;
        end
        S_VOTE: state_q <= S_WAIT;
        S_WAIT: begin
          if (vote_done) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
