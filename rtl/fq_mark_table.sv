// fq_mark_table: virtual finishing times (marks) of the head cell of each queue.
//
// The Fair Queueing server serves the cell with the smallest virtual finishing
// time. Only the first cell of each queue takes part in that choice, so only
// one mark per stream is kept. Register mark[i] holds the mark of the head
// cell of queue i while the queue is not empty, and the mark of the last cell
// of stream i that got a mark while it is empty.
//
// At the clock edge that ends a slot (`commit`):
//   * stream i served and still backlogged: the next cell becomes head with
//       mark[i] + inc[i]            (it follows its predecessor by 1/phi_i)
//   * stream i not served, queue was empty and a cell arrives:
//       max(mark[i], v_new) + inc[i]  (it starts from the present virtual time)
//   * otherwise the mark is unchanged.
// v_new is the virtual time after this slot's service, i.e. the mark of the
// cell served in this slot if any. inc[i] is 1/phi_i expressed in the unit of
// the marks; with phi_i = 1/4 and one unit per cell time it is 4.
//
// Keeping only head-of-line marks, and the virtual time equal to the finishing
// time of the last served cell, follow the reference design; the two update
// rules are this design's reading of how the head mark is computed. Marks wrap
// modulo 2^MARK_W and are compared by emu_pkg::mark_before.
//
// Timing: marks are registers; reset sets them to zero.
module fq_mark_table
  import emu_pkg::*;
#(
  parameter int unsigned N     = 4,
  parameter int unsigned INC_W = 16,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        commit,
  input  logic [N-1:0]                nonempty,
  input  logic [N-1:0]                nonempty_next,
  input  logic                        serve_valid,
  input  logic [IW-1:0]               serve_idx,
  input  logic [MARK_W-1:0]           v_new,
  input  logic [N-1:0][INC_W-1:0]     inc,
  output logic [N-1:0][MARK_W-1:0]    mark
);

  for (genvar i = 0; i < N; i++) begin : g_mark
    logic served;
    logic [MARK_W-1:0] base;
    assign served = serve_valid && (serve_idx == IW'(i));
    assign base   = mark_before(mark[i], v_new) ? v_new : mark[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        mark[i] <= '0;
      end else if (commit) begin
        if (served && nonempty_next[i])
          mark[i] <= mark[i] + MARK_W'(inc[i]);
        else if (!served && !nonempty[i] && nonempty_next[i])
          mark[i] <= base + MARK_W'(inc[i]);
      end
    end
  end

endmodule
