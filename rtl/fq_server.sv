// fq_server: slot sequencer, minimum-mark search and virtual time of the
// Smallest-virtual-Finishing-time-First (SFF) server.
//
// One emulated slot lasts SLOT_CYCLES clocks (3 by default); `phase` counts
// them while `run` is high, and `slot_end` marks the last clock of each slot,
// at whose edge the whole emulator commits the slot. The search for the cell
// to serve takes log2(N) + 1 clocks:
//   phase 0      the candidates {non-empty, mark, tie rank, index} of all
//                streams are registered (snapshot of the state at slot start);
//   phase 1..L-1 one level of a binary tree of two-input minimum cells is
//                computed and registered per clock (L = log2 N);
//   phase L      the last level is combinational and gives the winner, which
//                is committed at the edge that ends the slot.
// With N = 4 that is 3 clocks, one slot. A minimum cell keeps the valid
// candidate, then the smaller mark, and on equal marks the smaller tie rank.
// The tie rank of stream i is (i - last - 1) mod N, where `last` is the stream
// served most recently, so ties are broken round robin.
//
// The virtual time `vtime` is the mark of the last served cell; `vtime_next`
// is its value after this slot (the winner's mark when a cell is served).
//
// The slot length, the search latency, the minimum operator, the virtual time
// definition and round-robin tie breaking follow the reference design; the
// phase assignment and the rank encoding are this design's.
//
// Interface: `nonempty` and `mark` must be stable from the start of a slot
// (they change only at `slot_end` edges). `serve_valid`, `serve_idx`,
// `serve_onehot` and `vtime_next` are meaningful while `slot_end` is high.
module fq_server
  import emu_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned SLOT_CYCLES = FQ_SLOT_CYCLES,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned L  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NP = 1 << L,
  localparam int unsigned PW = (SLOT_CYCLES > 1) ? $clog2(SLOT_CYCLES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      run,
  input  logic [N-1:0]              nonempty,
  input  logic [N-1:0][MARK_W-1:0]  mark,
  output logic [PW-1:0]             phase,
  output logic                      slot_end,
  output logic                      serve_valid,
  output logic [IW-1:0]             serve_idx,
  output logic [N-1:0]              serve_onehot,
  output logic [MARK_W-1:0]         vtime,
  output logic [MARK_W-1:0]         vtime_next,
  output logic [IW-1:0]             last
);

  typedef struct packed {
    logic              valid;
    logic [MARK_W-1:0] mark;
    logic [IW-1:0]     rank;
    logic [IW-1:0]     idx;
  } cand_t;

  function automatic cand_t pick(input cand_t a, input cand_t b);
    if (!a.valid)                   return b;
    if (!b.valid)                   return a;
    if (mark_before(a.mark, b.mark)) return a;
    if (mark_before(b.mark, a.mark)) return b;
    return (a.rank <= b.rank) ? a : b;
  endfunction

  // Slot sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   phase <= '0;
    else if (run) phase <= (32'(phase) == SLOT_CYCLES - 1) ? '0 : phase + 1'b1;
  end
  assign slot_end = run && (32'(phase) == SLOT_CYCLES - 1);

  // Candidates at the start of the slot.
  cand_t cand [NP];
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      cand[i] = '0;
      if (i < N) begin
        cand[i].valid = nonempty[i];
        cand[i].mark  = mark[i];
        cand[i].rank  = IW'((i + 2 * N - 1 - 32'(last)) % N);
        cand[i].idx   = IW'(i);
      end
    end
  end

  // Tree of minimum cells: stage[0] is the registered snapshot, stage[k]
  // the registered output of level k; the last level is combinational.
  cand_t stage [L][NP];
  cand_t winner;

  always_ff @(posedge clk) begin
    if (run) begin
      if (phase == '0) begin
        for (int i = 0; i < NP; i++) stage[0][i] <= cand[i];
      end
      for (int k = 1; k < L; k++) begin
        if (32'(phase) == k) begin
          for (int j = 0; j < (NP >> k); j++)
            stage[k][j] <= pick(stage[k-1][2*j], stage[k-1][2*j+1]);
        end
      end
    end
  end

  assign winner = pick(stage[L-1][0], stage[L-1][1]);

  always_comb begin
    serve_valid  = slot_end && winner.valid;
    serve_idx    = winner.idx;
    serve_onehot = '0;
    if (serve_valid) serve_onehot[winner.idx] = 1'b1;
    vtime_next   = serve_valid ? winner.mark : vtime;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vtime <= '0;
      last  <= IW'(N - 1);
    end else if (slot_end) begin
      vtime <= vtime_next;
      if (serve_valid) last <= winner.idx;
    end
  end

  // The search needs log2(N) + 1 clocks; the slot must be at least that long.
  if (SLOT_CYCLES < L + 1) begin : g_bad_slot
    $error("fq_server: SLOT_CYCLES must be at least log2(N) + 1");
  end

endmodule
