// mmbp_source: Markov modulated Bernoulli process with NS states.
//
// The discrete-time counterpart of a Markov modulated Poisson process. A state
// register holds the modulating chain's present state s. Once per slot the
// next state is drawn from the random word `w_state`: row s of `trans_thr`
// holds NS-1 non-decreasing cumulative thresholds, and the next state is the
// first j with w_state <= trans_thr[s][j], or NS-1 when there is none. A
// second word decides emission: a emit leaves in state s when `emit_en[s]` is
// set and w_emit <= emit_thr[s]. All thresholds are probabilities scaled by
// 2^16 - 1, as in bernoulli_source.
//
// Two random words, one for the transition and one for the emission, follow the
// reference emulator; the cumulative-threshold encoding, the per-state enable
// (which allows a truly silent state) and NS = 2 as default are this design's.
//
// Interface and timing: `emit` is combinational; `state` advances at the clock
// edge where `slot` is high. Reset puts the chain in state 0.
module mmbp_source #(
  parameter int unsigned W  = emu_pkg::RW,
  parameter int unsigned NS = 2,
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           slot,
  input  logic [W-1:0]                   w_state,
  input  logic [W-1:0]                   w_emit,
  input  logic [NS-1:0][NS-2:0][W-1:0]   trans_thr,
  input  logic [NS-1:0][W-1:0]           emit_thr,
  input  logic [NS-1:0]                  emit_en,
  output logic                           emit,
  output logic [SW-1:0]                  state
);

  logic [SW-1:0] next_state;

  always_comb begin
    next_state = SW'(NS - 1);
    for (int j = NS - 2; j >= 0; j--) begin
      if (w_state <= trans_thr[state][j]) next_state = SW'(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= '0;
    else if (slot) state <= next_state;
  end

  assign emit = emit_en[state] && (w_emit <= emit_thr[state]);

endmodule
