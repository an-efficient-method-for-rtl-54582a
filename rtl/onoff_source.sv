// onoff_source: On/Off modulated Bernoulli process.
//
// A one-bit state register (1 = On) is updated once per slot from a first
// random word: Off goes On when `w_state <= p_on`, On goes Off when
// `w_state <= p_off` (thresholds scaled like bernoulli_source: p * 65535).
// A second, independent word decides emission in the current state: in the On
// state a emit is emitted when `w_emit <= theta`; the Off state is silent.
// Two random words, a state register updated from one of them and an emission
// comparison on the other follow the reference emulator; the silent Off state
// and the threshold encoding are this design's choice.
//
// Interface and timing: `emit` is combinational from the present state and
// `w_emit`; the state advances at the clock edge where `slot` is high (the edge
// that ends the slot). `on` shows the present state. Reset puts the source Off.
module onoff_source #(
  parameter int unsigned W = emu_pkg::RW
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         slot,
  input  logic [W-1:0] w_state,
  input  logic [W-1:0] w_emit,
  input  logic [W-1:0] p_on,
  input  logic [W-1:0] p_off,
  input  logic [W-1:0] theta,
  output logic         emit,
  output logic         on
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on <= 1'b0;
    end else if (slot) begin
      if (on) on <= !(w_state <= p_off);
      else    on <= (w_state <= p_on);
    end
  end

  assign emit = on && (w_emit <= theta);

endmodule
