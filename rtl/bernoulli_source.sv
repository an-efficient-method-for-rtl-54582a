// bernoulli_source: Bernoulli (geometric inter-arrival) emit source.
//
// A emit is emitted in a slot when the uniform random word `w` is less than or
// equal to the threshold `theta`. With theta = rho * (2^16 - 1) the source
// emits with probability (theta + 1) / 2^16, about rho cells per slot; for
// example theta = 52429 gives rho ~ 0.8. This comparison is the reference
// emulator's generator.
//
// Interface and timing: purely combinational. The consumer samples `emit` at
// the clock edge that ends the slot, together with the word that produced it.
module bernoulli_source #(
  parameter int unsigned W = emu_pkg::RW
) (
  input  logic [W-1:0] w,
  input  logic [W-1:0] theta,
  output logic         emit
);

  assign emit = (w <= theta);

endmodule
