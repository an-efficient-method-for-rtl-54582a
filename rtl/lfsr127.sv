// lfsr127: feedback shift register on the trinomial 1 + X + X^127.
//
// The register holds 127 consecutive terms a[n] .. a[n+126] of the linear
// recurrence a[k+127] = a[k+1] xor a[k], which is the one defined by the
// primitive polynomial 1 + X + X^127. Every clock with `en` high the register
// shifts by one term and `bit_o` (= a[n], the oldest term) is one fresh
// pseudo-random bit; the period is 2^127 - 1 clocks.
//
// Interface: `load` copies `seed` into the register (takes priority over `en`).
// An all-zero seed would lock the register at zero, so bit 0 is forced to one in
// that case (a choice of this design). `bit_o` is a register output, valid one
// clock after load.
//
// The polynomial and the one-bit-per-clock behaviour follow the reference
// emulator; the seeding scheme is this design's own.
module lfsr127 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [126:0] seed,
  input  logic         en,
  output logic         bit_o
);

  logic [126:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= 127'd1;
    end else if (load) begin
      s <= (seed == '0) ? 127'd1 : seed;
    end else if (en) begin
      s <= {s[1] ^ s[0], s[126:1]};
    end
  end

  assign bit_o = s[0];

endmodule
