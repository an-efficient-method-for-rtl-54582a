// random_word: uniform pseudo-random word from W parallel lfsr127 registers.
//
// W feedback shift registers (W = 16 in the reference emulator), each on the
// polynomial 1 + X + X^127, run side by side; their output bits, taken together,
// form a new word `w` in 0 .. 2^W-1 every clock. `w` is read as a sample of a
// uniform random variable and is compared with thresholds by the traffic
// sources.
//
// Seeding (this design's own choice): register k is loaded with the 32-bit
// `seed` repeated over 127 bits, XORed with a 127-bit constant that is
// different for every register and every STREAM. The constants are computed
// at elaboration (no hardware) with the splitmix64 generator: starting from
// x = (k + 1 + 16 * STREAM) * 2^32, each 64-bit chunk is
//   x += 0x9E3779B97F4A7C15; z = x;
//   z = (z ^ (z >> 30)) * 0xBF58476D1CE4E5B9;
//   z = (z ^ (z >> 27)) * 0x94D049BB133111EB;  chunk = z ^ (z >> 31)
// Dense, unrelated initial states matter here: with the two adjacent taps of
// 1 + X + X^127 a sparse or regular state (or a sparse difference between two
// states) stays visible in the output for many thousands of clocks.
//
// Interface: `load` (re)seeds all registers; `en` advances them. `w` is
// registered: it changes one clock after each enabled edge.
module random_word #(
  parameter int unsigned W      = emu_pkg::RW,
  parameter int unsigned STREAM = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [31:0]  seed,
  input  logic         en,
  output logic [W-1:0] w
);

  function automatic logic [126:0] salt(input int unsigned idx);
    logic [63:0]  x, z;
    logic [191:0] acc;
    x = {32'(idx), 32'h0};
    for (int r = 0; r < 3; r++) begin
      x = x + 64'h9E37_79B9_7F4A_7C15;
      z = x;
      z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
      z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
      acc[64*r +: 64] = z ^ (z >> 31);
    end
    return acc[126:0];
  endfunction

  for (genvar k = 0; k < W; k++) begin : g_lfsr
    localparam logic [126:0] SALT = salt(k + 1 + 16 * STREAM);
    logic [126:0] seed_k;
    assign seed_k = {seed, seed, seed, seed[30:0]} ^ SALT;

    lfsr127 u_lfsr (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .seed  (seed_k),
      .en    (en),
      .bit_o (w[k])
    );
  end

endmodule
