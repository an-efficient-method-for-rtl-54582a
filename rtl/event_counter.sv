// event_counter: a register and an adder that count events.
//
// Most performance indices of the emulator (losses, arrivals, emitted cells,
// idle slots) are obtained by counting events. Every clock with `en` high the
// count grows by `inc`; `clr` sets it to zero and has priority. The count wraps
// modulo 2^W (W = 32 by default, a choice of this design: enough for 4e9
// slots).
//
// Timing: `count` is a register, updated at the clock edge that samples
// `en`/`inc`. Reset clears it.
module event_counter #(
  parameter int unsigned W   = emu_pkg::CNT_W,
  parameter int unsigned INC_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [INC_W-1:0] inc,
  output logic [W-1:0]     count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (clr)  count <= '0;
    else if (en)   count <= count + W'(inc);
  end

endmodule
