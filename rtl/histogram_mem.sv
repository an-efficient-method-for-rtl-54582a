// histogram_mem: histogram of a sampled value, kept in a memory of counters.
//
// Each event with `valid` high adds one to the counter of bin `value`; values
// of BINS-1 and above all land in the last bin, so the last bin counts the
// tail. The host reads bin `rd_addr` on `rd_data` (the reference emulator
// dumps such memories to files after a run).
//
// The memory is cleared by a sweep that writes one bin per clock: it starts
// after reset and after each `clr` pulse and lasts BINS clocks, during which
// `ready` is low and events are ignored. Updates are a read-modify-write of one
// word in a single clock, so one event per clock can be taken. Counters are
// CW bits wide and wrap (CW = 32 by default).
//
// Timing: `rd_data` is combinational from `rd_addr` and shows the count as of
// the last clock edge. The histogram as a memory follows the reference
// emulator; the clearing sweep, the saturating last bin and the sizes are this
// design's choices.
module histogram_mem #(
  parameter int unsigned BINS = 32,
  parameter int unsigned VW   = 16,   // width of the sampled value
  parameter int unsigned CW   = emu_pkg::CNT_W,
  localparam int unsigned AW  = (BINS > 1) ? $clog2(BINS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          valid,
  input  logic [VW-1:0] value,
  output logic          ready,
  input  logic [AW-1:0] rd_addr,
  output logic [CW-1:0] rd_data
);

  logic [CW-1:0] mem [BINS];
  logic [AW-1:0] sweep_addr;
  logic          sweeping;
  logic [AW-1:0] bin;

  always_comb begin
    if (32'(value) >= BINS - 1) bin = AW'(BINS - 1);
    else                        bin = AW'(value);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweeping   <= 1'b1;
      sweep_addr <= '0;
    end else if (clr) begin
      sweeping   <= 1'b1;
      sweep_addr <= '0;
    end else if (sweeping) begin
      if (32'(sweep_addr) == BINS - 1) sweeping <= 1'b0;
      sweep_addr <= sweep_addr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (sweeping)   mem[sweep_addr] <= '0;
    else if (valid) mem[bin] <= mem[bin] + 1'b1;
  end

  assign ready   = !sweeping;
  assign rd_data = (32'(rd_addr) < BINS) ? mem[rd_addr] : '0;

endmodule
