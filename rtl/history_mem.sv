// history_mem: circular record of the most recent values of a measured stream.
//
// Each event with `valid` high writes `value` at the write pointer and advances
// it, wrapping after DEPTH entries, so the memory always holds the last DEPTH
// values (the emulator uses it for the inter-departure times of a queue, from
// which the host derives the idle-period distribution). `count` is the number
// of values written, saturating at DEPTH; `wr_ptr` is where the next one goes,
// so the oldest stored value is at wr_ptr once the memory is full.
//
// The history memory follows the reference emulator's instrumentation; its
// depth (256), the pointer scheme and the read port are this design's choices.
//
// Timing: writes at the clock edge with `valid`; `rd_data` is combinational
// from `rd_addr`. `clr` (and reset) empty it by resetting the pointer and count;
// stored words are then stale and must not be read beyond `count`.
module history_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned VW    = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          valid,
  input  logic [VW-1:0] value,
  output logic [AW-1:0] wr_ptr,
  output logic [AW:0]   count,
  input  logic [AW-1:0] rd_addr,
  output logic [VW-1:0] rd_data
);

  logic [VW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      count  <= '0;
    end else if (valid) begin
      wr_ptr <= (32'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      if (32'(count) < DEPTH) count <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (valid && !clr) mem[wr_ptr] <= value;
  end

  assign rd_data = (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;

endmodule
