// period_meter: lengths of the silent and busy periods of a slotted cell_i stream.
//
// Watches a stream that carries at most one cell_i per slot and reports, in the
// slot where they become known:
//   gap   - the time between this cell_i and the previous one, in slots
//           (1 for back-to-back cells; a silent period lasts gap - 1 slots).
//           Not reported for the first cell_i seen after reset or `clr`.
//   burst - the length of a run of back-to-back cells, reported in the first
//           empty slot after the run.
// These feed the histograms of inter-cell_i times and burst lengths that the
// Fair Queueing study measures. Lengths saturate at 2^VW - 1.
//
// Interface and timing: `cell_i` is sampled at the clock edge where `slot` is
// high; `gap_valid`/`gap` and `burst_valid`/`burst` are combinational and
// describe that same slot, so a consumer enabled by `slot` samples them at the
// same edge. That the meter exists follows the reference design; how it
// measures is this design's own.
module period_meter #(
  parameter int unsigned VW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          slot,
  input  logic          cell_i,
  output logic          gap_valid,
  output logic [VW-1:0] gap,
  output logic          burst_valid,
  output logic [VW-1:0] burst
);

  localparam logic [VW-1:0] MAXV = '1;

  logic          seen;      // a cell_i has been seen since reset / clr
  logic [VW-1:0] elapsed;   // empty slots since the last cell_i
  logic [VW-1:0] run;       // length of the current run of cells (0 = none)

  always_comb begin
    gap_valid   = slot && cell_i && seen;
    gap         = (elapsed == MAXV) ? MAXV : elapsed + 1'b1;
    burst_valid = slot && !cell_i && (run != '0);
    burst       = run;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen    <= 1'b0;
      elapsed <= '0;
      run     <= '0;
    end else if (clr) begin
      seen    <= 1'b0;
      elapsed <= '0;
      run     <= '0;
    end else if (slot) begin
      if (cell_i) begin
        seen    <= 1'b1;
        elapsed <= '0;
        if (run != MAXV) run <= run + 1'b1;
      end else begin
        run <= '0;
        if (elapsed != MAXV) elapsed <= elapsed + 1'b1;
      end
    end
  end

endmodule
