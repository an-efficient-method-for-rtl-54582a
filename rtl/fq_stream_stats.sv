// fq_stream_stats: traffic statistics of one output stream of the server.
//
// One instance watches one stream leaving the Fair Queueing server (the cells
// of a single source, or all cells together) and, during the measurement
// window only, keeps:
//   * the number of emitted cells                          (event_counter)
//   * the histogram of the time between two cells          (period_meter + histogram_mem)
//   * the histogram of burst lengths (back-to-back cells)  (period_meter + histogram_mem)
//   * if HAS_OCC, the histogram of the stream's queue occupation, sampled once
//     per slot                                              (histogram_mem)
// The first two histograms give the silent-period distributions of the study
// (a silent period lasts gap - 1 slots), the third the buffer occupation
// distribution. The period meter runs from reset on so that the first period
// inside the window is measured correctly.
//
// Interface and timing: `slot` is high on the clock that ends a slot, `cell_i`
// and `occ` describe that slot; `measure` gates all recording. Read-out:
// `rd_kind` (emu_pkg::hist_kind_e) and `rd_addr` select a bin, `rd_data` is
// combinational. `ready` is low while the histograms clear after reset or `clr`.
// Which statistics are kept follows the reference design; bin counts are this
// design's choice (GAP_BINS = 32, OCC_BINS = capacity + 1).
module fq_stream_stats
  import emu_pkg::*;
#(
  parameter int unsigned GAP_BINS = 32,
  parameter int unsigned OCC_BINS = 301,
  parameter int unsigned OCC_W    = 9,
  parameter bit          HAS_OCC  = 1'b1,
  localparam int unsigned AW = $clog2(((GAP_BINS > OCC_BINS) ? GAP_BINS : OCC_BINS))
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               slot,
  input  logic               measure,
  input  logic               cell_i,
  input  logic [OCC_W-1:0]   occ,
  output logic [CNT_W-1:0]   emitted,
  output logic               ready,
  input  hist_kind_e         rd_kind,
  input  logic [AW-1:0]      rd_addr,
  output logic [CNT_W-1:0]   rd_data
);

  localparam int unsigned GAW = $clog2(GAP_BINS);
  localparam int unsigned OAW = $clog2(OCC_BINS);

  logic          gap_valid, burst_valid;
  logic [15:0]   gap, burst;
  logic [CNT_W-1:0] gap_data, burst_data, occ_data;
  logic          gap_ready, burst_ready, occ_ready;

  period_meter #(.VW(16)) u_meter (
    .clk, .rst_n, .clr, .slot, .cell_i,
    .gap_valid, .gap, .burst_valid, .burst
  );

  event_counter #(.W(CNT_W), .INC_W(1)) u_emitted (
    .clk, .rst_n, .clr,
    .en    (slot && measure && cell_i),
    .inc   (1'b1),
    .count (emitted)
  );

  histogram_mem #(.BINS(GAP_BINS), .VW(16), .CW(CNT_W)) u_gap_hist (
    .clk, .rst_n, .clr,
    .valid   (measure && gap_valid),
    .value   (gap),
    .ready   (gap_ready),
    .rd_addr (rd_addr[GAW-1:0]),
    .rd_data (gap_data)
  );

  histogram_mem #(.BINS(GAP_BINS), .VW(16), .CW(CNT_W)) u_burst_hist (
    .clk, .rst_n, .clr,
    .valid   (measure && burst_valid),
    .value   (burst),
    .ready   (burst_ready),
    .rd_addr (rd_addr[GAW-1:0]),
    .rd_data (burst_data)
  );

  if (HAS_OCC) begin : g_occ
    histogram_mem #(.BINS(OCC_BINS), .VW(OCC_W), .CW(CNT_W)) u_occ_hist (
      .clk, .rst_n, .clr,
      .valid   (slot && measure),
      .value   (occ),
      .ready   (occ_ready),
      .rd_addr (rd_addr[OAW-1:0]),
      .rd_data (occ_data)
    );
  end else begin : g_no_occ
    assign occ_ready = 1'b1;
    assign occ_data  = '0;
  end

  assign ready = gap_ready && burst_ready && occ_ready;

  always_comb begin
    unique case (rd_kind)
      HIST_GAP:   rd_data = (32'(rd_addr) < GAP_BINS) ? gap_data : '0;
      HIST_BURST: rd_data = (32'(rd_addr) < GAP_BINS) ? burst_data : '0;
      HIST_OCC:   rd_data = occ_data;
      default:    rd_data = '0;
    endcase
  end

endmodule
