// queue_emulator: one instrumented ./1/k queue, emulated one slot per clock.
//
// This is the elementary emulation set-up: a random source feeds a queue of
// programmable capacity served by a random server, and measurement blocks
// turn the queue's signals into performance indices.
//
//   circuit model    arrivals from one of three interchangeable sources
//                    (`src_sel`: Bernoulli, On/Off or 2-state MMBP); a
//                    Bernoulli server that can take one cell per slot with
//                    probability (theta_srv + 1) / 2^16; a slot_queue with
//                    capacity `capacity`
//   instrumentation  occupation histogram in memory; counters of losses,
//                    arrivals, departures and idle slots (occupation zero);
//                    history memory of inter-departure times
//
// The per-slot signals are brought out for observation: `arrival`,
// `service`, `occupation` (at the start of the slot), `loss`, `departure`.
//
// Operation: `load` copies `seed` into the three random generators (arrival
// state, arrival emission, service). While `run` is high every clock is one
// slot and everything above is updated at its edge; with `run` low the
// emulator holds. Reset empties the queue and clears the counters; the
// occupation histogram then clears itself in 2^OCC_W clocks (`ready`).
//
// Following the reference design: one slot per clock, the queue arithmetic,
// the three source kinds and the measured quantities. This design's own: the
// Bernoulli server, the sizes (capacity up to 255, history depth 256) and the
// read ports.
module queue_emulator
  import emu_pkg::*;
#(
  parameter int unsigned OCC_W = 8,
  parameter int unsigned HIST_DEPTH = 256,
  localparam int unsigned HAW = $clog2(HIST_DEPTH)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [31:0]            seed,
  input  logic                   run,
  input  src_kind_e              src_sel,
  input  logic [RW-1:0]          theta_arr,
  input  logic [RW-1:0]          onoff_p_on,
  input  logic [RW-1:0]          onoff_p_off,
  input  logic [RW-1:0]          onoff_theta,
  input  logic [1:0][0:0][RW-1:0] mmbp_trans_thr,
  input  logic [1:0][RW-1:0]     mmbp_emit_thr,
  input  logic [1:0]             mmbp_emit_en,
  input  logic [RW-1:0]          theta_srv,
  input  logic [OCC_W-1:0]       capacity,
  output logic                   arrival,
  output logic                   service,
  output logic [OCC_W-1:0]       occupation,
  output logic                   loss,
  output logic                   departure,
  output logic [CNT_W-1:0]       losses_total,
  output logic [CNT_W-1:0]       arrivals_total,
  output logic [CNT_W-1:0]       departures_total,
  output logic [CNT_W-1:0]       idle_slots,
  output logic                   ready,
  input  logic [OCC_W-1:0]       occ_rd_addr,
  output logic [CNT_W-1:0]       occ_rd_data,
  output logic [HAW-1:0]         hist_wr_ptr,
  output logic [HAW:0]           hist_count,
  input  logic [HAW-1:0]         hist_rd_addr,
  output logic [15:0]            hist_rd_data
);

  logic [RW-1:0]    w_state, w_emit, w_srv;
  logic             a_bern, a_onoff, a_mmbp;
  logic [OCC_W-1:0] occ_next;
  logic             gap_valid;
  logic [15:0]      gap;

  random_word #(.W(RW), .STREAM(8))  u_rand_state (.clk, .rst_n, .load, .seed, .en (1'b1), .w (w_state));
  random_word #(.W(RW), .STREAM(9))  u_rand_emit  (.clk, .rst_n, .load, .seed, .en (1'b1), .w (w_emit));
  random_word #(.W(RW), .STREAM(10)) u_rand_srv   (.clk, .rst_n, .load, .seed, .en (1'b1), .w (w_srv));

  // Interchangeable sources: each produces the same one-bit "cell" signal.
  bernoulli_source #(.W(RW)) u_bern (
    .w (w_emit), .theta (theta_arr), .emit (a_bern)
  );

  onoff_source #(.W(RW)) u_onoff (
    .clk, .rst_n,
    .slot    (run),
    .w_state (w_state),
    .w_emit  (w_emit),
    .p_on    (onoff_p_on),
    .p_off   (onoff_p_off),
    .theta   (onoff_theta),
    .emit    (a_onoff),
    .on      ()
  );

  mmbp_source #(.W(RW), .NS(2)) u_mmbp (
    .clk, .rst_n,
    .slot      (run),
    .w_state   (w_state),
    .w_emit    (w_emit),
    .trans_thr (mmbp_trans_thr),
    .emit_thr  (mmbp_emit_thr),
    .emit_en   (mmbp_emit_en),
    .emit      (a_mmbp),
    .state     ()
  );

  always_comb begin
    unique case (src_sel)
      SRC_BERNOULLI: arrival = a_bern;
      SRC_ONOFF:     arrival = a_onoff;
      SRC_MMBP:      arrival = a_mmbp;
      default:       arrival = 1'b0;
    endcase
  end

  bernoulli_source #(.W(RW)) u_server (
    .w (w_srv), .theta (theta_srv), .emit (service)
  );

  slot_queue #(.OCC_W(OCC_W), .ARR_W(1), .SRV_W(1)) u_queue (
    .clk, .rst_n,
    .slot       (run),
    .arrivals   (arrival),
    .capacity   (capacity),
    .service    (service),
    .occ        (occupation),
    .occ_next   (occ_next),
    .losses     (loss),
    .departures (departure)
  );

  // ---------------------------------------------------- instrumentation
  event_counter #(.W(CNT_W), .INC_W(1)) u_losses (
    .clk, .rst_n, .clr (1'b0), .en (run && loss), .inc (1'b1), .count (losses_total)
  );
  event_counter #(.W(CNT_W), .INC_W(1)) u_arrivals (
    .clk, .rst_n, .clr (1'b0), .en (run && arrival), .inc (1'b1), .count (arrivals_total)
  );
  event_counter #(.W(CNT_W), .INC_W(1)) u_departures (
    .clk, .rst_n, .clr (1'b0), .en (run && departure), .inc (1'b1), .count (departures_total)
  );
  event_counter #(.W(CNT_W), .INC_W(1)) u_idle (
    .clk, .rst_n, .clr (1'b0), .en (run && occupation == '0), .inc (1'b1), .count (idle_slots)
  );

  histogram_mem #(.BINS(1 << OCC_W), .VW(OCC_W), .CW(CNT_W)) u_occ_hist (
    .clk, .rst_n, .clr (1'b0),
    .valid   (run),
    .value   (occupation),
    .ready   (ready),
    .rd_addr (occ_rd_addr),
    .rd_data (occ_rd_data)
  );

  period_meter #(.VW(16)) u_departures_meter (
    .clk, .rst_n, .clr (1'b0),
    .slot        (run),
    .cell_i      (departure),
    .gap_valid   (gap_valid),
    .gap         (gap),
    .burst_valid (),
    .burst       ()
  );

  history_mem #(.DEPTH(HIST_DEPTH), .VW(16)) u_history (
    .clk, .rst_n, .clr (1'b0),
    .valid   (gap_valid),
    .value   (gap),
    .wr_ptr  (hist_wr_ptr),
    .count   (hist_count),
    .rd_addr (hist_rd_addr),
    .rd_data (hist_rd_data)
  );

endmodule
