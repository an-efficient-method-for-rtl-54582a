// emulator_top: the three queueing-network emulators side by side.
//
//   fq_*   fq_emulator: the Fair Queueing (SFF) multiplexer study - N = 4
//          Bernoulli streams, per-stream queues of 300 cells, head-of-line
//          marks, minimum search with round-robin ties, virtual time, and
//          traffic histograms. One slot = 3 clocks.
//   q_*    queue_emulator: a single instrumented ./1/k queue fed by a
//          Bernoulli, On/Off or MMBP source. One slot = 1 clock.
//   t_*    tagged_queue_emulator: a queue of time-stamped cells from 4
//          sources, measuring the waiting-time distribution. One slot =
//          5 clocks.
//
// The three share only the clock and reset. All control inputs (loads,
// capacities, reservations, seeds, run/start) and all read-out ports are
// those of the emulated circuits, meant to be driven and read by the host
// that controls the emulator; see the submodules for their timing.
module emulator_top
  import emu_pkg::*;
#(
  parameter int unsigned FQ_N       = 4,
  parameter int unsigned FQ_MAX_CAP = 300,
  localparam int unsigned FQ_OCC_W  = $clog2(FQ_MAX_CAP + 1),
  localparam int unsigned FQ_SW     = $clog2(FQ_N + 1),
  localparam int unsigned FQ_AW     = $clog2(FQ_MAX_CAP + 1),
  localparam int unsigned Q_OCC_W   = 8,
  localparam int unsigned T_NIN     = 4,
  localparam int unsigned T_DEPTH   = 300
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Fair Queueing emulator
  input  logic                          fq_start,
  input  logic [31:0]                   fq_seed,
  input  logic [FQ_N-1:0][RW-1:0]       fq_theta,
  input  logic [FQ_N-1:0][FQ_OCC_W-1:0] fq_capacity,
  input  logic [FQ_N-1:0][15:0]         fq_inc,
  input  logic [CNT_W-1:0]              fq_warmup_slots,
  input  logic [CNT_W-1:0]              fq_measure_slots,
  output logic                          fq_running,
  output logic                          fq_measuring,
  output logic                          fq_done,
  output logic [CNT_W-1:0]              fq_slot_count,
  output logic [CNT_W-1:0]              fq_emitted_total,
  output logic [FQ_N-1:0][CNT_W-1:0]    fq_emitted,
  output logic [FQ_N-1:0][CNT_W-1:0]    fq_arrived,
  output logic [FQ_N-1:0][CNT_W-1:0]    fq_lost,
  output logic [FQ_N-1:0][FQ_OCC_W-1:0] fq_occ,
  output logic [MARK_W-1:0]             fq_vtime,
  input  logic [FQ_SW-1:0]              fq_rd_stream,
  input  hist_kind_e                    fq_rd_kind,
  input  logic [FQ_AW-1:0]              fq_rd_addr,
  output logic [CNT_W-1:0]              fq_rd_data,
  // single-queue emulator
  input  logic                          q_load,
  input  logic [31:0]                   q_seed,
  input  logic                          q_run,
  input  src_kind_e                     q_src_sel,
  input  logic [RW-1:0]                 q_theta_arr,
  input  logic [RW-1:0]                 q_onoff_p_on,
  input  logic [RW-1:0]                 q_onoff_p_off,
  input  logic [RW-1:0]                 q_onoff_theta,
  input  logic [1:0][0:0][RW-1:0]       q_mmbp_trans_thr,
  input  logic [1:0][RW-1:0]            q_mmbp_emit_thr,
  input  logic [1:0]                    q_mmbp_emit_en,
  input  logic [RW-1:0]                 q_theta_srv,
  input  logic [Q_OCC_W-1:0]            q_capacity,
  output logic                          q_arrival,
  output logic                          q_service,
  output logic [Q_OCC_W-1:0]            q_occupation,
  output logic                          q_loss,
  output logic                          q_departure,
  output logic [CNT_W-1:0]              q_losses_total,
  output logic [CNT_W-1:0]              q_arrivals_total,
  output logic [CNT_W-1:0]              q_departures_total,
  output logic [CNT_W-1:0]              q_idle_slots,
  output logic                          q_ready,
  input  logic [Q_OCC_W-1:0]            q_occ_rd_addr,
  output logic [CNT_W-1:0]              q_occ_rd_data,
  output logic [7:0]                    q_hist_wr_ptr,
  output logic [8:0]                    q_hist_count,
  input  logic [7:0]                    q_hist_rd_addr,
  output logic [15:0]                   q_hist_rd_data,
  // tagged-cell queue emulator
  input  logic                          t_load,
  input  logic [31:0]                   t_seed,
  input  logic                          t_run,
  input  logic [T_NIN-1:0][RW-1:0]      t_theta,
  input  logic [RW-1:0]                 t_theta_srv,
  output logic                          t_dep_valid,
  output logic [1:0]                    t_dep_source,
  output logic [23:0]                   t_dep_delay,
  output logic [$clog2(T_DEPTH):0]      t_count,
  output logic [CNT_W-1:0]              t_arrivals_total,
  output logic [CNT_W-1:0]              t_departures_total,
  output logic [CNT_W-1:0]              t_losses_total,
  output logic                          t_ready,
  input  logic [5:0]                    t_delay_rd_addr,
  output logic [CNT_W-1:0]              t_delay_rd_data
);

  fq_emulator #(.N(FQ_N), .MAX_CAP(FQ_MAX_CAP), .INC_W(16)) u_fq (
    .clk, .rst_n,
    .start         (fq_start),
    .seed          (fq_seed),
    .theta         (fq_theta),
    .capacity      (fq_capacity),
    .inc           (fq_inc),
    .warmup_slots  (fq_warmup_slots),
    .measure_slots (fq_measure_slots),
    .running       (fq_running),
    .measuring     (fq_measuring),
    .done          (fq_done),
    .slot_count    (fq_slot_count),
    .emitted_total (fq_emitted_total),
    .emitted       (fq_emitted),
    .arrived       (fq_arrived),
    .lost          (fq_lost),
    .occ           (fq_occ),
    .vtime         (fq_vtime),
    .rd_stream     (fq_rd_stream),
    .rd_kind       (fq_rd_kind),
    .rd_addr       (fq_rd_addr),
    .rd_data       (fq_rd_data)
  );

  queue_emulator #(.OCC_W(Q_OCC_W), .HIST_DEPTH(256)) u_queue (
    .clk, .rst_n,
    .load             (q_load),
    .seed             (q_seed),
    .run              (q_run),
    .src_sel          (q_src_sel),
    .theta_arr        (q_theta_arr),
    .onoff_p_on       (q_onoff_p_on),
    .onoff_p_off      (q_onoff_p_off),
    .onoff_theta      (q_onoff_theta),
    .mmbp_trans_thr   (q_mmbp_trans_thr),
    .mmbp_emit_thr    (q_mmbp_emit_thr),
    .mmbp_emit_en     (q_mmbp_emit_en),
    .theta_srv        (q_theta_srv),
    .capacity         (q_capacity),
    .arrival          (q_arrival),
    .service          (q_service),
    .occupation       (q_occupation),
    .loss             (q_loss),
    .departure        (q_departure),
    .losses_total     (q_losses_total),
    .arrivals_total   (q_arrivals_total),
    .departures_total (q_departures_total),
    .idle_slots       (q_idle_slots),
    .ready            (q_ready),
    .occ_rd_addr      (q_occ_rd_addr),
    .occ_rd_data      (q_occ_rd_data),
    .hist_wr_ptr      (q_hist_wr_ptr),
    .hist_count       (q_hist_count),
    .hist_rd_addr     (q_hist_rd_addr),
    .hist_rd_data     (q_hist_rd_data)
  );

  tagged_queue_emulator #(.NIN(T_NIN), .DEPTH(T_DEPTH), .DELAY_BINS(64)) u_tagged (
    .clk, .rst_n,
    .load             (t_load),
    .seed             (t_seed),
    .run              (t_run),
    .theta            (t_theta),
    .theta_srv        (t_theta_srv),
    .dep_valid        (t_dep_valid),
    .dep_source       (t_dep_source),
    .dep_delay        (t_dep_delay),
    .count            (t_count),
    .arrivals_total   (t_arrivals_total),
    .departures_total (t_departures_total),
    .losses_total     (t_losses_total),
    .ready            (t_ready),
    .delay_rd_addr    (t_delay_rd_addr),
    .delay_rd_data    (t_delay_rd_data)
  );

endmodule
