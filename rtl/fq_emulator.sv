// fq_emulator: emulator of a Fair Queueing (SFF) multiplexer fed by N random
// streams, with traffic instrumentation.
//
// Structure (one instance of each per stream unless noted):
//   sources          random_word + bernoulli_source: a cell arrives in a slot
//                    with probability (theta[i] + 1) / 2^16 ("Load")
//   queues           slot_queue of capacity capacity[i] cells ("Capacities");
//                    cells arriving to a full queue are lost
//   mark table       fq_mark_table: mark of the head cell of each queue, spaced
//                    by inc[i] = 1/phi_i ("Reservation")
//   server (one)     fq_server: minimum mark over the non-empty queues, round
//                    robin among equal marks, virtual time = mark of the last
//                    served cell; one cell served per slot at most
//   instrumentation  fq_stream_stats for every stream and one for the
//                    aggregate output: emitted cells, inter-cell time and
//                    burst-length histograms, and queue occupation histograms
//
// Operation: after reset the histograms clear themselves (OCC_BINS clocks).
// A `start` pulse loads `seed` into the random generators; once the
// histograms are clear the emulator runs, one slot every SLOT_CYCLES (3)
// clocks. Slots 0 .. warmup_slots-1 bring the system to steady state and are
// not recorded; the next measure_slots slots are recorded (`measuring`);
// then the emulator stops and raises `done`. A new experiment needs a reset.
// The reference experiment uses N = 4, capacity 300, phi_i = 1/4 (inc = 4),
// alpha_i = 0.125 or 0.225, 10,000 warm-up slots and 10^7 measured slots.
//
// Within a slot: arrivals and service are committed together at the edge that
// ends it; a cell can be served at the earliest in the slot after the one in
// which it arrived, and the arrival is lost if its queue is full at that edge.
//
// Read-out: `rd_stream` (0..N-1 a source, N the aggregate), `rd_kind`
// (emu_pkg::hist_kind_e) and `rd_addr` select one histogram bin on `rd_data`
// (combinational). Counters cover the measurement window only.
//
// The block structure, the sizes and the experiment follow the reference
// design; sampling and commit timing, counter widths and bin counts are this
// design's choices.
module fq_emulator
  import emu_pkg::*;
#(
  parameter int unsigned N           = 4,
  parameter int unsigned MAX_CAP     = 300,
  parameter int unsigned INC_W       = 16,
  parameter int unsigned SLOT_CYCLES = FQ_SLOT_CYCLES,
  parameter int unsigned GAP_BINS    = 32,
  localparam int unsigned OCC_W    = $clog2(MAX_CAP + 1),
  localparam int unsigned OCC_BINS = MAX_CAP + 1,
  localparam int unsigned IW       = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned SW       = $clog2(N + 1),
  localparam int unsigned AW       = $clog2(((GAP_BINS > OCC_BINS) ? GAP_BINS : OCC_BINS))
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [31:0]                seed,
  input  logic [N-1:0][RW-1:0]       theta,
  input  logic [N-1:0][OCC_W-1:0]    capacity,
  input  logic [N-1:0][INC_W-1:0]    inc,
  input  logic [CNT_W-1:0]           warmup_slots,
  input  logic [CNT_W-1:0]           measure_slots,
  output logic                       running,
  output logic                       measuring,
  output logic                       done,
  output logic [CNT_W-1:0]           slot_count,
  output logic [CNT_W-1:0]           emitted_total,
  output logic [N-1:0][CNT_W-1:0]    emitted,
  output logic [N-1:0][CNT_W-1:0]    arrived,
  output logic [N-1:0][CNT_W-1:0]    lost,
  output logic [N-1:0][OCC_W-1:0]    occ,
  output logic [MARK_W-1:0]          vtime,
  input  logic [SW-1:0]              rd_stream,
  input  hist_kind_e                 rd_kind,
  input  logic [AW-1:0]              rd_addr,
  output logic [CNT_W-1:0]           rd_data
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_RUN, S_DONE} state_e;
  state_e state;

  logic                     slot_end;
  logic                     serve_valid;
  logic [IW-1:0]            serve_idx;
  logic [N-1:0]             serve_onehot;
  logic [MARK_W-1:0]        vtime_next;
  logic [N-1:0][MARK_W-1:0] mark;
  logic [N-1:0]             cell_in, nonempty, nonempty_next;
  logic [N-1:0][OCC_W-1:0]  occ_next;
  logic [N-1:0]             loss, departed;
  logic [N:0]               stats_ready;
  logic [N:0][CNT_W-1:0]    stats_data;
  logic [CNT_W-1:0]         end_slot;

  // ---------------------------------------------------------------- control
  assign end_slot  = warmup_slots + measure_slots;
  assign running   = (state == S_RUN);
  assign done      = (state == S_DONE);
  assign measuring = running && (slot_count >= warmup_slots) && (slot_count < end_slot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      slot_count <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_CLEAR;
        S_CLEAR: if (&stats_ready) state <= (end_slot == '0) ? S_DONE : S_RUN;
        S_RUN:   if (slot_end) begin
                   slot_count <= slot_count + 1'b1;
                   if (slot_count + 1'b1 >= end_slot) state <= S_DONE;
                 end
        S_DONE:  ;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- sources and queues
  for (genvar i = 0; i < N; i++) begin : g_stream
    logic [RW-1:0] w;

    random_word #(.W(RW), .STREAM(i)) u_rand (
      .clk, .rst_n,
      .load (start && state == S_IDLE),
      .seed (seed),
      .en   (1'b1),
      .w    (w)
    );

    bernoulli_source #(.W(RW)) u_src (
      .w     (w),
      .theta (theta[i]),
      .emit  (cell_in[i])
    );

    slot_queue #(.OCC_W(OCC_W), .ARR_W(1), .SRV_W(1)) u_queue (
      .clk, .rst_n,
      .slot       (slot_end),
      .arrivals   (cell_in[i]),
      .capacity   (capacity[i]),
      .service    (serve_onehot[i]),
      .occ        (occ[i]),
      .occ_next   (occ_next[i]),
      .losses     (loss[i]),
      .departures (departed[i])
    );

    assign nonempty[i]      = (occ[i] != '0);
    assign nonempty_next[i] = (occ_next[i] != '0);

    event_counter #(.W(CNT_W), .INC_W(1)) u_arrived (
      .clk, .rst_n, .clr (1'b0),
      .en    (slot_end && measuring && cell_in[i]),
      .inc   (1'b1),
      .count (arrived[i])
    );

    event_counter #(.W(CNT_W), .INC_W(1)) u_lost (
      .clk, .rst_n, .clr (1'b0),
      .en    (slot_end && measuring && loss[i]),
      .inc   (1'b1),
      .count (lost[i])
    );

    fq_stream_stats #(
      .GAP_BINS (GAP_BINS),
      .OCC_BINS (OCC_BINS),
      .OCC_W    (OCC_W),
      .HAS_OCC  (1'b1)
    ) u_stats (
      .clk, .rst_n, .clr (1'b0),
      .slot    (slot_end),
      .measure (measuring),
      .cell_i  (departed[i]),
      .occ     (occ[i]),
      .emitted (emitted[i]),
      .ready   (stats_ready[i]),
      .rd_kind (rd_kind),
      .rd_addr (rd_addr),
      .rd_data (stats_data[i])
    );
  end

  // ---------------------------------------------------- marks and server
  fq_mark_table #(.N(N), .INC_W(INC_W)) u_marks (
    .clk, .rst_n,
    .commit        (slot_end),
    .nonempty      (nonempty),
    .nonempty_next (nonempty_next),
    .serve_valid   (serve_valid),
    .serve_idx     (serve_idx),
    .v_new         (vtime_next),
    .inc           (inc),
    .mark          (mark)
  );

  fq_server #(.N(N), .SLOT_CYCLES(SLOT_CYCLES)) u_server (
    .clk, .rst_n,
    .run          (running),
    .nonempty     (nonempty),
    .mark         (mark),
    .phase        (),
    .slot_end     (slot_end),
    .serve_valid  (serve_valid),
    .serve_idx    (serve_idx),
    .serve_onehot (serve_onehot),
    .vtime        (vtime),
    .vtime_next   (vtime_next),
    .last         ()
  );

  // ------------------------------------------- aggregate output statistics
  fq_stream_stats #(
    .GAP_BINS (GAP_BINS),
    .OCC_BINS (OCC_BINS),
    .OCC_W    (OCC_W),
    .HAS_OCC  (1'b0)
  ) u_stats_all (
    .clk, .rst_n, .clr (1'b0),
    .slot    (slot_end),
    .measure (measuring),
    .cell_i  (serve_valid),
    .occ     ('0),
    .emitted (emitted_total),
    .ready   (stats_ready[N]),
    .rd_kind (rd_kind),
    .rd_addr (rd_addr),
    .rd_data (stats_data[N])
  );

  assign rd_data = (32'(rd_stream) <= N) ? stats_data[rd_stream] : '0;

  // A served cell always leaves a queue that was not empty.
  property p_serve_nonempty;
    @(posedge clk) disable iff (!rst_n) serve_valid |-> nonempty[serve_idx];
  endproperty
  a_serve_nonempty: assert property (p_serve_nonempty);

endmodule
