// tagged_queue_emulator: a queue whose cells carry a source number and an
// arrival time stamp, used to measure the waiting-time distribution.
//
// NIN Bernoulli sources (source i emits with probability
// (theta[i] + 1) / 2^16 per slot) feed one packet_queue of DEPTH cells. Each
// cell is tagged with {source number, slot number at arrival}. A Bernoulli
// server takes at most one cell per slot with probability
// (theta_srv + 1) / 2^16. When a cell leaves, its delay (present slot number
// minus its time stamp, in slots) is added to a histogram, and counters keep
// arrivals, departures and losses. A slot lasts NIN + 1 clocks, because the
// arrivals of one slot are written into the memory one per clock.
//
// Interface: `load` seeds the random generators from `seed`; the emulator
// runs while `run` is high. `delay_rd_addr` selects a bin of the delay
// histogram (bin d counts cells that waited d slots; the last bin the tail).
// `dep_valid`/`dep_source`/`dep_delay` show each departure.
//
// The tagged-cell idea and the use of time stamps to study delay follow the
// reference design; the concrete tag layout, the server and all sizes are
// this design's.
module tagged_queue_emulator
  import emu_pkg::*;
#(
  parameter int unsigned NIN        = 4,
  parameter int unsigned DEPTH      = 300,
  parameter int unsigned DELAY_BINS = 64,
  localparam int unsigned SRC_W = (NIN > 1) ? $clog2(NIN) : 1,
  localparam int unsigned TS_W  = 24,
  localparam int unsigned TAG_W = SRC_W + TS_W,
  localparam int unsigned DAW   = $clog2(DELAY_BINS),
  localparam int unsigned QAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [31:0]             seed,
  input  logic                    run,
  input  logic [NIN-1:0][RW-1:0]  theta,
  input  logic [RW-1:0]           theta_srv,
  output logic                    dep_valid,
  output logic [SRC_W-1:0]        dep_source,
  output logic [TS_W-1:0]         dep_delay,
  output logic [QAW:0]            count,
  output logic [CNT_W-1:0]        arrivals_total,
  output logic [CNT_W-1:0]        departures_total,
  output logic [CNT_W-1:0]        losses_total,
  output logic                    ready,
  input  logic [DAW-1:0]          delay_rd_addr,
  output logic [CNT_W-1:0]        delay_rd_data
);

  logic                      slot_start;
  logic [TS_W-1:0]           slot_no;
  logic [NIN-1:0]            arr;
  logic [NIN-1:0][TAG_W-1:0] tags;
  logic [RW-1:0]             w_srv;
  logic                      srv;
  logic                      q_dep_valid, dep_seen, loss;
  logic [TAG_W-1:0]          q_dep_tag;
  logic [$clog2(NIN + 1)-1:0] n_arr;

  for (genvar i = 0; i < NIN; i++) begin : g_src
    logic [RW-1:0] w;
    random_word #(.W(RW), .STREAM(16 + i)) u_rand (
      .clk, .rst_n, .load, .seed, .en (1'b1), .w (w)
    );
    bernoulli_source #(.W(RW)) u_src (.w (w), .theta (theta[i]), .emit (arr[i]));
    assign tags[i] = {SRC_W'(i), slot_no};
  end

  random_word #(.W(RW), .STREAM(15)) u_rand_srv (
    .clk, .rst_n, .load, .seed, .en (1'b1), .w (w_srv)
  );
  bernoulli_source #(.W(RW)) u_srv (.w (w_srv), .theta (theta_srv), .emit (srv));

  packet_queue #(.NIN(NIN), .DEPTH(DEPTH), .TAG_W(TAG_W)) u_queue (
    .clk, .rst_n, .run,
    .slot_start,
    .arr_valid (arr),
    .arr_tag   (tags),
    .service   (srv),
    .dep_valid (q_dep_valid),
    .dep_tag   (q_dep_tag),
    .loss      (loss),
    .count     (count)
  );

  // Slot number: advances at the end of phase 0 of every slot, so a cell
  // stamped in phase 0 of slot t and leaving in phase 0 of slot t + d is
  // reported with delay d.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          slot_no <= '0;
    else if (slot_start) slot_no <= slot_no + 1'b1;
  end

  // The departure register stays valid for a whole slot; report it once.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          dep_seen <= 1'b0;
    else if (slot_start) dep_seen <= 1'b0;
    else if (run)        dep_seen <= q_dep_valid;
  end

  assign dep_valid  = run && q_dep_valid && !dep_seen;
  assign dep_source = q_dep_tag[TAG_W-1 -: SRC_W];
  assign dep_delay  = slot_no - 1'b1 - q_dep_tag[TS_W-1:0];

  always_comb begin
    n_arr = '0;
    for (int i = 0; i < NIN; i++) n_arr = n_arr + arr[i];
  end

  event_counter #(.W(CNT_W), .INC_W($clog2(NIN + 1))) u_arrivals (
    .clk, .rst_n, .clr (1'b0), .en (slot_start), .inc (n_arr), .count (arrivals_total)
  );
  event_counter #(.W(CNT_W), .INC_W(1)) u_departures (
    .clk, .rst_n, .clr (1'b0), .en (dep_valid), .inc (1'b1), .count (departures_total)
  );
  event_counter #(.W(CNT_W), .INC_W(1)) u_losses (
    .clk, .rst_n, .clr (1'b0), .en (loss), .inc (1'b1), .count (losses_total)
  );

  histogram_mem #(.BINS(DELAY_BINS), .VW(TS_W), .CW(CNT_W)) u_delay_hist (
    .clk, .rst_n, .clr (1'b0),
    .valid   (dep_valid),
    .value   (dep_delay),
    .ready   (ready),
    .rd_addr (delay_rd_addr),
    .rd_data (delay_rd_data)
  );

endmodule
