// tb_emulator_full: the Fair Queueing experiment at full size, through the
// top level with all parameters at their defaults: N = 4 streams,
// phi_i = 1/4 (inc = 4), capacity 300 per stream, 10,000 warm-up slots and
// 10^7 measured slots, once at rho = 0.5 (alpha = 0.125, theta = 8191) and
// once at rho = 0.9 (alpha = 0.225, theta = 14745), with a reset between.
//
// Checks per load: the run takes 3 clocks per slot; each stream's arrival
// rate is within 1% of alpha; no cell is lost; cells are conserved; and the
// aggregate output's silent periods are geometric: for inter-cell times
// k >= 2 the histogram falls by the factor (1 - alpha)^N per slot (within
// 3%), since the server only idles while no stream has a cell and each idle
// slot continues with probability (1 - alpha)^N. The inter-cell time and
// occupation distributions of stream 0 are printed.
module tb_emulator_full;
  import emu_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic fq_start = 0;
  logic [31:0] fq_seed = 32'h5555_5555;
  logic [N-1:0][15:0] fq_theta, fq_inc = {4{16'd4}};
  logic [N-1:0][8:0] fq_capacity = {4{9'd300}}, fq_occ;
  logic [31:0] fq_warmup_slots = 10000, fq_measure_slots = 10_000_000;
  logic fq_running, fq_measuring, fq_done;
  logic [31:0] fq_slot_count, fq_emitted_total, fq_vtime, fq_rd_data;
  logic [N-1:0][31:0] fq_emitted, fq_arrived, fq_lost;
  logic [2:0] fq_rd_stream = 0;
  hist_kind_e fq_rd_kind = HIST_GAP;
  logic [8:0] fq_rd_addr = 0;
  // the other two emulators stay idle
  logic [1:0][0:0][15:0] q_mmbp_trans_thr = '0;
  logic [1:0][15:0] q_mmbp_emit_thr = '0;
  logic [7:0] q_occupation, q_hist_wr_ptr;
  logic q_arrival, q_service, q_loss, q_departure, q_ready;
  logic [31:0] q_losses_total, q_arrivals_total, q_departures_total, q_idle_slots, q_occ_rd_data;
  logic [8:0] q_hist_count;
  logic [15:0] q_hist_rd_data;
  logic t_dep_valid, t_ready;
  logic [1:0] t_dep_source;
  logic [23:0] t_dep_delay;
  logic [9:0] t_count;
  logic [31:0] t_arrivals_total, t_departures_total, t_losses_total, t_delay_rd_data;

  int checks = 0, failures = 0;
  longint cyc = 0;

  emulator_top dut (
    .clk, .rst_n,
    .fq_start, .fq_seed, .fq_theta, .fq_capacity, .fq_inc, .fq_warmup_slots, .fq_measure_slots,
    .fq_running, .fq_measuring, .fq_done, .fq_slot_count, .fq_emitted_total, .fq_emitted,
    .fq_arrived, .fq_lost, .fq_occ, .fq_vtime, .fq_rd_stream, .fq_rd_kind, .fq_rd_addr, .fq_rd_data,
    .q_load (1'b0), .q_seed ('0), .q_run (1'b0), .q_src_sel (SRC_BERNOULLI), .q_theta_arr ('0),
    .q_onoff_p_on ('0), .q_onoff_p_off ('0), .q_onoff_theta ('0), .q_mmbp_trans_thr,
    .q_mmbp_emit_thr, .q_mmbp_emit_en (2'b00), .q_theta_srv ('0), .q_capacity ('0),
    .q_arrival, .q_service, .q_occupation, .q_loss, .q_departure, .q_losses_total,
    .q_arrivals_total, .q_departures_total, .q_idle_slots, .q_ready, .q_occ_rd_addr ('0),
    .q_occ_rd_data, .q_hist_wr_ptr, .q_hist_count, .q_hist_rd_addr ('0), .q_hist_rd_data,
    .t_load (1'b0), .t_seed ('0), .t_run (1'b0), .t_theta ('0), .t_theta_srv ('0),
    .t_dep_valid, .t_dep_source, .t_dep_delay, .t_count, .t_arrivals_total,
    .t_departures_total, .t_losses_total, .t_ready, .t_delay_rd_addr ('0), .t_delay_rd_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) if (fq_running) cyc++;

  initial begin
    repeat (70_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic read_hist(input int stream, input hist_kind_e kind, input int nb, ref longint h [301]);
    fq_rd_stream = 3'(stream); fq_rd_kind = kind;
    for (int b = 0; b < nb; b++) begin fq_rd_addr = 9'(b); #1; h[b] = 64'(fq_rd_data); end
  endtask

  task automatic experiment(input logic [15:0] theta, input real alpha, input string name);
    longint h [301];
    longint tot;
    real p0, r;
    string line;
    rst_n = 0;
    fq_theta = {4{theta}};
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    @(negedge clk) fq_start = 1;
    @(negedge clk) fq_start = 0;
    wait (fq_done);
    @(negedge clk);
    $display("%s: %0d slots in %0d clocks, emitted %0d", name, fq_slot_count, cyc, fq_emitted_total);
    check(cyc == 3 * longint'(fq_slot_count), $sformatf("%s: 3 clocks per slot", name));
    check(fq_slot_count == 10_010_000, $sformatf("%s: slot count", name));
    for (int i = 0; i < N; i++) begin
      r = real'(fq_arrived[i]) / 1.0e7;
      check(r > alpha * 0.99 && r < alpha * 1.01, $sformatf("%s stream %0d rate %f", name, i, r));
      check(fq_lost[i] == 0, $sformatf("%s stream %0d lost %0d", name, i, fq_lost[i]));
      check(longint'(fq_arrived[i]) - longint'(fq_emitted[i]) <= 300 &&
            longint'(fq_emitted[i]) <= longint'(fq_arrived[i]) + 300, $sformatf("%s stream %0d balance", name, i));
    end
    p0 = (1.0 - alpha) ** 4;
    read_hist(N, HIST_GAP, 32, h);
    tot = 0;
    for (int b = 0; b < 32; b++) tot += h[b];
    check(tot == longint'(fq_emitted_total), $sformatf("%s aggregate gap total", name));
    line = "";
    for (int b = 1; b <= 8; b++) line = {line, $sformatf(" %0d:%.4f", b, real'(h[b]) / tot)};
    $display("%s aggregate inter-cell time distribution:%s", name, line);
    for (int k = 2; k <= 4; k++) begin
      r = real'(h[k+1]) / real'(h[k]);
      check(r > p0 * 0.97 && r < p0 * 1.03, $sformatf("%s geometric ratio h[%0d]/h[%0d] = %f, (1-alpha)^4 = %f",
                                                      name, k + 1, k, r, p0));
    end
    read_hist(0, HIST_GAP, 32, h);
    tot = 0;
    for (int b = 0; b < 32; b++) tot += h[b];
    line = "";
    for (int b = 1; b <= 12; b++) line = {line, $sformatf(" %0d:%.3f", b, real'(h[b]) / tot)};
    $display("%s stream 0 inter-cell time distribution:%s", name, line);
    read_hist(0, HIST_OCC, 301, h);
    line = "";
    for (int b = 0; b <= 10; b++) line = {line, $sformatf(" %0d:%.3f", b, real'(h[b]) / 1.0e7)};
    $display("%s stream 0 occupation distribution:%s", name, line);
  endtask

  initial begin
    experiment(16'd8191, 0.125, "rho=0.5");
    experiment(16'd14745, 0.225, "rho=0.9");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
