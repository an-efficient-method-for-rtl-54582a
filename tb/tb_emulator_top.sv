// tb_emulator_top: end-to-end run of the three emulators at once, through
// the top level, with every parameter at its default.
//   Fair Queueing: alpha = 0.225 per stream (rho = 0.9) with small buffers
//     (capacity 3) so that overflow happens, 200 warm-up and 20,000
//     measured slots.
//   Single queue: capacity 5, Bernoulli, then On/Off, then MMBP arrivals.
//   Tagged queue: four sources, light then overload.
// Checks: cell conservation in every queue, counters against each other,
// histogram totals. Mechanisms counted (each must occur): FQ losses, idle
// server slots, ties broken round robin, a queue restarting from the virtual
// time, a backlogged queue's next mark, the warm-up to measurement switch;
// single queue losses, idle slots and each source kind; tagged queue losses
// and multiple arrivals in one slot.
module tb_emulator_top;
  import emu_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  // FQ
  logic fq_start = 0;
  logic [31:0] fq_seed = 32'h5555_5555;
  logic [N-1:0][15:0] fq_theta = {4{16'd14745}}, fq_inc = {4{16'd4}};
  logic [N-1:0][8:0] fq_capacity = {4{9'd3}}, fq_occ;
  logic [31:0] fq_warmup_slots = 200, fq_measure_slots = 20000;
  logic fq_running, fq_measuring, fq_done;
  logic [31:0] fq_slot_count, fq_emitted_total, fq_vtime, fq_rd_data;
  logic [N-1:0][31:0] fq_emitted, fq_arrived, fq_lost;
  logic [2:0] fq_rd_stream = 0;
  hist_kind_e fq_rd_kind = HIST_GAP;
  logic [8:0] fq_rd_addr = 0;
  // single queue
  logic q_load = 0, q_run = 0;
  logic [31:0] q_seed = 32'h0BAD_CAFE;
  src_kind_e q_src_sel = SRC_BERNOULLI;
  logic [15:0] q_theta_arr = 16'd32767, q_onoff_p_on = 16'd6553, q_onoff_p_off = 16'd19660,
               q_onoff_theta = 16'd52428, q_theta_srv = 16'd39321;
  logic [1:0][0:0][15:0] q_mmbp_trans_thr = {16'd6553, 16'd58981};
  logic [1:0][15:0] q_mmbp_emit_thr = {16'd58981, 16'd6553};
  logic [1:0] q_mmbp_emit_en = 2'b11;
  logic [7:0] q_capacity = 8'd5, q_occupation, q_occ_rd_addr = 0, q_hist_wr_ptr, q_hist_rd_addr = 0;
  logic q_arrival, q_service, q_loss, q_departure, q_ready;
  logic [31:0] q_losses_total, q_arrivals_total, q_departures_total, q_idle_slots, q_occ_rd_data;
  logic [8:0] q_hist_count;
  logic [15:0] q_hist_rd_data;
  // tagged queue
  logic t_load = 0, t_run = 0;
  logic [31:0] t_seed = 32'h600D_F00D;
  logic [3:0][15:0] t_theta = {4{16'd6553}};
  logic [15:0] t_theta_srv = 16'd58981;
  logic t_dep_valid, t_ready;
  logic [1:0] t_dep_source;
  logic [23:0] t_dep_delay;
  logic [9:0] t_count;
  logic [31:0] t_arrivals_total, t_departures_total, t_losses_total, t_delay_rd_data;
  logic [5:0] t_delay_rd_addr = 0;

  int checks = 0, failures = 0;
  int n_fq_loss = 0, n_fq_idle = 0, n_fq_tie = 0, n_fq_restart_v = 0, n_fq_follow = 0, n_fq_measure_on = 0;
  int n_q_loss = 0, n_q_idle = 0, n_q_src [3], n_t_loss = 0, n_t_multi = 0, n_t_dep = 0;
  int occ0 [N];
  bit was_measuring = 0;

  emulator_top dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------ mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fq.slot_end) begin
      automatic int nties = 0;
      for (int i = 0; i < N; i++) begin
        if (dut.u_fq.loss[i]) n_fq_loss++;
        if (dut.u_fq.serve_valid && i != int'(dut.u_fq.serve_idx) && dut.u_fq.nonempty[i]
            && dut.u_fq.mark[i] == dut.u_fq.mark[dut.u_fq.serve_idx]) nties++;
        if (!dut.u_fq.nonempty[i] && dut.u_fq.nonempty_next[i]
            && mark_before(dut.u_fq.mark[i], dut.u_fq.vtime_next)) n_fq_restart_v++;
        if (dut.u_fq.serve_onehot[i] && dut.u_fq.nonempty_next[i]) n_fq_follow++;
      end
      if (nties > 0) n_fq_tie++;
      if (!dut.u_fq.serve_valid) n_fq_idle++;
      if (fq_measuring && !was_measuring) begin
        n_fq_measure_on++;
        for (int i = 0; i < N; i++) occ0[i] = int'(fq_occ[i]);
      end
      was_measuring = fq_measuring;
    end
    if (q_run) begin
      if (q_loss) n_q_loss++;
      if (q_occupation == 0) n_q_idle++;
      if (q_arrival) n_q_src[q_src_sel]++;
    end
    if (t_losses_total != 0) n_t_loss = int'(t_losses_total);
    if (dut.u_tagged.slot_start && $countones(dut.u_tagged.arr) > 1) n_t_multi++;
    if (t_dep_valid) n_t_dep++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // --------------------------------------------------------- single queue
  initial begin
    n_q_src[0] = 0; n_q_src[1] = 0; n_q_src[2] = 0;
    wait (rst_n);
    @(negedge clk) q_load = 1;
    @(negedge clk) q_load = 0;
    wait (q_ready);
    @(negedge clk) q_run = 1;
    repeat (10000) @(negedge clk);
    q_src_sel = SRC_ONOFF;
    repeat (10000) @(negedge clk);
    q_src_sel = SRC_MMBP;
    repeat (10000) @(negedge clk);
    q_run = 0;
  end

  // --------------------------------------------------------- tagged queue
  initial begin
    wait (rst_n);
    @(negedge clk) t_load = 1;
    @(negedge clk) t_load = 0;
    wait (t_ready);
    @(negedge clk) t_run = 1;
    repeat (20000) @(negedge clk);
    t_theta = {4{16'd21845}};
    repeat (20000) @(negedge clk);
    #1;
    while (!dut.u_tagged.slot_start) begin @(negedge clk); #1; end
    t_run = 0;
  end

  // ------------------------------------------------------------ main
  initial begin
    longint hsum;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk) fq_start = 1;
    @(negedge clk) fq_start = 0;
    wait (fq_done);
    wait (!q_run && !t_run);
    repeat (3) @(negedge clk);

    check(fq_slot_count == 20200, "FQ slot count");
    check(fq_emitted_total == fq_emitted[0] + fq_emitted[1] + fq_emitted[2] + fq_emitted[3], "FQ aggregate");
    for (int i = 0; i < N; i++)
      check(int'(fq_arrived[i]) - int'(fq_lost[i]) - int'(fq_emitted[i]) == int'(fq_occ[i]) - occ0[i],
            $sformatf("FQ stream %0d conservation", i));
    hsum = 0; fq_rd_stream = 3'(N); fq_rd_kind = HIST_GAP;
    for (int b = 0; b < 32; b++) begin fq_rd_addr = 9'(b); #1; hsum += 64'(fq_rd_data); end
    check(hsum == longint'(fq_emitted_total), "FQ aggregate gap histogram total");

    check(q_arrivals_total - q_losses_total - q_departures_total == 32'(q_occupation), "queue conservation");
    hsum = 0;
    for (int b = 0; b < 256; b++) begin q_occ_rd_addr = 8'(b); #1; hsum += 64'(q_occ_rd_data); end
    check(hsum == 30000, "queue occupation samples");
    check(q_losses_total == 32'(n_q_loss) && q_idle_slots == 32'(n_q_idle), "queue counters");
    check(q_hist_count == 9'd256, "history filled");

    check(t_arrivals_total - t_losses_total - t_departures_total == 32'(t_count), "tagged conservation");
    check(t_departures_total == 32'(n_t_dep), "tagged departures");
    hsum = 0;
    for (int b = 0; b < 64; b++) begin t_delay_rd_addr = 6'(b); #1; hsum += 64'(t_delay_rd_data); end
    check(hsum == longint'(t_departures_total), "tagged delay histogram total");

    $display("FQ: losses %0d idle %0d ties %0d restart-from-v %0d follow %0d measure-on %0d",
             n_fq_loss, n_fq_idle, n_fq_tie, n_fq_restart_v, n_fq_follow, n_fq_measure_on);
    $display("queue: losses %0d idle %0d arrivals by source %0d %0d %0d",
             n_q_loss, n_q_idle, n_q_src[0], n_q_src[1], n_q_src[2]);
    $display("tagged: losses %0d multi-arrival slots %0d departures %0d", n_t_loss, n_t_multi, n_t_dep);
    check(n_fq_loss > 0, "FQ overflow happened");
    check(n_fq_idle > 0, "FQ idle server slot happened");
    check(n_fq_tie > 0, "FQ round-robin tie break happened");
    check(n_fq_restart_v > 0, "FQ mark restarted from virtual time");
    check(n_fq_follow > 0, "FQ backlogged mark follow-on happened");
    check(n_fq_measure_on == 1, "FQ warm-up to measurement switch");
    check(n_q_loss > 0 && n_q_idle > 0, "queue loss and idle happened");
    check(n_q_src[0] > 0 && n_q_src[1] > 0 && n_q_src[2] > 0, "all three sources used");
    check(n_t_loss > 0 && n_t_multi > 0, "tagged loss and multiple arrivals happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
