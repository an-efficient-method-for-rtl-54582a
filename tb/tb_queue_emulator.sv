// tb_queue_emulator: runs the single-queue emulator with each of the three
// sources (capacity 5, seed 0x55555555). A model fed with the observed
// arrival and service bits checks occupation, losses and departures every
// slot; at the end the counters, the occupation histogram and the history
// of inter-departure times are compared with the model, and the measured
// arrival rate of each source with its theoretical rate.
module tb_queue_emulator;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, run = 0;
  logic [31:0] seed = 32'h5555_5555;
  src_kind_e src_sel = SRC_BERNOULLI;
  logic [15:0] theta_arr = 16'd32767, onoff_p_on = 16'd6553, onoff_p_off = 16'd19660, onoff_theta = 16'd52428;
  logic [1:0][0:0][15:0] mmbp_trans_thr;
  logic [1:0][15:0] mmbp_emit_thr;
  logic [1:0] mmbp_emit_en = 2'b11;
  logic [15:0] theta_srv = 16'd39321;
  logic [7:0] capacity = 8'd5;
  logic arrival, service, loss, departure, ready;
  logic [7:0] occupation, occ_rd_addr, hist_wr_ptr, hist_rd_addr;
  logic [31:0] losses_total, arrivals_total, departures_total, idle_slots, occ_rd_data;
  logic [8:0] hist_count;
  logic [15:0] hist_rd_data;
  int checks = 0, failures = 0;
  int m_occ = 0, n_loss = 0, n_arr = 0, n_dep = 0, n_idle = 0, slots = 0, last_dep = -1;
  int ho [256];
  int gaps [$];

  queue_emulator #(.OCC_W(8), .HIST_DEPTH(256)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  task automatic run_slots(input int n, input real rate, input string name);
    int a0 = n_arr;
    real got, sd;
    run = 1;
    for (int t = 0; t < n; t++) begin
      int sum, kept, dep;
      #1;
      sum = m_occ + arrival;
      kept = (sum > capacity) ? int'(capacity) : sum;
      dep = (kept > 0) ? int'(service) : 0;
      check(int'(occupation) == m_occ && loss == (sum > kept) && departure == (dep != 0),
            $sformatf("%s slot %0d occ %0d/%0d", name, t, occupation, m_occ));
      ho[m_occ]++;
      if (m_occ == 0) n_idle++;
      n_arr += arrival; n_loss += (sum - kept); n_dep += dep;
      if (dep != 0) begin
        if (last_dep >= 0) gaps.push_back(slots - last_dep);
        last_dep = slots;
      end
      m_occ = kept - dep;
      slots++;
      @(negedge clk);
    end
    run = 0;
    got = real'(n_arr - a0) / n;
    sd = 0.05 * rate + 0.01;
    $display("%s arrival rate %f (theory %f)", name, got, rate);
    check(got > rate - sd && got < rate + sd, $sformatf("%s rate %f want %f", name, got, rate));
  endtask

  initial begin
    mmbp_trans_thr[0][0] = 16'd58981;   // state 0 stays with p 0.9
    mmbp_trans_thr[1][0] = 16'd6553;    // state 1 returns to 0 with p 0.1
    mmbp_emit_thr = {16'd58981, 16'd6553};
    foreach (ho[i]) ho[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    wait (ready);
    @(negedge clk);
    src_sel = SRC_BERNOULLI; run_slots(20000, 0.5, "bernoulli");
    src_sel = SRC_ONOFF;     run_slots(40000, 0.2, "on/off");
    src_sel = SRC_MMBP;      run_slots(40000, 0.5, "mmbp");
    check(losses_total == 32'(n_loss) && n_loss > 0, $sformatf("losses %0d want %0d", losses_total, n_loss));
    check(arrivals_total == 32'(n_arr), "arrivals total");
    check(departures_total == 32'(n_dep), "departures total");
    check(idle_slots == 32'(n_idle) && n_idle > 0, $sformatf("idle %0d want %0d", idle_slots, n_idle));
    for (int b = 0; b < 256; b++) begin
      occ_rd_addr = 8'(b); #1;
      check(occ_rd_data == 32'(ho[b]), $sformatf("occ bin %0d: %0d want %0d", b, occ_rd_data, ho[b]));
    end
    check(hist_count == 9'd256, "history full");
    for (int i = 0; i < 256; i++) begin
      hist_rd_addr = 8'(int'(hist_wr_ptr) + i); #1;
      check(int'(hist_rd_data) == gaps[gaps.size() - 256 + i], $sformatf("history %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
