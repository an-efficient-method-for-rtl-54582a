// tb_fq_emulator: three experiments on the Fair Queueing emulator, each
// after a reset.
//  1. Saturation, equal reservations (phi = 1/4, inc = 4), capacity 5: the
//     server is never idle, the order of service is exactly round robin,
//     queues overflow, and each stream gets a quarter of the slots.
//  2. Saturation, unequal reservations (inc = 2, 4, 4, 8): service shares
//     proportional to phi = 1/inc, i.e. 4/9, 2/9, 2/9, 1/9.
//  3. The reference load: four streams with alpha = 0.225 (theta = 14745,
//     rho = 0.9), capacity 300: arrival rates, cell conservation per queue
//     over the window, histogram totals, and virtual time never going back.
// Every experiment also checks that a slot lasts 3 clocks.
module tb_fq_emulator;
  import emu_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] seed = 32'h5555_5555;
  logic [N-1:0][15:0] theta, inc;
  logic [N-1:0][8:0] capacity, occ;
  logic [31:0] warmup_slots, measure_slots, slot_count, emitted_total, vtime, rd_data;
  logic [N-1:0][31:0] emitted, arrived, lost;
  logic running, measuring, done;
  logic [2:0] rd_stream;
  hist_kind_e rd_kind;
  logic [8:0] rd_addr;
  int checks = 0, failures = 0;
  int cyc = 0, last_end = -1, prev_srv = -1, rr_breaks = 0, v_back = 0, bad_len = 0;
  int occ0 [N];

  fq_emulator #(.N(N), .MAX_CAP(300)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (dut.slot_end) begin
      if (last_end >= 0 && cyc - last_end != 3) bad_len++;
      last_end = cyc;
      if (dut.serve_valid) begin
        if (prev_srv >= 0 && int'(dut.serve_idx) != (prev_srv + 1) % N) rr_breaks++;
        prev_srv = int'(dut.serve_idx);
      end
      if (mark_before(dut.vtime_next, vtime)) v_back++;
      if (measuring && slot_count == warmup_slots)
        for (int i = 0; i < N; i++) occ0[i] = int'(occ[i]);
    end
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic experiment(input int warm, input int meas);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_end = -1; prev_srv = -1; rr_breaks = 0; v_back = 0; bad_len = 0;
    warmup_slots = 32'(warm); measure_slots = 32'(meas);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    check(slot_count == 32'(warm + meas), "slot count at done");
    check(bad_len == 0, "slot length 3 clocks");
    check(v_back == 0, "virtual time never decreases");
  endtask

  longint hsum;
  task automatic sum_hist(input int stream, input hist_kind_e kind, input int nbins);
    hsum = 0;
    rd_stream = 3'(stream); rd_kind = kind;
    for (int b = 0; b < nbins; b++) begin rd_addr = 9'(b); #1; hsum += 64'(rd_data); end
  endtask

  initial begin
    // 1. saturation, equal reservations
    theta = {4{16'hFFFF}}; inc = {4{16'd4}}; capacity = {4{9'd5}};
    experiment(20, 2000);
    check(emitted_total == 32'd2000, $sformatf("busy server: %0d cells", emitted_total));
    check(rr_breaks == 0, $sformatf("round robin broken %0d times", rr_breaks));
    for (int i = 0; i < N; i++) begin
      check(emitted[i] == 32'd500, $sformatf("stream %0d got %0d", i, emitted[i]));
      check(lost[i] > 0 && arrived[i] == 32'd2000, "overflow losses");
      check(occ[i] == 9'd5 || occ[i] == 9'd4, $sformatf("stream %0d full at capacity 5: occ %0d", i, occ[i]));
    end

    // 2. saturation, unequal reservations
    inc = {16'd8, 16'd4, 16'd4, 16'd2};
    experiment(20, 9000);
    check(emitted[0] > 3950 && emitted[0] < 4050, $sformatf("phi 1/2 share %0d of 9000", emitted[0]));
    check(emitted[1] > 1950 && emitted[1] < 2050, $sformatf("phi 1/4 share %0d", emitted[1]));
    check(emitted[2] > 1950 && emitted[2] < 2050, $sformatf("phi 1/4 share %0d", emitted[2]));
    check(emitted[3] >  950 && emitted[3] < 1050, $sformatf("phi 1/8 share %0d", emitted[3]));

    // 3. reference load rho = 0.9
    theta = {4{16'd14745}}; inc = {4{16'd4}}; capacity = {4{9'd300}};
    experiment(1000, 40000);
    begin
      automatic longint tot_arr = 0;
      for (int i = 0; i < N; i++) begin
        automatic real r = real'(arrived[i]) / 40000.0;
        tot_arr += 64'(arrived[i]);
        check(r > 0.215 && r < 0.235, $sformatf("stream %0d arrival rate %f", i, r));
        check(int'(arrived[i]) - int'(lost[i]) - int'(emitted[i]) == int'(occ[i]) - occ0[i],
              $sformatf("stream %0d conservation", i));
        sum_hist(i, HIST_OCC, 301);
        check(hsum == 40000, "occupation samples");
        sum_hist(i, HIST_GAP, 32);
        check(hsum == longint'(emitted[i]), "stream gap count");
      end
      check(emitted_total == emitted[0] + emitted[1] + emitted[2] + emitted[3], "aggregate count");
      sum_hist(N, HIST_GAP, 32);
      check(hsum == longint'(emitted_total), "aggregate gap count");
      sum_hist(N, HIST_BURST, 32);
      check(hsum > 0, "bursts recorded");
      $display("rho 0.9: arrivals %0d emitted %0d", tot_arr, emitted_total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
