// tb_tagged_queue_emulator: 4 sources into a queue of 8 cells, first under
// light and then under overload. A FIFO model fed with the arrival and
// service decisions of each slot predicts every departure's source and
// delay, the losses, and finally the delay histogram.
module tb_tagged_queue_emulator;
  import emu_pkg::*;
  localparam int NIN = 4, DEPTH = 8;
  logic clk = 0, rst_n = 0, load = 0, run = 0;
  logic [31:0] seed = 32'h1234_5678;
  logic [NIN-1:0][15:0] theta;
  logic [15:0] theta_srv = 16'd58981;
  logic dep_valid, ready;
  logic [1:0] dep_source;
  logic [23:0] dep_delay;
  logic [3:0] count;
  logic [31:0] arrivals_total, departures_total, losses_total, delay_rd_data;
  logic [5:0] delay_rd_addr;
  int checks = 0, failures = 0;
  int fifo_src [$], fifo_ts [$];
  int hd [64];
  int s = 0, n_loss = 0, n_arr = 0, n_dep = 0, multi = 0;

  tagged_queue_emulator #(.NIN(NIN), .DEPTH(DEPTH), .DELAY_BINS(64)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  initial begin
    foreach (hd[i]) hd[i] = 0;
    theta = {4{16'd6553}};
    repeat (2) @(negedge clk);
    rst_n = 1;
    load = 1; @(negedge clk); load = 0;
    wait (ready);
    @(negedge clk);
    run = 1;
    for (int k = 0; k < 20000; k++) begin
      automatic bit exp_dep = 0;
      automatic int es = 0, ed = 0, na = 0;
      if (k == 10000) theta = {4{16'd21845}};
      #1;
      while (!dut.slot_start) begin @(negedge clk); #1; end
      check(int'(count) == fifo_src.size(), $sformatf("count %0d want %0d", count, fifo_src.size()));
      if (dut.srv && fifo_src.size() > 0) begin
        exp_dep = 1;
        es = fifo_src.pop_front();
        ed = s - fifo_ts.pop_front();
      end
      for (int i = 0; i < NIN; i++) if (dut.arr[i]) begin
        na++;
        if (fifo_src.size() < DEPTH) begin fifo_src.push_back(i); fifo_ts.push_back(s); end
        else n_loss++;
      end
      if (na > 1) multi++;
      n_arr += na;
      @(negedge clk);
      check(dep_valid == exp_dep, $sformatf("slot %0d dep_valid %0b want %0b", s, dep_valid, exp_dep));
      if (exp_dep) begin
        check(int'(dep_source) == es && int'(dep_delay) == ed,
              $sformatf("slot %0d source %0d/%0d delay %0d/%0d", s, dep_source, es, dep_delay, ed));
        hd[(ed >= 63) ? 63 : ed]++;
        n_dep++;
      end
      s++;
    end
    // let the last slot finish, then stop at the start of the next one
    #1;
    while (!dut.slot_start) begin @(negedge clk); #1; end
    run = 0;
    repeat (2) @(negedge clk);
    check(arrivals_total == 32'(n_arr), $sformatf("arrivals %0d want %0d", arrivals_total, n_arr));
    check(departures_total == 32'(n_dep), "departures");
    check(losses_total == 32'(n_loss) && n_loss > 0, $sformatf("losses %0d want %0d", losses_total, n_loss));
    check(multi > 0, "several arrivals in one slot");
    for (int b = 0; b < 64; b++) begin
      delay_rd_addr = 6'(b); #1;
      check(delay_rd_data == 32'(hd[b]), $sformatf("delay bin %0d: %0d want %0d", b, delay_rd_data, hd[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
