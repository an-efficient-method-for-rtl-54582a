// tb_packet_queue: random multi-arrival slots and service requests against
// a FIFO model; checks departure tags and order, losses at a full buffer,
// the stored count, and that a slot lasts NIN + 1 clocks.
module tb_packet_queue;
  localparam int NIN = 3, DEPTH = 6;
  logic clk = 0, rst_n = 0, run = 0;
  logic slot_start, service = 0, dep_valid, loss;
  logic [NIN-1:0] arr_valid = '0;
  logic [NIN-1:0][15:0] arr_tag;
  logic [15:0] dep_tag;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [15:0] fifo [$];
  int n_loss_model = 0, n_loss_seen = 0, n_dep = 0, last_start = -1, cyc = 0;
  bit exp_dep; logic [15:0] exp_tag;

  packet_queue #(.NIN(NIN), .DEPTH(DEPTH), .TAG_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && loss) n_loss_seen++;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run = 1;
    for (int s = 0; s < 3000; s++) begin
      // phase 0 of slot s
      while (!slot_start) @(negedge clk);
      if (last_start >= 0) check(cyc - last_start == NIN + 1, "slot length");
      last_start = cyc;
      for (int i = 0; i < NIN; i++) begin
        arr_valid[i] = ($urandom_range(0, 9) < ((s / 500) % 2 == 0 ? 2 : 5));
        arr_tag[i] = 16'(s * 4 + i);
      end
      service = $urandom_range(0, 9) < 6;
      check(int'(count) == fifo.size(), $sformatf("count %0d want %0d", count, fifo.size()));
      exp_dep = service && fifo.size() > 0;
      if (exp_dep) exp_tag = fifo.pop_front();
      for (int i = 0; i < NIN; i++)
        if (arr_valid[i]) begin
          if (fifo.size() < DEPTH) fifo.push_back(arr_tag[i]);
          else n_loss_model++;
        end
      @(negedge clk);
      arr_valid = 'x; service = 'x;
      check(dep_valid == exp_dep && (!exp_dep || dep_tag == exp_tag),
            $sformatf("slot %0d dep %0b/%0b tag %0d/%0d", s, dep_valid, exp_dep, dep_tag, exp_tag));
      n_dep += exp_dep;
    end
    @(negedge clk);
    check(n_loss_model > 0, "losses exercised");
    check(n_loss_seen == n_loss_model, $sformatf("losses %0d want %0d", n_loss_seen, n_loss_model));
    $display("departures %0d losses %0d", n_dep, n_loss_model);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
