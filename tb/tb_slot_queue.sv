// tb_slot_queue: random multiple arrivals and services against a reference
// of the + / min / -1 / max(.,0) chain; also replays a hand-made sequence
// with capacity 5 in which a cell is lost at a full buffer although a cell
// leaves in the same slot.
module tb_slot_queue;
  logic clk = 0, rst_n = 0, slot = 0;
  logic [1:0] arrivals, service, losses, departures;
  logic [8:0] capacity, occ, occ_next;
  int checks = 0, failures = 0;
  int m_occ = 0, n_loss = 0, n_full = 0;

  slot_queue #(.OCC_W(9), .ARR_W(2), .SRV_W(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int a, input int s, input int cap, input bit sl);
    int sum, kept, lost, dep, nxt;
    @(negedge clk);
    arrivals = 2'(a); service = 2'(s); capacity = 9'(cap); slot = sl;
    #1;
    sum = m_occ + a;
    kept = (sum > cap) ? cap : sum;
    lost = sum - kept;
    dep = (kept > s) ? s : kept;
    nxt = kept - dep;
    checks++;
    if (int'(occ) != m_occ || int'(losses) != lost || int'(departures) != dep || int'(occ_next) != nxt) begin
      failures++;
      if (failures < 6) $display("occ %0d/%0d loss %0d/%0d dep %0d/%0d", occ, m_occ, losses, lost, departures, dep);
    end
    if (sl) begin
      m_occ = nxt;
      n_loss += lost;
      if (kept == cap) n_full++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // hand-made: fill to 5, then arrival + service at full buffer
    repeat (5) step(1, 0, 5, 1);
    step(1, 1, 5, 1);              // lost, one leaves -> 4
    @(posedge clk); #1;
    checks++;
    if (occ !== 9'd4) begin failures++; $display("expected 4 after loss, got %0d", occ); end
    step(3, 0, 5, 0);              // not a slot edge: must hold
    step(0, 3, 5, 1);              // drain 3
    for (int t = 0; t < 20000; t++)
      step($urandom_range(0, 3), $urandom_range(0, 3), (t < 10000) ? 7 : 300, ($urandom_range(0, 5) != 0));
    checks++;
    if (n_loss == 0 || n_full == 0) begin failures++; $display("no loss exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
