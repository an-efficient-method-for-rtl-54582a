// tb_history_mem: writes more values than the depth and checks that the
// memory holds the last DEPTH values in circular order, with the count
// saturating at DEPTH, and that clr empties it.
module tb_history_mem;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  logic [15:0] value, rd_data;
  logic [2:0] wr_ptr, rd_addr;
  logic [3:0] count;
  int checks = 0, failures = 0;
  logic [15:0] written [$];

  history_mem #(.DEPTH(DEPTH), .VW(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      valid = 1; value = 16'($urandom); written.push_back(value);
      @(negedge clk);
    end
    valid = 0;
    check(count == 4'd5, $sformatf("count %0d after 5", count));
    for (int i = 0; i < 5; i++) begin
      rd_addr = 3'(i); #1;
      check(rd_data == written[i], $sformatf("entry %0d", i));
    end
    for (int t = 0; t < 14; t++) begin
      valid = 1'($urandom_range(0, 1)); value = 16'($urandom);
      if (valid) written.push_back(value);
      @(negedge clk);
    end
    valid = 1;
    while (written.size() < 19) begin value = 16'($urandom); written.push_back(value); @(negedge clk); end
    valid = 0;
    check(count == 4'd8, $sformatf("count %0d saturates", count));
    check(int'(wr_ptr) == 19 % DEPTH, $sformatf("wr_ptr %0d", wr_ptr));
    // the oldest stored value is at wr_ptr
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = 3'((int'(wr_ptr) + i) % DEPTH); #1;
      check(rd_data == written[19 - DEPTH + i], $sformatf("ring entry %0d", i));
    end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    check(count == 0 && wr_ptr == 0, $sformatf("clr empties: count %0d wr_ptr %0d", count, wr_ptr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
