// tb_event_counter: random enables, increments and clears against a model.
module tb_event_counter;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [3:0] inc;
  logic [31:0] count;
  int checks = 0, failures = 0;
  longint m = 0;

  event_counter #(.W(32), .INC_W(4)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (count !== 32'(m)) begin failures++; if (failures < 5) $display("count %0d want %0d", count, m); end
      clr = ($urandom_range(0, 999) == 0);
      en  = 1'($urandom_range(0, 1));
      inc = 4'($urandom);
      if (clr) m = 0; else if (en) m = m + 64'(inc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
