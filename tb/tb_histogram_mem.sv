// tb_histogram_mem: waits for the clearing sweep, records random values
// (some beyond the last bin, one event per clock), reads every bin back
// against a model, then clears again and checks the memory is zero.
module tb_histogram_mem;
  localparam int BINS = 20;
  logic clk = 0, rst_n = 0, clr = 0, valid = 0;
  logic [7:0] value;
  logic ready;
  logic [4:0] rd_addr;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  int m [BINS];

  histogram_mem #(.BINS(BINS), .VW(8), .CW(32)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < BINS; b++) begin
      rd_addr = 5'(b);
      #1;
      checks++;
      if (rd_data !== 32'(m[b])) begin
        failures++;
        $display("bin %0d: %0d want %0d", b, rd_data, m[b]);
      end
    end
  endtask

  initial begin
    for (int b = 0; b < BINS; b++) m[b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (ready);
    @(negedge clk);
    check_all();
    for (int t = 0; t < 3000; t++) begin
      valid = $urandom_range(0, 3) != 0;
      value = 8'($urandom_range(0, 30));
      if (valid) m[(int'(value) >= BINS - 1) ? BINS - 1 : int'(value)]++;
      @(negedge clk);
    end
    valid = 0;
    @(negedge clk);
    check_all();
    clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (ready) begin failures++; $display("ready high during clear"); end
    wait (ready);
    @(negedge clk);
    for (int b = 0; b < BINS; b++) m[b] = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
