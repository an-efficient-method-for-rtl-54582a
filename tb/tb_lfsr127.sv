// tb_lfsr127: checks the output sequence of lfsr127 against the recurrence
// a[k+127] = a[k+1] xor a[k], computed here from the seed, for two seeds, and
// checks that an all-zero seed does not lock the register.
module tb_lfsr127;
  logic clk = 0, rst_n = 0, load = 0, en = 0;
  logic [126:0] seed;
  logic bit_o;
  int checks = 0, failures = 0;
  bit seq [0:2199];

  lfsr127 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seed(input logic [126:0] s);
    for (int k = 0; k < 127; k++) seq[k] = s[k];
    for (int k = 0; k < 2200 - 127; k++) seq[k+127] = seq[k+1] ^ seq[k];
    seed = s;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0; en = 1;
    for (int k = 0; k < 2000; k++) begin
      checks++;
      if (bit_o !== seq[k]) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: got %0b want %0b", k, bit_o, seq[k]);
      end
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_seed(127'({4{32'h5555_5555}} >> 1));
    run_seed(127'h1234_5678_9abc_def0_0fed_cba9_8765_4321);
    // all-zero seed must be replaced by a non-zero state
    seed = '0;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0; en = 1;
    begin
      automatic int ones = 0;
      repeat (500) begin @(negedge clk); ones += bit_o; end
      checks++;
      if (ones == 0) begin failures++; $display("zero seed locked the register"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
