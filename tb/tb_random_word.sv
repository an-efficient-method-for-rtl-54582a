// tb_random_word: checks that every bit of the word follows the 1+X+X^127
// recurrence, that the 16 bits are not copies of each other, that two streams
// differ, and that the words look uniform (mean and a threshold fraction).
module tb_random_word;
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] seed = 32'h5555_5555;
  logic [15:0] w, w2;
  int checks = 0, failures = 0;
  logic [15:0] hist [0:19999];

  random_word #(.W(16), .STREAM(0)) dut  (.clk, .rst_n, .load, .seed, .en (1'b1), .w (w));
  random_word #(.W(16), .STREAM(1)) dut2 (.clk, .rst_n, .load, .seed, .en (1'b1), .w (w2));

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
    automatic longint sum = 0;
    automatic int below = 0, same = 0, bad_rec = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk) load = 1;
    @(negedge clk) load = 0;
    for (int t = 0; t < 20000; t++) begin
      hist[t] = w;
      sum += 64'(w);
      if (w <= 16'd52429) below++;
      if (w == w2) same++;
      @(negedge clk);
    end
    for (int t = 0; t + 127 < 20000; t++)
      if ((hist[t+127] ^ hist[t+1] ^ hist[t]) != 16'h0) bad_rec++;
    check(bad_rec == 0, $sformatf("recurrence broken %0d times", bad_rec));
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        automatic int eq = 0;
        for (int t = 0; t < 2000; t++) eq += (hist[t][a] == hist[t][b]);
        check(eq > 850 && eq < 1150, $sformatf("bits %0d and %0d agree %0d/2000", a, b, eq));
      end
    check(same < 20, $sformatf("two streams equal %0d times", same));
    check(sum / 20000 > 32767 - 1000 && sum / 20000 < 32767 + 1000,
          $sformatf("mean %0d", sum / 20000));
    // P(w <= 52429) = 52430/65536 = 0.800; 3 sigma over 20000 samples ~ 0.0085
    check(below > 15830 && below < 16170, $sformatf("fraction below theta %0d/20000", below));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
