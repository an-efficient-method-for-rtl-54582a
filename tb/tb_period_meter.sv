// tb_period_meter: a random cell stream (with idle clocks between slots)
// against a model of inter-cell times and burst lengths.
module tb_period_meter;
  logic clk = 0, rst_n = 0, clr = 0, slot = 0, cell_i = 0;
  logic gap_valid, burst_valid;
  logic [15:0] gap, burst;
  int checks = 0, failures = 0;
  int last_cell = -1, run = 0, sl = 0, n_gap = 0, n_burst = 0;

  period_meter #(.VW(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30000; t++) begin
      bit egv, ebv;
      int eg, eb;
      @(negedge clk);
      slot = $urandom_range(0, 2) != 0;
      cell_i = $urandom_range(0, 9) < 4;
      #1;
      egv = slot && cell_i && last_cell >= 0;
      eg  = sl - last_cell;
      ebv = slot && !cell_i && run > 0;
      eb  = run;
      checks++;
      if (gap_valid !== egv || (egv && int'(gap) != eg) || burst_valid !== ebv || (ebv && int'(burst) != eb)) begin
        failures++;
        if (failures < 6) $display("t=%0d gap %0b/%0d want %0b/%0d burst %0b/%0d want %0b/%0d",
                                   t, gap_valid, gap, egv, eg, burst_valid, burst, ebv, eb);
      end
      if (slot) begin
        n_gap += egv; n_burst += ebv;
        if (cell_i) begin last_cell = sl; run++; end
        else run = 0;
        sl++;
      end
    end
    checks++;
    if (n_gap < 100 || n_burst < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
