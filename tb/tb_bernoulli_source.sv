// tb_bernoulli_source: checks emit == (w <= theta) on boundary cases and on
// random pairs.
module tb_bernoulli_source;
  logic [15:0] w, theta;
  logic emit;
  int checks = 0, failures = 0;
  logic clk = 0;

  bernoulli_source #(.W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [15:0] a, input logic [15:0] t);
    bit expect_emit;
    w = a; theta = t;
    #1;
    expect_emit = (int'(a) <= int'(t));
    checks++;
    if (emit !== expect_emit) begin
      failures++;
      $display("w=%0d theta=%0d emit=%0b", a, t, emit);
    end
  endtask

  initial begin
    try(16'd0, 16'd0);
    try(16'd1, 16'd0);
    try(16'd52429, 16'd52429);
    try(16'd52430, 16'd52429);
    try(16'hFFFF, 16'hFFFF);
    try(16'hFFFF, 16'hFFFE);
    for (int i = 0; i < 2000; i++) try(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
