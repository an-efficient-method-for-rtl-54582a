// tb_onoff_source: drives random words and compares state and emission with
// a reference model of the On/Off chain, slot by slot, including slots in
// which the state must hold.
module tb_onoff_source;
  logic clk = 0, rst_n = 0, slot = 0;
  logic [15:0] w_state, w_emit, p_on, p_off, theta;
  logic emit, on;
  int checks = 0, failures = 0;
  bit m_on = 0;
  int n_on = 0, n_emit = 0;

  onoff_source #(.W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p_on = 16'd6553; p_off = 16'd19660; theta = 16'd39321;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      slot = ($urandom_range(0, 3) != 0);
      w_state = 16'($urandom); w_emit = 16'($urandom);
      #1;
      checks++;
      if (on !== m_on || emit !== (m_on && w_emit <= theta)) begin
        failures++;
        if (failures < 5) $display("t=%0d on=%0b/%0b emit=%0b", t, on, m_on, emit);
      end
      if (slot) begin
        n_on += m_on; n_emit += emit;
        m_on = m_on ? !(w_state <= p_off) : (w_state <= p_on);
      end
    end
    $display("On fraction %0d, emitted %0d", n_on, n_emit);
    // stationary On probability ~ 0.1/(0.1+0.3) = 0.25
    checks++;
    if (n_on < 15000 * 20 / 100 || n_on > 15000 * 30 / 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
