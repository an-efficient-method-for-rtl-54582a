// tb_mmbp_source: a 3-state chain with cumulative transition thresholds;
// state and emission are compared with a reference model every clock, and
// every state must be visited.
module tb_mmbp_source;
  localparam int NS = 3;
  logic clk = 0, rst_n = 0, slot = 0;
  logic [15:0] w_state, w_emit;
  logic [NS-1:0][NS-2:0][15:0] trans_thr;
  logic [NS-1:0][15:0] emit_thr;
  logic [NS-1:0] emit_en;
  logic emit;
  logic [1:0] state;
  int checks = 0, failures = 0;
  int m_state = 0;
  int visits [NS];

  mmbp_source #(.W(16), .NS(NS)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int next_of(int s, logic [15:0] w);
    for (int j = 0; j < NS - 1; j++) if (w <= trans_thr[s][j]) return j;
    return NS - 1;
  endfunction

  initial begin
    trans_thr[0] = {16'd65000, 16'd60000};   // [1] then [0]: stay 0 mostly
    trans_thr[1] = {16'd50000, 16'd10000};
    trans_thr[2] = {16'd20000, 16'd15000};
    emit_thr = {16'd65535, 16'd30000, 16'd100};
    emit_en  = 3'b110;
    for (int s = 0; s < NS; s++) visits[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit e;
      @(negedge clk);
      slot = ($urandom_range(0, 4) != 0);
      w_state = 16'($urandom); w_emit = 16'($urandom);
      #1;
      e = emit_en[m_state] && (w_emit <= emit_thr[m_state]);
      checks++;
      if (int'(state) != m_state || emit !== e) begin
        failures++;
        if (failures < 5) $display("t=%0d state=%0d/%0d emit=%0b/%0b", t, state, m_state, emit, e);
      end
      if (slot) begin
        visits[m_state]++;
        m_state = next_of(m_state, w_state);
      end
    end
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
