// tb_fq_mark_table: random slot events (service of a stream, queue becoming
// empty or non-empty, virtual time moving) checked against the two mark
// update rules, with different increments per stream.
module tb_fq_mark_table;
  import emu_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, commit = 0;
  logic [N-1:0] nonempty = '0, nonempty_next;
  logic serve_valid;
  logic [1:0] serve_idx;
  logic [31:0] v_new;
  logic [N-1:0][15:0] inc;
  logic [N-1:0][31:0] mark;
  int checks = 0, failures = 0;
  logic [31:0] m [N];
  int n_follow = 0, n_start_v = 0, n_start_own = 0;

  fq_mark_table #(.N(N), .INC_W(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [31:0] v = 0;
    inc = {16'd8, 16'd4, 16'd4, 16'd2};
    for (int i = 0; i < N; i++) m[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      commit = $urandom_range(0, 2) == 0;
      serve_valid = (nonempty != 0) && $urandom_range(0, 3) != 0;
      do serve_idx = 2'($urandom); while (serve_valid && !nonempty[serve_idx]);
      for (int i = 0; i < N; i++) nonempty_next[i] = 1'($urandom_range(0, 1));
      if (serve_valid) v_new = mark[serve_idx];
      else             v_new = v + 32'($urandom_range(0, 6));
      if (commit) begin
        for (int i = 0; i < N; i++) begin
          automatic bit served = serve_valid && serve_idx == 2'(i);
          if (served && nonempty_next[i]) begin
            m[i] = m[i] + 32'(inc[i]); n_follow++;
          end else if (!served && !nonempty[i] && nonempty_next[i]) begin
            if ($signed(m[i] - v_new) < 0) begin m[i] = v_new + 32'(inc[i]); n_start_v++; end
            else begin m[i] = m[i] + 32'(inc[i]); n_start_own++; end
          end
        end
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (mark[i] !== m[i]) begin
          failures++;
          if (failures < 6) $display("t=%0d stream %0d mark %0d want %0d", t, i, mark[i], m[i]);
        end
      end
      if (commit) begin nonempty = nonempty_next; v = v_new; end
    end
    checks++;
    if (n_follow == 0 || n_start_v == 0 || n_start_own == 0) begin
      failures++; $display("rules not all exercised %0d %0d %0d", n_follow, n_start_v, n_start_own);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
