// tb_fq_server: random queue states and marks (many ties, some near the
// wrap-around of the mark registers) presented at slot boundaries; the
// served stream, the virtual time and the round-robin pointer are compared
// with a reference, and the slot must last exactly 3 clocks.
module tb_fq_server;
  import emu_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, run = 0;
  logic [N-1:0] nonempty;
  logic [N-1:0][31:0] mark;
  logic [1:0] phase, serve_idx, last;
  logic slot_end, serve_valid;
  logic [N-1:0] serve_onehot;
  logic [31:0] vtime, vtime_next;
  int checks = 0, failures = 0;
  int m_last = N - 1, ties = 0, idle = 0, cyc = 0, last_end = -1;
  logic [31:0] m_v = 0;

  fq_server #(.N(N), .SLOT_CYCLES(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  function automatic bit earlier(logic [31:0] a, logic [31:0] b);
    logic [31:0] d = a - b;
    return d[31];
  endfunction

  initial begin
    logic [31:0] base;
    repeat (2) @(negedge clk);
    rst_n = 1;
    nonempty = '0; mark = '0;
    run = 1;
    for (int s = 0; s < 4000; s++) begin
      int best, nties;
      base = (s % 3 == 0) ? 32'hFFFF_FFFE : 32'(s * 7);
      for (int i = 0; i < N; i++) begin
        nonempty[i] = $urandom_range(0, 9) < 7;
        mark[i] = base + 32'($urandom_range(0, 2));
      end
      // reference decision
      best = -1; nties = 0;
      for (int r = 0; r < N; r++) begin
        automatic int i = (m_last + 1 + r) % N;
        if (nonempty[i]) begin
          if (best < 0 || earlier(mark[i], mark[best])) best = i;
        end
      end
      for (int i = 0; i < N; i++) if (best >= 0 && nonempty[i] && mark[i] == mark[best]) nties++;
      if (nties > 1) ties++;
      while (!slot_end) @(negedge clk);
      if (last_end >= 0) check(cyc - last_end == 3, $sformatf("slot length %0d", cyc - last_end));
      last_end = cyc;
      check(serve_valid == (best >= 0), $sformatf("slot %0d valid %0b", s, serve_valid));
      if (best >= 0) begin
        check(int'(serve_idx) == best && serve_onehot == (4'b1 << best),
              $sformatf("slot %0d served %0d want %0d", s, serve_idx, best));
        check(vtime_next == mark[best], "vtime_next");
        m_v = mark[best];
        m_last = best;
      end else begin
        idle++;
        check(vtime_next == vtime, "vtime holds when idle");
      end
      @(negedge clk);
      check(vtime == m_v && int'(last) == m_last, "vtime/last registered");
    end
    check(ties > 100 && idle > 5, $sformatf("ties %0d idle %0d", ties, idle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
