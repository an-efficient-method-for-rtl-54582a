// tb_fq_stream_stats: a random cell stream and occupation, with slots of 3
// clocks and a measurement window in the middle; the emitted count and the
// three histograms are read back against a model that measures only inside
// the window.
module tb_fq_stream_stats;
  import emu_pkg::*;
  logic clk = 0, rst_n = 0, slot = 0, measure = 0, cell_i = 0, ready;
  logic [8:0] occ = 0;
  logic [31:0] emitted, rd_data;
  hist_kind_e rd_kind;
  logic [8:0] rd_addr;
  int checks = 0, failures = 0;
  int hg [32], hb [32], ho [301];
  int n_emit = 0, last = -1, run = 0;

  fq_stream_stats #(.GAP_BINS(32), .OCC_BINS(301), .OCC_W(9), .HAS_OCC(1'b1)) dut (
    .clk, .rst_n, .clr (1'b0), .slot, .measure, .cell_i, .occ,
    .emitted, .ready, .rd_kind, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", msg); end
  endtask

  initial begin
    foreach (hg[i]) hg[i] = 0;
    foreach (hb[i]) hb[i] = 0;
    foreach (ho[i]) ho[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (ready);
    for (int s = 0; s < 12000; s++) begin
      automatic int c = (s / 1000) % 2 == 0 ? 3 : 8;
      repeat (2) @(negedge clk);
      measure = (s >= 1000 && s < 11000);
      cell_i = $urandom_range(0, 9) < c;
      occ = 9'($urandom_range(0, 40)) + ((s % 997 == 0) ? 9'd300 : 9'd0);
      if (occ > 300) occ = 300;
      slot = 1;
      if (measure) begin
        ho[occ]++;
        if (cell_i) n_emit++;
        if (cell_i && last >= 0) hg[(s - last >= 31) ? 31 : s - last]++;
        if (!cell_i && run > 0) hb[(run >= 31) ? 31 : run]++;
      end
      if (cell_i) begin last = s; run++; end else run = 0;
      @(negedge clk);
      slot = 0;
    end
    measure = 0;
    check(emitted == 32'(n_emit), $sformatf("emitted %0d want %0d", emitted, n_emit));
    rd_kind = HIST_GAP;
    for (int b = 0; b < 32; b++) begin rd_addr = 9'(b); #1; check(rd_data == 32'(hg[b]), $sformatf("gap bin %0d: %0d want %0d", b, rd_data, hg[b])); end
    rd_kind = HIST_BURST;
    for (int b = 0; b < 32; b++) begin rd_addr = 9'(b); #1; check(rd_data == 32'(hb[b]), $sformatf("burst bin %0d: %0d want %0d", b, rd_data, hb[b])); end
    rd_kind = HIST_OCC;
    for (int b = 0; b < 301; b++) begin rd_addr = 9'(b); #1; check(rd_data == 32'(ho[b]), $sformatf("occ bin %0d: %0d want %0d", b, rd_data, ho[b])); end
    check(ho[300] > 0 && hg[31] >= 0 && hb[2] > 0, "tails exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
