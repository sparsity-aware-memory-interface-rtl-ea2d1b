// tb_va_patch_fetcher -- self-checking test of the VA-patch row fetcher.
// Four lanes with imbalance FIFOs of depth 4 are modelled by queues of received
// row numbers. Lanes drain at different random rates and lane 0 stops draining
// for a while, so its FIFO fills, misses rows and must have them read again.
// Checks: every lane receives rows 0..rows-1 exactly once and in order, no FIFO
// overflows, misses and re-accesses happen in the imbalanced phase, and in a
// balanced phase (all lanes draining every cycle) every row is read exactly once,
// one per cycle.
module tb_va_patch_fetcher;
  localparam int unsigned N = 4, B = 4, AW = 8;
  localparam int unsigned CW = $clog2(B + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] rows = '0;
  logic [N-1:0][CW-1:0] lane_count;
  logic rd_en, reaccess, miss, finished;
  logic [AW-1:0] rd_addr, addr_d = '0;
  logic [N-1:0] take;
  int q[N][$];
  int next_exp[N];
  int checks = 0, failures = 0, reads = 0, reacc = 0, misses = 0;
  int drain_pct[N] = '{100, 100, 100, 100};
  bit hold0 = 0;

  va_patch_fetcher #(.N(N), .B(B), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always_comb for (int i = 0; i < N; i++) lane_count[i] = CW'(q[i].size());

  always @(posedge clk) if (rst_n && !start) begin
    addr_d <= rd_addr;
    if (rd_en) reads++;
    if (reaccess) reacc++;
    if (miss) misses++;
    for (int i = 0; i < N; i++) begin
      if (q[i].size() > 0 && !(hold0 && i == 0) && $urandom_range(1, 100) <= drain_pct[i])
        void'(q[i].pop_front());
      if (take[i]) begin
        chk(int'(addr_d) == next_exp[i], "lane receives rows in order");
        next_exp[i]++;
        q[i].push_back(int'(addr_d));
        chk(q[i].size() <= B, "imbalance FIFO overflow");
      end
    end
  end

  task automatic run(int n);
    @(negedge clk); rows = AW'(n); start = 1;
    for (int i = 0; i < N; i++) begin q[i].delete(); next_exp[i] = 0; end
    @(negedge clk); start = 0; reads = 0; reacc = 0; misses = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // balanced: one read per row, one row per cycle
    run(40); t0 = 0;
    while (!finished) begin @(negedge clk); t0++; end
    chk(reads == 40 && reacc == 0, "balanced phase reads each row once");
    chk(t0 == 41, "balanced phase one row per cycle");
    for (int i = 0; i < N; i++) chk(next_exp[i] == 40, "balanced phase all rows received");
    $display("balanced: 40 rows, %0d reads, %0d cycles", reads, t0);
    // imbalanced
    drain_pct = '{70, 90, 30, 100};
    run(100);
    repeat (20) @(posedge clk);
    hold0 = 1;
    repeat (30) @(posedge clk);
    hold0 = 0;
    while (!finished) @(negedge clk);
    for (int i = 0; i < N; i++) chk(next_exp[i] == 100, "imbalanced phase all rows received");
    chk(misses > 0, "no row was missed");
    chk(reacc > 0, "no row was re-accessed");
    $display("imbalanced: 100 rows, %0d reads, %0d re-accesses, %0d misses", reads, reacc, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
