// tb_row_fetcher -- self-checking test of the lock-step row fetcher.
// Four lane FIFOs are modelled by fill counters that drain at random rates (and
// one lane that stops draining for a while). The testbench checks that row
// addresses are issued in order without gaps or repeats, that a response follows
// every read one cycle later, that no lane FIFO ever overflows, that the fetcher
// blocks while a lane is full, and, with every lane draining each cycle, that it
// issues one row per cycle.
module tb_row_fetcher;
  localparam int unsigned N = 4, D = 4, AW = 8;
  localparam int unsigned CW = $clog2(D + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] rows = '0;
  logic [N-1:0][CW-1:0] lane_count = '0;
  logic rd_en, resp_push, blocked, finished;
  logic [AW-1:0] rd_addr;
  int checks = 0, failures = 0, expect_addr = 0, reads = 0, blocks = 0;
  bit rd_en_d = 0;
  int unsigned drain_pct = 100;
  bit hold_lane2 = 0;

  row_fetcher #(.N(N), .DEPTH(D), .AW(AW)) dut (.*);
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

  always @(posedge clk) if (rst_n && !start) begin
    chk(resp_push == rd_en_d, "response one cycle after read");
    rd_en_d <= rd_en;
    if (blocked) blocks++;
    if (rd_en) begin
      chk(rd_addr == AW'(expect_addr), "address order");
      expect_addr++;
      reads++;
    end
    for (int i = 0; i < N; i++) begin
      int c;
      c = int'(lane_count[i]);
      if (c > 0 && !(hold_lane2 && i == 2) && $urandom_range(1, 100) <= drain_pct) c--;
      if (resp_push) c++;
      chk(c <= D, "lane FIFO overflow");
      lane_count[i] <= CW'(c);
    end
  end

  task automatic run(int n);
    @(negedge clk); rows = AW'(n); start = 1;
    @(negedge clk); start = 0; expect_addr = 0; reads = 0; rd_en_d = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // full rate
    run(50); t0 = 0;
    while (!finished) begin @(negedge clk); t0++; end
    chk(reads == 50, "all rows read (rate phase)");
    chk(t0 == 51, "one row per cycle plus one cycle of latency");
    $display("rate phase: 50 rows in %0d cycles", t0);
    // random drain with a stalled lane
    drain_pct = 40;
    run(120);
    repeat (30) @(posedge clk);
    hold_lane2 = 1;
    repeat (40) @(posedge clk);
    hold_lane2 = 0;
    while (!finished) @(posedge clk);
    chk(reads == 120, "all rows read (random phase)");
    chk(blocks > 0, "fetcher never blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
