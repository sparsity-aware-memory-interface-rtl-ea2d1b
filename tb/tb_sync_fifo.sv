// tb_sync_fifo -- self-checking test of the imbalance FIFO (sync_fifo).
// Random pushes and pops, biased in phases towards filling and draining, are
// compared with a queue model: head data, count, empty and full every cycle, and
// a synchronous clear in the middle.
module tb_sync_fifo;
  localparam int unsigned W = 6, D = 8;
  logic clk = 0, rst_n = 0, clr = 0, push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;
  int fills = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(dout == q[0], "head");
      if (full) fills++;
      // phases of 200 cycles: push-heavy, then pop-heavy
      push = !full && ($urandom_range(0, 99) < (((t / 200) % 2 == 0) ? 80 : 30));
      pop  = !empty && ($urandom_range(0, 99) < (((t / 200) % 2 == 0) ? 30 : 80));
      din  = W'($urandom);
      clr  = (t == 1500);
      @(posedge clk);
      if (clr) q.delete();
      else begin
        if (pop) void'(q.pop_front());
        if (push) q.push_back(din);
      end
    end
    chk(fills > 0, "FIFO never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
