// tb_weight_assembler -- self-checking test of the bit-plane to weight assembler.
// Random planes arrive with random gaps; mask words arrive late at times so the
// back-pressure path (plane_ready low on the Q-th plane) is exercised. Each
// emitted group is compared with weights rebuilt by the testbench: bit k of
// weight j is bit j of plane k, cleared where the mask bit is 0.
module tb_weight_assembler;
  import sami_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned YF = Y_FULL, Q = Q_BITS;
  logic clk = 0, rst_n = 0, clr = 0;
  logic plane_valid = 0, plane_ready;
  logic [YF-1:0] plane = '0, mask;
  logic mask_valid, mask_pop, w_valid;
  logic [YF-1:0][Q-1:0] w;
  logic [ROW_AW-1:0] groups;
  logic [YF-1:0][Q-1:0] expq[$];
  logic [YF-1:0] pl[Q];
  int checks = 0, failures = 0, bp = 0;
  bit mask_gap = 0;

  weight_assembler dut (.*);
  always #5 clk = ~clk;

  logic [YF-1:0] mask_r = '0;
  bit mask_have = 0;
  assign mask_valid = mask_have && !mask_gap;
  assign mask       = mask_r;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (mask_pop) mask_have <= 0;
    if (plane_valid && !plane_ready) bp++;
    if (w_valid) begin
      chk(expq.size() > 0, "unexpected group");
      if (expq.size() > 0) begin chk(w == expq[0], "weights"); if (w != expq[0] && failures < 3) $display("w=%h exp=%h", w, expq[0]); void'(expq.pop_front()); end
    end
  end

  initial begin
    logic [YF-1:0][Q-1:0] e;
    logic [YF-1:0] m;
    int k;
    bit acc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 100; g++) begin
      m = YF'(rand128());
      for (int k = 0; k < Q; k++) pl[k] = YF'(rand128());
      for (int j = 0; j < YF; j++) for (int k = 0; k < Q; k++) e[j][k] = pl[k][j] & m[j];
      expq.push_back(e);
      mask_r = m; mask_have = 1;
      k = 0;
      while (k < Q) begin
        @(negedge clk);
        plane_valid = ($urandom_range(0, 3) != 0);
        plane       = pl[k];
        mask_gap    = (k == Q - 1) && ($urandom_range(0, 2) == 0);
        #1 acc = plane_valid && plane_ready;
        @(posedge clk);
        if (acc) k++;
      end
      @(negedge clk); plane_valid = 0; mask_gap = 0;
    end
    repeat (3) @(posedge clk);
    chk(expq.size() == 0, "all groups emitted");
    chk(groups == 100, "group count");
    chk(bp > 0, "back-pressure never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
