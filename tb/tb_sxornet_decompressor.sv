// tb_sxornet_decompressor -- self-checking test of one sXORNet decompressor lane.
// The testbench builds a random compressed stream (full-size words and pairs of
// half-size words, each with 0..3 patches), serves compressed words and patches
// from queues with random gaps and random output back-pressure, and compares
// every emitted bit-plane with a reference built from tb_ref_pkg (own LUT history,
// own patch flips, own half-pair packing). Phase 1 checks the rate: a patch-free
// full-size stream with no gaps yields one plane per cycle. Phase 2 is random and
// also checks that words past seg_target are drained and that stalls happen.
module tb_sxornet_decompressor;
  import sami_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned LIN = X_BITS * (SR_STAGES + 1);

  logic clk = 0, rst_n = 0, clr = 0;
  logic [ROW_AW-1:0] seg_target = '0;
  cword_t cw; logic cw_valid, cw_pop;
  patch_t patch; logic p_valid, p_pop;
  logic out_ready, out_valid, done, stall_patch;
  logic [Y_FULL-1:0] out_plane;

  cword_t cwq[$]; patch_t pq[$]; logic [Y_FULL-1:0] expq[$];
  int checks = 0, failures = 0, stalls = 0, planes_seen = 0;
  bit gap_cw, gap_p;

  sxornet_decompressor dut (.*);

  always #5 clk = ~clk;

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

  // build a stream of nplanes planes; pfull = % full-size, ppatch = % words with patches
  task automatic build(int nplanes, int pfull, int ppatch, int pad);
    longint unsigned h1 = 0, h2 = 0;
    logic [127:0] v, lo;
    cword_t w; patch_t p;
    int k, len;
    for (int n = 0; n < nplanes; n++) begin
      bit half = ($urandom_range(0, 99) >= pfull);
      lo = '0;
      for (int part = 0; part < (half ? 2 : 1); part++) begin
        w.half = half; w.u = X_BITS'($urandom);
        k = ($urandom_range(0, 99) < ppatch) ? $urandom_range(1, 3) : 0;
        w.has_patch = (k > 0);
        v = ref_lut(LUT_SEED, 64'(w.u) | (h1 << X_BITS) | (h2 << (2 * X_BITS)), LIN, Y_HALF, Y_FULL, half);
        h2 = h1; h1 = 64'(w.u);
        len = half ? Y_HALF : Y_FULL;
        for (int j = 0; j < k; j++) begin
          p.pos = POS_W'($urandom_range(0, len - 1)); p.last = (j == k - 1);
          v[p.pos] = ~v[p.pos];
          pq.push_back(p);
        end
        cwq.push_back(w);
        if (half && part == 0) lo = v;
        else if (half) expq.push_back(Y_FULL'((v << Y_HALF) | lo));
        else expq.push_back(Y_FULL'(v));
      end
    end
    for (int j = 0; j < pad; j++) begin w = '0; w.u = X_BITS'($urandom); cwq.push_back(w); end
  endtask

  // queue-backed word and patch sources
  assign cw_valid = (cwq.size() > 0) && !gap_cw;
  assign cw       = (cwq.size() > 0) ? cwq[0] : '0;
  assign p_valid  = (pq.size() > 0) && !gap_p;
  assign patch    = (pq.size() > 0) ? pq[0] : '0;

  always @(posedge clk) if (rst_n && !clr) begin
    if (cw_pop) void'(cwq.pop_front());
    if (p_pop)  void'(pq.pop_front());
    if (stall_patch) stalls++;
    if (out_valid && out_ready) begin
      planes_seen++;
      chk(expq.size() > 0, "unexpected plane");
      if (expq.size() > 0) begin
        chk(out_plane == expq[0], "plane value");
        void'(expq.pop_front());
      end
    end
  end

  initial begin
    int t0, t1;
    gap_cw = 0; gap_p = 0; out_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: rate check
    @(negedge clk); clr = 1; seg_target = 40; @(negedge clk); clr = 0;
    build(40, 100, 0, 0);
    t0 = $time;
    wait (done); t1 = $time;
    $display("phase 1: %0d cycles for 40 planes", (t1 - t0 + 5) / 10);
    chk((t1 - t0 + 5) / 10 == 40, "one plane per cycle without patches");
    chk(expq.size() == 0, "phase 1 all planes");
    // phase 2: random stream
    @(negedge clk); clr = 1; seg_target = 300; cwq.delete(); pq.delete(); expq.delete();
    @(negedge clk); clr = 0;
    build(300, 50, 40, 5);
    fork
      begin
        while (!done) begin
          @(negedge clk);
          gap_cw = ($urandom_range(0, 9) == 0);
          gap_p = ($urandom_range(0, 3) == 0);
          out_ready = ($urandom_range(0, 9) != 0);
        end
        gap_cw = 0;
      end
    join
    @(negedge clk); out_ready = 1;
    repeat (10) @(posedge clk);
    chk(expq.size() == 0, "phase 2 all planes");
    chk(cwq.size() == 0, "padding drained after done");
    chk(stalls > 0, "patch stall never happened");
    chk(planes_seen == 340, "plane count");
    $display("planes=%0d patch-stall cycles=%0d", planes_seen, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
