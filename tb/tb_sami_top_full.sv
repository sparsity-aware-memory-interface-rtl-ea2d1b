// tb_sami_top_full -- end-to-end self-checking test of the sparsity-aware memory
// interface with every parameter at its default (256 lanes, 256-deep imbalance
// FIFOs); the imbalance is provoked with a long dense stretch in every fourth lane.
//
// The testbench plays the memory. It generates a random compressed model for every
// lane: a sequence of bit-planes, each from one full-size word or two half-size
// words, every word with 0..3 patches, plus one random mask per Q planes, and lays
// the three streams out row-wise (row r holds entry r of every lane; lanes with
// shorter streams are padded). Lanes get different patch densities, and the
// density changes along the stream, so the lanes' imbalance FIFOs fill unevenly.
// Independently of the RTL it computes every lane's expected weights (reference
// XOR network from tb_ref_pkg, its own patch flips, pairing and masking) and
// compares each weight group the interface emits, lane by lane and in order.
//
// Run 1 is patch-free with full-size words only and checks the rate: one plane per
// lane per cycle. Run 2 is the imbalanced stream; it must make every mechanism
// happen at least once: half- and full-size LUT words, multi-patch correction, a
// lane waiting for a patch, an imbalance FIFO missing a row, a patch row being
// read again, the word fetch being held back by a stalled lane, padding drained.
module tb_sami_top_full;
  import sami_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned N    = N_LANES;
  localparam int unsigned B    = B_DEPTH;
  localparam int unsigned SEGS = 256;          // planes per lane (multiple of Q_BITS)
  localparam int unsigned GRPS = SEGS / Q_BITS;
  localparam int unsigned MAXCW = 2 * SEGS + 4;
  localparam int unsigned MAXP  = 3 * MAXCW + 4;
  localparam int unsigned LIN   = X_BITS * (SR_STAGES + 1);
  localparam int unsigned AW    = ROW_AW;

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] seg_target = '0, cw_rows = '0, p_rows = '0, m_rows = '0;
  logic cw_rd_en, p_rd_en, m_rd_en;
  logic [AW-1:0] cw_rd_addr, p_rd_addr, m_rd_addr;
  cword_t [N-1:0] cw_rd_data;
  patch_t [N-1:0] p_rd_data;
  logic [N-1:0][Y_FULL-1:0] m_rd_data;
  logic [N-1:0] w_valid;
  logic [N-1:0][Y_FULL-1:0][Q_BITS-1:0] w_data;
  logic busy, done;
  logic [31:0] cycles, patch_stall_cycles, cw_block_cycles, reaccess_count, miss_count;

  // memory images
  cword_t cw_mem [MAXCW][N];
  patch_t p_mem  [MAXP][N];
  logic [Y_FULL-1:0] m_mem [GRPS][N];
  logic [Y_FULL-1:0][Q_BITS-1:0] exp_w [GRPS][N];
  int got [N];
  int lane_cw [N];

  int checks = 0, failures = 0;
  int n_half = 0, n_full = 0, n_multi = 0, n_pad = 0;

  sami_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // memory: one-cycle read latency
  always @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (cw_rd_en) cw_rd_data[i] <= (int'(cw_rd_addr) < MAXCW) ? cw_mem[cw_rd_addr][i] : '0;
      if (p_rd_en)  p_rd_data[i]  <= (int'(p_rd_addr) < MAXP) ? p_mem[p_rd_addr][i] : '0;
      if (m_rd_en)  m_rd_data[i]  <= (int'(m_rd_addr) < GRPS) ? m_mem[m_rd_addr][i] : '0;
    end
  end

  // output checker
  always @(posedge clk) if (rst_n && !start) begin
    for (int i = 0; i < N; i++) if (w_valid[i]) begin
      chk(got[i] < int'(GRPS), "extra weight group");
      if (got[i] < int'(GRPS)) chk(w_data[i] == exp_w[got[i]][i], "weight group value");
      got[i]++;
    end
  end

  // build the streams; mode 0 = patch-free full-size, 1 = imbalanced mix
  task automatic build(int mode, output int ncw, output int np);
    logic [Y_FULL-1:0] planes [SEGS];
    longint unsigned h1, h2;
    logic [127:0] v, lo;
    cword_t w; patch_t p;
    int k, len, ci, pi, pct;
    ncw = 0; np = 0;
    for (int r = 0; r < MAXCW; r++) for (int i = 0; i < N; i++) cw_mem[r][i] = '0;
    for (int r = 0; r < MAXP; r++)  for (int i = 0; i < N; i++) p_mem[r][i] = '{last: 1'b1, pos: '0};
    for (int i = 0; i < N; i++) begin
      h1 = 0; h2 = 0; ci = 0; pi = 0;
      for (int n = 0; n < int'(SEGS); n++) begin
        bit half;
        // lanes i%4==0 are locally dense in the first half of the stream
        pct  = (mode == 0) ? 0 : ((i % 4 == 0 && n < int'(SEGS) / 2) ? 90 : 15);
        half = (mode == 0) ? 1'b0 : (mode == 2) ? ($urandom_range(0, 99) < 30) : ($urandom_range(0, 99) < pct);
        lo = '0;
        for (int part = 0; part < (half ? 2 : 1); part++) begin
          w.half = half; w.u = X_BITS'($urandom);
          if (mode == 2) begin
            // patch-count distribution of the 0.6-pruned transformer:
            // 986K outputs without patch, 175K with one, 59K with more
            int r;
            r = $urandom_range(0, 1219);
            k = (r < 986) ? 0 : (r < 1161) ? 1 : $urandom_range(2, 3);
          end else begin
            k = ($urandom_range(0, 99) < pct) ? $urandom_range(1, 3) : 0;
          end
          w.has_patch = (k > 0);
          v = ref_lut(LUT_SEED, 64'(w.u) | (h1 << X_BITS) | (h2 << (2 * X_BITS)), LIN, Y_HALF, Y_FULL, half);
          h2 = h1; h1 = 64'(w.u);
          len = half ? Y_HALF : Y_FULL;
          if (half) n_half++; else n_full++;
          if (k > 1) n_multi++;
          for (int j = 0; j < k; j++) begin
            p.pos = POS_W'($urandom_range(0, len - 1)); p.last = (j == k - 1);
            v[p.pos] = ~v[p.pos];
            p_mem[pi][i] = p; pi++;
          end
          cw_mem[ci][i] = w; ci++;
          if (half && part == 0) lo = v;
          else if (half) planes[n] = Y_FULL'((v << Y_HALF) | lo);
          else planes[n] = Y_FULL'(v);
        end
      end
      lane_cw[i] = ci;
      if (ci > ncw) ncw = ci;
      if (pi > np) np = pi;
      // padding words after the lane's own stream
      for (int r = ci; r < int'(MAXCW); r++) cw_mem[r][i].u = X_BITS'($urandom);
      for (int g = 0; g < int'(GRPS); g++) begin
        m_mem[g][i] = Y_FULL'(rand128());
        for (int j = 0; j < int'(Y_FULL); j++)
          for (int b = 0; b < int'(Q_BITS); b++)
            exp_w[g][i][j][b] = planes[g * Q_BITS + b][j] & m_mem[g][i][j];
      end
    end
    for (int i = 0; i < N; i++) if (lane_cw[i] < ncw) n_pad++;
  endtask

  task automatic run(int mode, output int cyc);
    int ncw, np;
    build(mode, ncw, np);
    for (int i = 0; i < N; i++) got[i] = 0;
    @(negedge clk);
    seg_target = AW'(SEGS); cw_rows = AW'(ncw); p_rows = AW'(np); m_rows = AW'(GRPS);
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cyc = int'(cycles);
    for (int i = 0; i < N; i++) chk(got[i] == int'(GRPS), "every lane emitted all groups");
    $display("mode %0d: %0d planes/lane, %0d word rows, %0d patch rows, %0d cycles, patch-stall %0d, word-fetch blocked %0d, re-accesses %0d, misses %0d",
             mode, SEGS, ncw, np, cycles, patch_stall_cycles, cw_block_cycles, reaccess_count, miss_count);
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run 1: rate
    run(0, cyc);
    chk(cyc <= int'(SEGS) + 3, "patch-free stream runs at one plane per cycle");
    chk(patch_stall_cycles == 0 && reaccess_count == 0, "patch-free stream has no stalls");
    // run 2: imbalanced mix
    n_half = 0; n_full = 0; n_multi = 0; n_pad = 0;
    run(1, cyc);
    $display("half-size words %0d, full-size words %0d, multi-patch words %0d, padded lanes %0d",
             n_half, n_full, n_multi, n_pad);
    chk(n_half > 0, "half-size LUT used");
    chk(n_full > 0, "full-size LUT used");
    chk(n_multi > 0, "multi-patch correction used");
    chk(n_pad > 0, "row padding drained");
    chk(patch_stall_cycles > 0, "a lane waited for a patch");
    chk(miss_count > 0, "an imbalance FIFO missed a row");
    chk(reaccess_count > 0, "a patch row was read again");
    chk(cw_block_cycles > 0, "word fetch was held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
