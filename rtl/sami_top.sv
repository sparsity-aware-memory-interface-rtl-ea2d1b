// sami_top -- sparsity-aware memory interface (SAMI) for pruned DNN weights
// compressed with stacked XORNet and vertically-arranged patches.
//
// What it does: streams a compressed, pruned, 8-bit weight matrix from memory and
// delivers it to the processing engines in dense format, N lanes in parallel,
// each lane YF weights per Q cycles at full rate. Three streams are read, all
// row-wise, so that row r of a stream holds entry r of every lane and every lane
// is wired one-to-one to its slice of the row (no distributing network):
//   * compressed words (cw): x LUT bits + LUT select + has_patch flag per lane,
//   * VA-patches (p): error positions that correct the XOR LUT outputs,
//   * masks (m): one YF-bit pruning mask per lane per weight group.
// The cw stream advances in lock step (row_fetcher). The patch stream is read by
// va_patch_fetcher, which lets lanes drift apart by up to B patches (the
// imbalance FIFO depth) and re-reads rows a full FIFO had to miss. The mask
// stream uses a second va_patch_fetcher with M_DEPTH-deep FIFOs: lanes that
// decode locally dense data with half-size words finish their planes later than
// others, so their mask rows are needed at different times.
//
// Operation: load the row counts and seg_target (bit-planes per lane, a multiple
// of Q) and pulse start. The interface runs until every lane has emitted
// seg_target/Q weight groups, then raises done (held until the next start).
// cycles counts clock cycles from start to done; the other counters report how
// often each mechanism acted during the run.
//
// Memory ports: each *_rd_en/*_rd_addr read returns *_rd_data on the next cycle
// (one-cycle latency). Weight outputs: w_valid[i] pulses with lane i's YF weights
// on w_data[i] (weight j is w_data[i][j], Q bits).
//
// Follows the paper: N = 256 parallel sXORNet decompressors, x = 20, two LUT
// shift registers, q = 8, fixed imbalance FIFOs of B = 256 patches, VA-patch
// rows, re-accessing missed rows. This design's own choices: the record layouts,
// the LUT sizes 40/80, the memory latency, the lock-step word fetch and the
// per-lane mask fetch.
module sami_top
  import sami_pkg::*;
#(
  parameter int unsigned N        = N_LANES,
  parameter int unsigned B        = B_DEPTH,
  parameter int unsigned AW       = ROW_AW,
  parameter int unsigned CW_DEPTH = 4,
  parameter int unsigned M_DEPTH  = 2,
  parameter logic [31:0] SEED     = LUT_SEED
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [AW-1:0]                      seg_target,
  input  logic [AW-1:0]                      cw_rows,
  input  logic [AW-1:0]                      p_rows,
  input  logic [AW-1:0]                      m_rows,
  // compressed-word memory
  output logic                               cw_rd_en,
  output logic [AW-1:0]                      cw_rd_addr,
  input  cword_t [N-1:0]                     cw_rd_data,
  // VA-patch memory
  output logic                               p_rd_en,
  output logic [AW-1:0]                      p_rd_addr,
  input  patch_t [N-1:0]                     p_rd_data,
  // mask memory
  output logic                               m_rd_en,
  output logic [AW-1:0]                      m_rd_addr,
  input  logic [N-1:0][Y_FULL-1:0]           m_rd_data,
  // dense weights to the processing engines
  output logic [N-1:0]                       w_valid,
  output logic [N-1:0][Y_FULL-1:0][Q_BITS-1:0] w_data,
  // status and statistics
  output logic                               busy,
  output logic                               done,
  output logic [31:0]                        cycles,
  output logic [31:0]                        patch_stall_cycles, // some lane waited for a patch
  output logic [31:0]                        cw_block_cycles,    // word fetch held back by a full lane
  output logic [31:0]                        reaccess_count,     // patch rows read again
  output logic [31:0]                        miss_count          // patch reads a full lane missed
);
  localparam int unsigned QW = $clog2(Q_BITS);

  logic [N-1:0][$clog2(CW_DEPTH+1)-1:0] cw_count;
  logic [N-1:0][$clog2(B+1)-1:0]        p_count;
  logic [N-1:0][$clog2(M_DEPTH+1)-1:0]  m_count;
  logic [N-1:0]                         p_take;
  logic [N-1:0][AW-1:0]                 groups;
  logic [N-1:0]                         lane_stall;
  logic [N-1:0]                         m_take;
  logic                                 cw_push;
  logic                                 cw_blocked, m_reaccess_unused, m_miss_unused;
  logic                                 cw_fin_unused, m_fin_unused, p_fin_unused;
  logic                                 p_reaccess, p_miss;
  logic [AW-1:0]                        grp_target_q, seg_target_q;
  logic                                 all_done;

  row_fetcher #(.N(N), .DEPTH(CW_DEPTH), .AW(AW)) u_cw_fetch (
    .clk, .rst_n, .start, .rows(cw_rows), .lane_count(cw_count),
    .rd_en(cw_rd_en), .rd_addr(cw_rd_addr), .resp_push(cw_push),
    .blocked(cw_blocked), .finished(cw_fin_unused)
  );

  // masks: one per Q planes, and lanes progress through planes at different
  // speeds, so the mask stream also uses per-lane row pointers
  va_patch_fetcher #(.N(N), .B(M_DEPTH), .AW(AW)) u_m_fetch (
    .clk, .rst_n, .start, .rows(m_rows), .lane_count(m_count),
    .rd_en(m_rd_en), .rd_addr(m_rd_addr), .take(m_take),
    .reaccess(m_reaccess_unused), .miss(m_miss_unused), .finished(m_fin_unused)
  );

  va_patch_fetcher #(.N(N), .B(B), .AW(AW)) u_p_fetch (
    .clk, .rst_n, .start, .rows(p_rows), .lane_count(p_count),
    .rd_en(p_rd_en), .rd_addr(p_rd_addr), .take(p_take),
    .reaccess(p_reaccess), .miss(p_miss), .finished(p_fin_unused)
  );

  for (genvar i = 0; i < N; i++) begin : g_lane
    decomp_lane #(.B(B), .CW_DEPTH(CW_DEPTH), .M_DEPTH(M_DEPTH), .AW(AW), .SEED(SEED)) u_lane (
      .clk, .rst_n, .clr(start),
      .seg_target (seg_target_q),
      .cw_push, .cw_in(cw_rd_data[i]), .cw_count(cw_count[i]),
      .p_push(p_take[i]), .p_in(p_rd_data[i]), .p_count(p_count[i]),
      .m_push(m_take[i]), .m_in(m_rd_data[i]), .m_count(m_count[i]),
      .w_valid(w_valid[i]), .w(w_data[i]), .groups(groups[i]),
      .stall_patch(lane_stall[i])
    );
  end

  always_comb begin
    all_done = 1'b1;
    for (int i = 0; i < N; i++)
      if (groups[i] != grp_target_q) all_done = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy               <= 1'b0;
      done               <= 1'b0;
      seg_target_q       <= '0;
      grp_target_q       <= '0;
      cycles             <= '0;
      patch_stall_cycles <= '0;
      cw_block_cycles    <= '0;
      reaccess_count     <= '0;
      miss_count         <= '0;
    end else if (start) begin
      busy               <= 1'b1;
      done               <= 1'b0;
      seg_target_q       <= seg_target;
      grp_target_q       <= seg_target >> QW;
      cycles             <= '0;
      patch_stall_cycles <= '0;
      cw_block_cycles    <= '0;
      reaccess_count     <= '0;
      miss_count         <= '0;
    end else if (busy) begin
      if (all_done) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        cycles <= cycles + 32'd1;
        if (|lane_stall) patch_stall_cycles <= patch_stall_cycles + 32'd1;
        if (cw_blocked)  cw_block_cycles    <= cw_block_cycles + 32'd1;
        if (p_reaccess)  reaccess_count     <= reaccess_count + 32'd1;
        if (p_miss)      miss_count         <= miss_count + 32'd1;
      end
    end
  end

  initial assert ((1 << QW) == Q_BITS) else $error("sami_top: Q_BITS must be a power of two");
endmodule
