// sxornet_decompressor -- one sXORNet decompressor lane: LUT decode plus patch
// correction.
//
// What it does: turns the lane's stream of compressed words into a stream of
// corrected YF-bit bit-planes. Each compressed word carries x bits u, a LUT select
// (half) and a has_patch flag. The word goes through the stacked XOR LUT
// (sxornet_lut). A full-size word yields a whole YF-bit plane; a half-size word
// yields YH bits, and two consecutive half-size words make one plane (low half
// first), so locally dense data spends more compressed words and produces fewer
// LUT errors. When has_patch is set, the correction unit takes patches from the
// lane's imbalance FIFO, one per cycle, flipping bit pos of the LUT output, until
// it takes a patch marked last.
//
// Timing: a word with no patch, or with one patch that is already waiting, is
// finished in the cycle it is taken; a word with k > 1 patches occupies the lane
// for k cycles. The lane stalls (stall_patch = 1) while it needs a patch and its
// imbalance FIFO is empty, and whenever out_ready is low. out_valid/out_plane are
// combinational and meant to be registered by the consumer. After seg_target
// planes the lane raises done and drains (discards) any further compressed words,
// which are padding of the row-wise memory layout.
//
// Follows the paper: LUT followed by a patch-correction step, one patch per
// decompressor per cycle, per-vector LUT selection. This design's own choices:
// the has_patch/last encoding of the patch count, the one-patch-per-cycle
// correction loop and the pairing of two half-size outputs into one plane.
module sxornet_decompressor
  import sami_pkg::*;
#(
  parameter int unsigned X    = X_BITS,
  parameter int unsigned SR   = SR_STAGES,
  parameter int unsigned YH   = Y_HALF,
  parameter int unsigned YF   = Y_FULL,
  parameter logic [31:0] SEED = LUT_SEED,
  parameter int unsigned CNT_W = ROW_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,          // start of a new stream
  input  logic [CNT_W-1:0] seg_target,   // planes this lane must produce
  // compressed-word stream (head of the lane's word FIFO)
  input  cword_t           cw,
  input  logic             cw_valid,
  output logic             cw_pop,
  // patch stream (head of the lane's imbalance FIFO)
  input  patch_t           patch,
  input  logic             p_valid,
  output logic             p_pop,
  // corrected bit-planes
  input  logic             out_ready,
  output logic             out_valid,
  output logic [YF-1:0]    out_plane,
  // status
  output logic             done,
  output logic             stall_patch
);
  logic [YF-1:0]    lut_v;
  logic             lut_adv;

  logic             busy_q;      // a LUT output is waiting for more patches
  logic [YF-1:0]    cur_q;
  logic             cur_half_q;
  logic [YH-1:0]    lo_q;        // first half of a half-size pair
  logic             lo_have_q;
  logic [CNT_W-1:0] seg_q;

  // next-state values
  logic             busy_d, cur_half_d, lo_have_d;
  logic [YF-1:0]    cur_d;
  logic [YH-1:0]    lo_d;

  // a finished (fully corrected) LUT output this cycle
  logic             fin;
  logic [YF-1:0]    fin_vec;
  logic             fin_half;

  sxornet_lut #(.X(X), .SR(SR), .YH(YH), .YF(YF), .SEED(SEED)) u_lut (
    .clk, .rst_n, .clr,
    .adv (lut_adv),
    .u   (cw.u),
    .half(cw.half),
    .v   (lut_v)
  );

  assign done = (seg_q == seg_target);

  function automatic logic [YF-1:0] flip(logic [YF-1:0] v, logic [POS_W-1:0] pos);
    logic [YF-1:0] r;
    r = v;
    r[pos] = ~r[pos];
    return r;
  endfunction

  always_comb begin
    cw_pop      = 1'b0;
    p_pop       = 1'b0;
    lut_adv     = 1'b0;
    busy_d      = busy_q;
    cur_d       = cur_q;
    cur_half_d  = cur_half_q;
    fin         = 1'b0;
    fin_vec     = '0;
    fin_half    = 1'b0;
    stall_patch = 1'b0;

    if (done) begin
      cw_pop = cw_valid;                       // drain row padding
    end else if (busy_q) begin
      if (!p_valid) begin
        stall_patch = 1'b1;
      end else if (out_ready) begin
        p_pop = 1'b1;
        cur_d = flip(cur_q, patch.pos);
        if (patch.last) begin
          fin      = 1'b1;
          fin_vec  = cur_d;
          fin_half = cur_half_q;
          busy_d   = 1'b0;
        end
      end
    end else if (cw_valid && out_ready) begin
      cw_pop     = 1'b1;
      lut_adv    = 1'b1;
      cur_half_d = cw.half;
      if (!cw.has_patch) begin
        fin      = 1'b1;
        fin_vec  = lut_v;
        fin_half = cw.half;
      end else if (p_valid) begin
        p_pop = 1'b1;
        cur_d = flip(lut_v, patch.pos);
        if (patch.last) begin
          fin      = 1'b1;
          fin_vec  = cur_d;
          fin_half = cw.half;
        end else begin
          busy_d = 1'b1;
        end
      end else begin
        cur_d       = lut_v;
        busy_d      = 1'b1;
        stall_patch = 1'b1;
      end
    end
  end

  // pack finished LUT outputs into planes
  always_comb begin
    out_valid = 1'b0;
    out_plane = '0;
    lo_d      = lo_q;
    lo_have_d = lo_have_q;
    if (fin) begin
      if (!fin_half) begin
        out_valid = 1'b1;
        out_plane = fin_vec;
      end else if (!lo_have_q) begin
        lo_d      = fin_vec[YH-1:0];
        lo_have_d = 1'b1;
      end else begin
        out_valid = 1'b1;
        out_plane = YF'({fin_vec[YH-1:0], lo_q});
        lo_have_d = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q     <= 1'b0;
      cur_q      <= '0;
      cur_half_q <= 1'b0;
      lo_q       <= '0;
      lo_have_q  <= 1'b0;
      seg_q      <= '0;
    end else if (clr) begin
      busy_q     <= 1'b0;
      cur_q      <= '0;
      cur_half_q <= 1'b0;
      lo_q       <= '0;
      lo_have_q  <= 1'b0;
      seg_q      <= '0;
    end else begin
      busy_q     <= busy_d;
      cur_q      <= cur_d;
      cur_half_q <= cur_half_d;
      lo_q       <= lo_d;
      lo_have_q  <= lo_have_d;
      if (out_valid) seg_q <= seg_q + CNT_W'(1);
    end
  end

  // a full-size word must not arrive between the two halves of a pair
  assert property (@(posedge clk) disable iff (!rst_n || clr)
                   (fin && !fin_half) |-> !lo_have_q)
    else $error("sxornet_decompressor: full-size word inside a half-size pair");

  initial assert (2 * YH == YF) else $error("sxornet_decompressor: needs YF = 2*YH");
endmodule
