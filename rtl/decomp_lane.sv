// decomp_lane -- one decompressor lane of the memory interface: its three input
// buffers, the sXORNet decompressor and the weight assembler.
//
// What it does: receives its slice of every compressed-word row, VA-patch row and
// mask row through fixed wires, buffers them (compressed words and masks in small
// FIFOs, patches in the B-deep imbalance FIFO), decompresses and corrects one
// bit-plane per cycle when the patches it needs are present, and emits YF dense
// Q-bit weights every Q planes.
//
// Interface: *_push with *_in write the lane's slice of a returned row; the
// *_count outputs let the fetchers see how full the buffers are. w_valid pulses
// with a finished weight group on w. groups counts finished groups since clr;
// stall_patch is high in a cycle where the lane waits for a patch.
//
// Follows the paper: one imbalance FIFO per decompressor, fed one-to-one from
// VA-patch rows (Fig. 7). This design's own choices: the depths of the word and
// mask FIFOs (CW_DEPTH, M_DEPTH), which only have to cover the read latency.
module decomp_lane
  import sami_pkg::*;
#(
  parameter int unsigned B        = B_DEPTH,
  parameter int unsigned CW_DEPTH = 4,
  parameter int unsigned M_DEPTH  = 2,
  parameter int unsigned AW       = ROW_AW,
  parameter logic [31:0] SEED     = LUT_SEED
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              clr,
  input  logic [AW-1:0]                     seg_target,
  input  logic                              cw_push,
  input  cword_t                            cw_in,
  output logic [$clog2(CW_DEPTH+1)-1:0]     cw_count,
  input  logic                              p_push,
  input  patch_t                            p_in,
  output logic [$clog2(B+1)-1:0]            p_count,
  input  logic                              m_push,
  input  logic [Y_FULL-1:0]                 m_in,
  output logic [$clog2(M_DEPTH+1)-1:0]      m_count,
  output logic                              w_valid,
  output logic [Y_FULL-1:0][Q_BITS-1:0]     w,
  output logic [AW-1:0]                     groups,
  output logic                              stall_patch
);
  cword_t              cw_head;
  patch_t              p_head;
  logic [Y_FULL-1:0]   m_head;
  logic                cw_empty, p_empty, m_empty;
  logic                cw_pop, p_pop, m_pop;
  logic                plane_valid, plane_ready;
  logic [Y_FULL-1:0]   plane;
  logic                dec_done;
  logic                cw_full_unused, p_full_unused, m_full_unused;

  sync_fifo #(.WIDTH(CWORD_W), .DEPTH(CW_DEPTH)) u_cw_fifo (
    .clk, .rst_n, .clr,
    .push(cw_push), .din(cw_in), .pop(cw_pop), .dout(cw_head),
    .empty(cw_empty), .full(cw_full_unused), .count(cw_count)
  );

  // the imbalance FIFO
  sync_fifo #(.WIDTH(PATCH_W), .DEPTH(B)) u_imb_fifo (
    .clk, .rst_n, .clr,
    .push(p_push), .din(p_in), .pop(p_pop), .dout(p_head),
    .empty(p_empty), .full(p_full_unused), .count(p_count)
  );

  sync_fifo #(.WIDTH(Y_FULL), .DEPTH(M_DEPTH)) u_m_fifo (
    .clk, .rst_n, .clr,
    .push(m_push), .din(m_in), .pop(m_pop), .dout(m_head),
    .empty(m_empty), .full(m_full_unused), .count(m_count)
  );

  sxornet_decompressor #(.SEED(SEED), .CNT_W(AW)) u_dec (
    .clk, .rst_n, .clr,
    .seg_target,
    .cw(cw_head), .cw_valid(!cw_empty), .cw_pop,
    .patch(p_head), .p_valid(!p_empty), .p_pop,
    .out_ready(plane_ready), .out_valid(plane_valid), .out_plane(plane),
    .done(dec_done), .stall_patch
  );

  weight_assembler #(.CNT_W(AW)) u_asm (
    .clk, .rst_n, .clr,
    .plane_valid, .plane, .plane_ready,
    .mask(m_head), .mask_valid(!m_empty), .mask_pop(m_pop),
    .w_valid, .w, .groups
  );

  // the full flags are covered by the fetchers' room checks
  assert property (@(posedge clk) disable iff (!rst_n || clr) dec_done |-> !plane_valid)
    else $error("decomp_lane: plane produced after the lane finished");
endmodule
