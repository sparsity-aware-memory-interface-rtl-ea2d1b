// weight_assembler -- turns Q consecutive corrected bit-planes of one lane into
// YF dense-format Q-bit weights and applies the pruning mask.
//
// What it does: the XORNet decompressor produces one bit of YF weights at a time;
// Q consecutive planes are the Q bits of the same YF weights. This block collects
// them (plane k of a group is weight bit k, least significant first), and with the
// Q-th plane takes the group's YF-bit mask word and clears every weight whose mask
// bit is 0, i.e. every pruned position, whose decompressed bits are don't-cares of
// the XOR encoding.
//
// Interface: plane_valid/plane come from the decompressor (combinational there);
// plane_ready is low only when the Q-th plane arrives and no mask word is waiting.
// The mask word is the head of the lane's mask FIFO (mask_valid, mask_pop). The
// finished group appears on w with a one-cycle w_valid pulse, the cycle after its
// last plane. groups counts finished groups since clr.
//
// Follows the paper: q-bit weights obtained by appending q consecutive LUT
// outputs, and a bit-wise masking pattern as extra stored data. This design's own
// choices: LSB-first plane order and the one-mask-word-per-group storage.
module weight_assembler
  import sami_pkg::*;
#(
  parameter int unsigned YF    = Y_FULL,
  parameter int unsigned Q     = Q_BITS,
  parameter int unsigned CNT_W = ROW_AW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  plane_valid,
  input  logic [YF-1:0]         plane,
  output logic                  plane_ready,
  input  logic [YF-1:0]         mask,
  input  logic                  mask_valid,
  output logic                  mask_pop,
  output logic                  w_valid,
  output logic [YF-1:0][Q-1:0]  w,
  output logic [CNT_W-1:0]      groups
);
  localparam int unsigned KW = (Q > 1) ? $clog2(Q) : 1;

  logic [KW-1:0]         k_q;       // planes collected of the current group
  logic [YF-1:0][Q-1:0]  acc_q;
  logic                  last_plane;

  assign last_plane  = (k_q == KW'(Q - 1));
  assign plane_ready = !last_plane || mask_valid;
  assign mask_pop    = plane_valid && last_plane && mask_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_q     <= '0;
      acc_q   <= '0;
      w_valid <= 1'b0;
      w       <= '0;
      groups  <= '0;
    end else if (clr) begin
      k_q     <= '0;
      acc_q   <= '0;
      w_valid <= 1'b0;
      w       <= '0;
      groups  <= '0;
    end else begin
      w_valid <= 1'b0;
      if (plane_valid && plane_ready) begin
        for (int i = 0; i < YF; i++) acc_q[i][k_q] <= plane[i];
        if (last_plane) begin
          k_q     <= '0;
          w_valid <= 1'b1;
          groups  <= groups + CNT_W'(1);
          for (int i = 0; i < YF; i++) begin
            for (int b = 0; b < Q; b++) begin
              if (b == Q - 1) w[i][b] <= plane[i] & mask[i];
              else            w[i][b] <= acc_q[i][b] & mask[i];
            end
          end
        end else begin
          k_q <= k_q + KW'(1);
        end
      end
    end
  end
endmodule
