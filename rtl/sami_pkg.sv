// sami_pkg -- shared constants, record types and the XOR-network generator of the
// sparsity-aware memory interface (SAMI).
//
// The interface decompresses pruned, 8-bit quantised DNN weights that were encoded
// with a stacked XORNet (sXORNet): every cycle a decompressor takes a short
// compressed vector u and expands it, through a fixed network of XOR gates, into a
// longer bit vector v that is one bit-plane of a group of weights. Bits the XOR
// network gets wrong are flipped back by "patches" (error positions) that are
// stored in memory in vertically-arranged form: patch row r holds the r-th patch of
// every decompressor lane, so one row fetch feeds every lane through a fixed
// one-to-one wire.
//
// Numbers that follow the paper: N = 256 lanes, x = 20 compressed bits per LUT
// input (the XORNet(20, 20/(1-S)) configuration, which also matches 2/3 of a
// 960 GB/s memory shared by 256 lanes at 1 GHz), two shift registers of LUT
// history, q = 8 bit weights, B = 256 patches per imbalance FIFO. The half/full
// LUT output sizes (40/80, i.e. sparsity 0.5 and 0.75 around an average of 0.6),
// the record layouts below and the XOR connection pattern are this design's own
// choices.
package sami_pkg;

  // ---- main configuration -------------------------------------------------
  localparam int unsigned N_LANES   = 256; // parallel decompressors
  localparam int unsigned X_BITS    = 20;  // compressed bits per u vector
  localparam int unsigned SR_STAGES = 2;   // shift registers of previous u vectors
  localparam int unsigned Y_HALF    = 40;  // half-size LUT output bits (S_h = 0.5)
  localparam int unsigned Y_FULL    = 80;  // full-size LUT output bits (S_f = 0.75)
  localparam int unsigned Q_BITS    = 8;   // weight precision (bit-planes per weight)
  localparam int unsigned B_DEPTH   = 256; // imbalance FIFO depth (patches)
  localparam int unsigned ROW_AW    = 24;  // row address width of each stream
  localparam int unsigned LUT_IN    = X_BITS * (SR_STAGES + 1);
  localparam int unsigned POS_W     = $clog2(Y_FULL);
  localparam logic [31:0] LUT_SEED  = 32'h5A17_C0DE;

  // ---- memory records -----------------------------------------------------
  // One compressed word: LUT select (1 = half-size LUT), "this vector has
  // patches" flag, and the x compressed bits.
  typedef struct packed {
    logic              half;
    logic              has_patch;
    logic [X_BITS-1:0] u;
  } cword_t;

  // One VA-patch: the bit of the current LUT output to flip, and whether it is
  // the last patch of that output.
  typedef struct packed {
    logic             last;
    logic [POS_W-1:0] pos;
  } patch_t;

  localparam int unsigned CWORD_W = $bits(cword_t);
  localparam int unsigned PATCH_W = $bits(patch_t);

  // ---- XOR network --------------------------------------------------------
  // Row i of the network says which LUT inputs are XORed into output bit i: the
  // low LUT-input bits of {xs(a), a}, where a = xs(xs(seed ^ 0x9E3779B9*(i+1)))
  // and xs is xorshift32. A row that comes out empty is replaced by the single
  // input i mod width (done in sxornet_lut, which knows its input width). The
  // half-size LUT is rows 0..Y_HALF-1 of the full-size one (stacked LUT).
  function automatic logic [31:0] xorshift32(logic [31:0] s);
    logic [31:0] t;
    t = s;
    t = t ^ (t << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  function automatic logic [63:0] lut_row_raw(logic [31:0] seed, int unsigned i);
    logic [31:0] s, a;
    s = seed ^ (32'h9E37_79B9 * (i + 1));
    if (s == 32'd0) s = 32'd1;
    a = xorshift32(xorshift32(s));
    return {xorshift32(a), a};
  endfunction

endpackage
