// sxornet_lut -- stacked bit-level XOR look-up table with input shift registers.
//
// What it does: expands one x-bit compressed vector u into a y-bit vector v, the
// raw (uncorrected) decompressed bit-plane. Each output bit is the XOR of a fixed
// subset of LUT inputs. The LUT inputs are the current u plus the SR previous u
// vectors, held in SR shift registers, which widens the set of outputs the LUT can
// represent. Two LUT sizes share one network: the full-size LUT drives all YF
// outputs; the half-size LUT is its first YH rows, so selecting it costs only the
// output gating (the "stacked" LUT of sXORNet).
//
// Interface: u/half are the current compressed vector and LUT select; v is valid
// combinationally in the same cycle (bits YH..YF-1 are zero when half = 1).
// Asserting adv shifts u into the history at the clock edge; clr empties the
// history, as at the start of every stream.
//
// Follows the paper: XOR-gate LUT, two shift registers, half/full stacked
// LUT selected per vector. This design's own choice: the connection pattern,
// which the paper trains per model; here it is generated from SEED (see
// sami_pkg::lut_row_raw) and can be replaced by overriding SEED.
module sxornet_lut
  import sami_pkg::*;
#(
  parameter int unsigned X    = X_BITS,
  parameter int unsigned SR   = SR_STAGES,
  parameter int unsigned YH   = Y_HALF,
  parameter int unsigned YF   = Y_FULL,
  parameter logic [31:0] SEED = LUT_SEED
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          adv,
  input  logic [X-1:0]  u,
  input  logic          half,
  output logic [YF-1:0] v
);
  localparam int unsigned LIN = X * (SR + 1);

  // history: hist[X*k +: X] is the u vector of k+1 steps ago
  logic [X*SR-1:0] hist;
  logic [LIN-1:0]  lut_in;

  // connection matrix, computed at elaboration
  function automatic logic [LIN-1:0] row(int unsigned i);
    logic [63:0]    raw;
    logic [LIN-1:0] r;
    raw = lut_row_raw(SEED, i);
    r   = raw[LIN-1:0];
    if (r == '0) r[i % LIN] = 1'b1;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   hist <= '0;
    else if (clr) hist <= '0;
    else if (adv) hist <= lut_in[X*SR-1:0];
  end

  assign lut_in = {hist, u};

  for (genvar i = 0; i < YF; i++) begin : g_row
    localparam logic [LIN-1:0] M = row(i);
    if (i < YH) begin : g_half
      assign v[i] = ^(lut_in & M);
    end else begin : g_stack
      assign v[i] = ~half & (^(lut_in & M));
    end
  end

  initial begin
    assert (LIN <= 64) else $error("sxornet_lut: X*(SR+1) must be at most 64");
    assert (YH <= YF)  else $error("sxornet_lut: YH must not exceed YF");
  end
endmodule
