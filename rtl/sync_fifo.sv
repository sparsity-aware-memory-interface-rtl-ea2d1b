// sync_fifo -- single-clock first-word-fall-through FIFO.
//
// Used as the imbalance FIFO of every decompressor lane (DEPTH = B = 256 VA-patches
// in the main configuration): it keeps patches that were fetched together with
// the other lanes' patches but that this lane has not yet needed, so that a lane
// whose outputs are locally sparse (few patches) does not force the memory to
// fetch its patch rows again. The same module also buffers the compressed words
// and mask words of each lane.
//
// Interface: push writes din at the clock edge when not full (a push into a full
// FIFO is ignored and flagged by an assertion); pop removes the head when not
// empty. dout shows the head combinationally whenever empty = 0. count is the
// number of stored entries. clr empties the FIFO synchronously.
//
// Follows the paper: a per-decompressor FIFO of depth B. This design's own
// choice: storage as a register array with a combinational read port, and the
// circular-pointer organisation.
module sync_fifo #(
  parameter int unsigned WIDTH = 6,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= inc(wptr);
      if (do_pop)  rptr <= inc(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  // pushing into a full FIFO or popping an empty one is a protocol error
  assert property (@(posedge clk) disable iff (!rst_n || clr) push |-> !full)
    else $error("sync_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n || clr) pop |-> !empty)
    else $error("sync_fifo: pop while empty");
endmodule
