// row_fetcher -- regular, lock-step fetch of one memory stream stored row-wise.
//
// What it does: the compressed words (and the mask words) of the N lanes are
// stored so that memory row r holds entry r of every lane; one row read therefore
// hands every lane its next entry through a fixed wire, with no distributing
// network. This block walks the row addresses 0..rows-1 and issues one read per
// cycle while every lane's FIFO still has room for the row in flight; otherwise
// it waits (blocked = 1 for that cycle), which is where a lane that stalls on
// patches slows the whole stream down.
//
// Interface: start clears the address and loads rows. rd_en/rd_addr go to the
// memory, which returns the row one cycle later; resp_push is rd_en delayed by
// one cycle and tells every lane FIFO to take its slice of the returned row.
// lane_count are the lane FIFOs' fill levels. finished = all rows issued and
// returned.
//
// Follows the paper: regular row-wise access of compressed weights. This
// design's own choices: read latency of one cycle, one outstanding row at a time
// per cycle, and the all-lanes-have-room issue rule.
module row_fetcher #(
  parameter int unsigned N     = 256,
  parameter int unsigned DEPTH = 4,
  parameter int unsigned AW    = 24
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic [AW-1:0]                    rows,
  input  logic [N-1:0][$clog2(DEPTH+1)-1:0] lane_count,
  output logic                             rd_en,
  output logic [AW-1:0]                    rd_addr,
  output logic                             resp_push,
  output logic                             blocked,
  output logic                             finished
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [AW-1:0] rows_q, addr_q;
  logic          all_room;

  always_comb begin
    all_room = 1'b1;
    for (int i = 0; i < N; i++) begin
      // room for one more row besides the one still in flight
      if ({1'b0, lane_count[i]} + (CW + 1)'(resp_push) >= (CW + 1)'(DEPTH))
        all_room = 1'b0;
    end
  end

  assign rd_en    = (addr_q < rows_q) && all_room;
  assign rd_addr  = addr_q;
  assign blocked  = (addr_q < rows_q) && !all_room;
  assign finished = (addr_q == rows_q) && !resp_push;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_q    <= '0;
      addr_q    <= '0;
      resp_push <= 1'b0;
    end else if (start) begin
      rows_q    <= rows;
      addr_q    <= '0;
      resp_push <= 1'b0;
    end else begin
      resp_push <= rd_en;
      if (rd_en) addr_q <= addr_q + AW'(1);
    end
  end
endmodule
