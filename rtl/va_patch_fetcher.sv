// va_patch_fetcher -- fetches rows of vertically-arranged (VA) patches and
// re-accesses rows that a full imbalance FIFO had to miss.
//
// What it does: patches are stored so that patch row r holds the r-th patch of
// every lane, so a row read feeds each lane's imbalance FIFO directly. Lanes
// consume patches at different speeds (a lane decoding locally dense data needs
// many, one on sparse data few), so their FIFOs fill unevenly. Each lane keeps
// the index of the next patch row it still has to receive (next_row). A lane can
// take a row when its FIFO has room. Every cycle the fetcher reads the lowest
// next_row among lanes that have room; every such lane whose next_row equals that
// address takes its patch. A lane whose FIFO is full simply does not take the row,
// and later, once it has drained, its lower next_row makes the fetcher read that
// row again: a re-access, the extra memory cycle the imbalance costs when the
// FIFO depth B is below the model's peak imbalance. With B large enough every row
// is read exactly once, in order.
//
// Interface: start clears all lane pointers and loads rows. rd_en/rd_addr go to
// the memory, which returns the row one cycle later; take[i] (registered) tells
// lane i to push its slice of the returned row. Space is reserved when a read is
// issued, so a returned patch always fits. reaccess pulses when a read goes to a
// row below the highest row read so far; miss pulses when a lane that wanted the
// row being read had no room.
//
// Follows the paper: VA-patch rows with one-to-one lane wiring, fixed-depth
// imbalance FIFOs, and re-accessing missed VA-patches when the imbalance exceeds
// B. This design's own choices: the lowest-pointer-first read policy, the
// one-cycle read latency and the space reservation.
module va_patch_fetcher #(
  parameter int unsigned N  = 256,
  parameter int unsigned B  = 256,
  parameter int unsigned AW = 24
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [AW-1:0]                 rows,
  input  logic [N-1:0][$clog2(B+1)-1:0] lane_count,
  output logic                          rd_en,
  output logic [AW-1:0]                 rd_addr,
  output logic [N-1:0]                  take,
  output logic                          reaccess,
  output logic                          miss,
  output logic                          finished
);
  localparam int unsigned CW = $clog2(B + 1);

  logic [AW-1:0]        rows_q;
  logic [N-1:0][AW-1:0] next_row_q;
  logic [AW-1:0]        hiwater_q;      // one above the highest row read so far
  logic [N-1:0]         room, cand, take_d;
  logic [AW-1:0]        min_row;
  logic                 any_cand;

  always_comb begin
    any_cand = 1'b0;
    min_row  = '1;
    for (int i = 0; i < N; i++) begin
      room[i] = ({1'b0, lane_count[i]} + (CW + 1)'(take[i])) < (CW + 1)'(B);
      cand[i] = room[i] && (next_row_q[i] < rows_q);
      if (cand[i]) begin
        any_cand = 1'b1;
        if (next_row_q[i] < min_row) min_row = next_row_q[i];
      end
    end
  end

  always_comb begin
    miss = 1'b0;
    for (int i = 0; i < N; i++) begin
      take_d[i] = any_cand && cand[i] && (next_row_q[i] == min_row);
      if (any_cand && !room[i] && (next_row_q[i] == min_row)) miss = 1'b1;
    end
  end

  assign rd_en    = any_cand;
  assign rd_addr  = min_row;
  assign reaccess = any_cand && (min_row < hiwater_q);

  always_comb begin
    finished = (take == '0);
    for (int i = 0; i < N; i++)
      if (next_row_q[i] < rows_q) finished = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rows_q     <= '0;
      next_row_q <= '0;
      hiwater_q  <= '0;
      take       <= '0;
    end else if (start) begin
      rows_q     <= rows;
      next_row_q <= '0;
      hiwater_q  <= '0;
      take       <= '0;
    end else begin
      take <= take_d;
      for (int i = 0; i < N; i++)
        if (take_d[i]) next_row_q[i] <= next_row_q[i] + AW'(1);
      if (any_cand && min_row >= hiwater_q) hiwater_q <= min_row + AW'(1);
    end
  end
endmodule
