// fifo -- synchronous first-in first-out buffer with an almost-full flag.
//
// Joins a pipeline part that has no backpressure to one that has (the
// "pipeline with almost full" principle): the upstream stages run freely and
// stop taking new work when almost_full is set, and the FIFO keeps room for
// the items already in flight.  A register array with a read and a write
// pointer; wr_en writes wr_data, rd_en removes the head, rd_data always shows
// the head (first-word fall-through).  almost_full is set when at least
// AF_LEVEL items are held.  Writing when full or reading when empty is an
// error, caught by the assertions.  Depth and threshold are chosen by the
// instantiating block.
module fifo #(
  parameter type         T        = logic [7:0],
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned AF_LEVEL = DEPTH - 1
) (
  input  logic clk,
  input  logic rst,
  input  logic wr_en,
  input  T     wr_data,
  input  logic rd_en,
  output T     rd_data,
  output logic empty,
  output logic full,
  output logic almost_full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) begin
        mem[wp] <= wr_data;
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(wr_en) - ($clog2(DEPTH+1))'(rd_en);
    end
  end

  assign rd_data     = mem[rp];
  assign empty       = (count == 0);
  assign full        = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign almost_full = (count >= ($clog2(DEPTH+1))'(AF_LEVEL));

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
