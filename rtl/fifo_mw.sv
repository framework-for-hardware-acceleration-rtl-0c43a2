// fifo_mw -- FIFO with several write ports and one read port.
//
// Up to WP items can be written per cycle (wr_en is a bit per port; enabled
// ports are stored in port order, port 0 first) and one item is read.  Used
// where up to PPC frames end in one clock cycle.  First-word fall-through
// read, count of held items, assertion against overflow.
module fifo_mw #(
  parameter type         T     = logic [7:0],
  parameter int unsigned WP    = 2,
  parameter int unsigned DEPTH = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [WP-1:0] wr_en,
  input  T              wr_data [WP],
  input  logic          rd_en,
  output T              rd_data,
  output logic          empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  T mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    logic [AW-1:0] p;
    int unsigned   n;
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      p = wp;
      n = 0;
      for (int i = 0; i < WP; i++)
        if (wr_en[i]) begin
          mem[p] <= wr_data[i];
          p = (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
          n++;
        end
      wp <= p;
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(n) - ($clog2(DEPTH+1))'(rd_en);
    end
  end

  assign rd_data = mem[rp];
  assign empty   = (count == 0);

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    32'(count) + 32'($countones(wr_en)) <= 32'(DEPTH) + (rd_en ? 1 : 0));
endmodule
