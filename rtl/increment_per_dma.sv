// increment_per_dma -- turns subpackets into per-channel stream increments.
//
// Each subpacket advances its DMA channel's byte stream in host memory by
// its length rounded up to whole 8-byte blocks (frames are stored block
// aligned in the ring buffers, so the crossbar never has to shift bytes).
// The increment goes on to the page breaker; the subpacket itself is kept in
// the subpacket FIFO for the crossbar instruction generator.  A subpacket
// with nodata produces a zero increment that only carries its word pointer
// and is not stored.  This implementation takes one subpacket per cycle, so
// every increment holds a single subpacket; with several subpackets per
// cycle the stage would add up those of the same channel.
module increment_per_dma
  import rxfw_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  spkt_t in_spkt,
  // subpacket FIFO write side
  output logic  spkt_wr,
  output spkt_t spkt_data,
  input  logic  spkt_full,
  // increment output (no backpressure: caller holds inc_stop)
  output logic  inc_valid,
  output inc_t  inc,
  input  logic  inc_stop
);
  assign in_ready  = !inc_stop && !spkt_full;
  assign spkt_wr   = in_valid && in_ready && !in_spkt.nodata;
  assign spkt_data = in_spkt;

  always_ff @(posedge clk) begin
    if (rst) inc_valid <= 1'b0;
    else     inc_valid <= in_valid && in_ready;
    inc.nodata <= in_spkt.nodata;
    inc.chan   <= in_spkt.chan;
    inc.word   <= in_spkt.word;
    inc.len    <= in_spkt.nodata ? 16'd0 : pad_blk(in_spkt.len);
  end
endmodule
