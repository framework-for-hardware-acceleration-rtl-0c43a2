// trans_fifo_ctrl -- releases transactions once their data is in the DMA buffer.
//
// The MTU breaker emits a transaction instruction as soon as the transaction
// is planned, but its blocks reach the DMA buffer later and possibly out of
// order.  This block looks at the head of the transaction FIFO and keeps,
// per DMA channel, the number of stream bytes already released.  The head is
// released when its length is at most the confirmed byte count of its
// channel (sum_dma from the page breaker) minus the released count; it then
// goes to the DMA controller and the released count grows by its length.
// Transactions of one channel are released in order.  Valid/ready towards
// the DMA controller; the FIFO head is popped on transfer.
module trans_fifo_ctrl
  import rxfw_pkg::*;
#(
  parameter int unsigned CHANNELS = 256
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  trs_t  in_trs,
  output logic  in_pop,
  input  soff_t sum_dma [CHANNELS],
  output logic  out_valid,
  output trs_t  out_trs,
  input  logic  out_ready
);
  localparam int unsigned CW = $clog2(CHANNELS);

  soff_t         released [CHANNELS];
  logic [CW-1:0] ch;
  soff_t         avail;

  assign ch        = in_trs.chan[CW-1:0];
  assign avail     = sum_dma[ch] - released[ch];
  assign out_valid = in_valid && (32'(in_trs.len) <= avail);
  assign out_trs   = in_trs;
  assign in_pop    = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < CHANNELS; i++) released[i] <= '0;
    end else if (in_pop) begin
      released[ch] <= released[ch] + 32'(in_trs.len);
    end
  end
endmodule
