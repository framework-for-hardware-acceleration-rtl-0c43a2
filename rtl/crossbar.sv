// crossbar -- moves planned 8-byte blocks into the DMA buffer.
//
// The only data reordering of the whole RX path.  It has no decisions of its
// own: the planner's output, one entry per DMA buffer column, says for each
// destination column which source buffer (data or header), word and column
// to read and which DMA buffer row to write.  In the first cycle every
// source column gets the word address of the entry that reads it (the
// planner guarantees there is at most one per column and buffer); the read
// data arrive a cycle later, when each destination column selects its source
// column through a NCOL-to-1 multiplexer and writes.  Blocks planned at
// cycle t are in the DMA buffer at the end of cycle t+1.
module crossbar
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W     = 1024,
  parameter int unsigned DBUF_WORDS = 512,
  parameter int unsigned DMA_DEPTH  = 128
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic [DATA_W/64-1:0]          pl_valid,
  input  crb_t                          pl_crb [DATA_W/64],
  // data and header buffer read ports
  output logic [$clog2(DBUF_WORDS)-1:0] dbuf_raddr [DATA_W/64],
  input  logic [63:0]                   dbuf_rdata [DATA_W/64],
  output logic [$clog2(DBUF_WORDS)-1:0] hbuf_raddr [DATA_W/64],
  input  logic [63:0]                   hbuf_rdata [DATA_W/64],
  // DMA buffer write ports
  output logic                          dma_we    [DATA_W/64],
  output logic [$clog2(DMA_DEPTH)-1:0]  dma_waddr [DATA_W/64],
  output logic [63:0]                   dma_wdata [DATA_W/64]
);
  localparam int unsigned NCOL = DATA_W / 64;
  localparam int unsigned CB   = $clog2(NCOL);

  logic [NCOL-1:0] v_q;
  crb_t            c_q [NCOL];

  always_comb begin
    for (int s = 0; s < NCOL; s++) begin
      dbuf_raddr[s] = '0;
      hbuf_raddr[s] = '0;
    end
    for (int d = 0; d < NCOL; d++)
      if (pl_valid[d]) begin
        if (pl_crb[d].hdr)
          hbuf_raddr[pl_crb[d].src_col[CB-1:0]] = pl_crb[d].src_word[$clog2(DBUF_WORDS)-1:0];
        else
          dbuf_raddr[pl_crb[d].src_col[CB-1:0]] = pl_crb[d].src_word[$clog2(DBUF_WORDS)-1:0];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) v_q <= '0;
    else     v_q <= pl_valid;
    c_q <= pl_crb;
  end

  always_comb begin
    for (int d = 0; d < NCOL; d++) begin
      dma_we[d]    = v_q[d];
      dma_waddr[d] = c_q[d].dst_row[$clog2(DMA_DEPTH)-1:0];
      dma_wdata[d] = c_q[d].hdr ? hbuf_rdata[c_q[d].src_col[CB-1:0]]
                                : dbuf_rdata[c_q[d].src_col[CB-1:0]];
    end
  end

  a_dst_col: assert property (@(posedge clk) disable iff (rst)
    v_q[0] |-> c_q[0].dst_col == 0);
endmodule
