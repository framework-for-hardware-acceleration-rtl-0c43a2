// rx_framework -- single RX data path: 400G Ethernet to many host DMA channels.
//
// Received frames go from a wide MII stream into host memory, spread over
// CHANNELS independent DMA ring buffers, with up to PPC frames per clock
// cycle.  Data takes one BUFFER -> CROSSBAR -> BUFFER path:
//
//   MII -> mii_decoder -> data_buffer --+
//              |                        +--> crossbar -> dma_buffer -> pcie_axi_wr -> PCIe
//              +-> process -> header_buffer
//                     |
//                     +-> packet instruction FIFO -> dma_ctrl -> pipe -> scheduler
//
// The decoder writes every word holding frame bytes into the data buffer
// and reports each frame to the application core (process), which picks a
// DMA channel, writes a header and queues a packet instruction.  The DMA
// controller checks ring space, then the scheduler plans how each frame's
// 8-byte blocks are copied by the crossbar into PCI Express write
// transactions in the shared DMA buffer, collision-free, and releases a
// transaction to the DMA controller once all its blocks are in.  The
// PCI Express side reads it out, sends it, and returns the slot id to the
// free-id FIFO.  The only per-channel state is a few counters in the
// scheduler and DMA controller; all buffers are shared by all channels.
//
// Ports: MII receive word (rxd, rxc) every cycle; a configuration bus for the
// DMA channels (see dma_ctrl); the outgoing PCI Express write stream (see
// pcie_axi_wr); counters of frames lost for lack of buffer space
// (discarded) or ring space (dropped).  Defaults are the 400 Gb/s setting:
// 1024-bit words, 2 frames per cycle, 256 channels, 256-byte PCI Express
// payload, 4 KiB pages.
module rx_framework
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W     = 1024,
  parameter int unsigned PPC        = 2,
  parameter int unsigned CHANNELS   = 256,
  parameter int unsigned PCIE_MTU   = 256,
  parameter int unsigned PAGE       = 4096,
  parameter int unsigned NUM_TRS    = 64,
  parameter int unsigned DBUF_WORDS = 512,
  parameter int unsigned ETH_MTU    = 1518,
  parameter int unsigned HDR_LEN    = 8,
  parameter int unsigned TIMEOUT    = 1024,
  parameter int unsigned PKT_FIFO   = 64
) (
  input  logic                clk,
  input  logic                rst,
  // MII receive
  input  logic [DATA_W-1:0]   rxd,
  input  logic [DATA_W/8-1:0] rxc,
  // DMA channel configuration
  input  logic                cfg_we,
  input  logic [$clog2(CHANNELS)+1:0] cfg_addr,
  input  logic [63:0]         cfg_wdata,
  output logic [63:0]         cfg_rdata,
  // PCI Express write stream
  output logic                tvalid,
  input  logic                tready,
  output logic [DATA_W-1:0]   tdata,
  output logic [DATA_W/8-1:0] tkeep,
  output logic                tsop,
  output logic                tlast,
  output logic [63:0]         tuser_addr,
  output logic [15:0]         tuser_len,
  output logic [15:0]         tuser_chan,
  // statistics
  output logic [31:0]         discarded,
  output logic [31:0]         dropped
);
  localparam int unsigned NCOL   = DATA_W / 64;
  localparam int unsigned DAW    = $clog2(DBUF_WORDS);
  localparam int unsigned ROWS   = (PCIE_MTU / (DATA_W / 8) > 0) ? PCIE_MTU / (DATA_W / 8) : 1;
  localparam int unsigned DMA_D  = NUM_TRS * ROWS;
  localparam int unsigned MAW    = (DMA_D > 1) ? $clog2(DMA_D) : 1;
  localparam int unsigned RGW    = $clog2(PPC > 1 ? PPC : 2);

  // ------------------------------------------------------------ decoder
  wptr_t             rd_ptr, wr_ptr, buf_wptr;
  logic              buf_we, room_ok;
  logic [DATA_W-1:0] buf_wdata;
  logic [PPC-1:0]    meta_valid;
  dec_meta_t         meta [PPC];

  mii_decoder #(.DATA_W(DATA_W), .PPC(PPC), .DBUF_WORDS(DBUF_WORDS), .ETH_MTU(ETH_MTU)) u_dec (
    .clk, .rst, .rxd, .rxc, .rd_ptr, .room_ok,
    .buf_we, .buf_wptr, .buf_wdata, .meta_valid, .meta, .discarded, .wr_ptr
  );

  // ------------------------------------------------------------ buffers
  logic [DAW-1:0] dbuf_raddr [NCOL], hbuf_raddr [NCOL];
  logic [63:0]    dbuf_rdata [NCOL], hbuf_rdata [NCOL];

  data_buffer #(.DATA_W(DATA_W), .DEPTH(DBUF_WORDS)) u_dbuf (
    .clk, .we(buf_we), .waddr(buf_wptr[DAW-1:0]), .wdata(buf_wdata),
    .raddr(dbuf_raddr), .rdata(dbuf_rdata)
  );

  logic [PPC-1:0]        hb_we;
  logic [DAW-1:0]        hb_waddr [PPC];
  logic [RGW-1:0]        hb_wregion [PPC];
  logic [DATA_W/PPC-1:0] hb_wdata [PPC];
  logic [NCOL/PPC-1:0]   hb_wblk_en [PPC];

  header_buffer #(.DATA_W(DATA_W), .PPC(PPC), .DEPTH(DBUF_WORDS)) u_hbuf (
    .clk, .we(hb_we), .waddr(hb_waddr), .wregion(hb_wregion), .wdata(hb_wdata),
    .wblk_en(hb_wblk_en), .raddr(hbuf_raddr), .rdata(hbuf_rdata)
  );

  // ------------------------------------------------------------ application
  logic [PPC-1:0] pi_valid;
  pkt_instr_t     pi [PPC];

  process #(.DATA_W(DATA_W), .PPC(PPC), .CHANNELS(CHANNELS), .DBUF_WORDS(DBUF_WORDS),
            .HDR_LEN(HDR_LEN)) u_proc (
    .clk, .rst, .meta_valid, .meta,
    .hb_we, .hb_waddr, .hb_wregion, .hb_wdata, .hb_wblk_en,
    .pi_valid, .pi
  );

  // packet instruction FIFO; frames still inside the decoder and the
  // application need room too
  logic       pq_empty, pq_rd;
  pkt_instr_t pq_out;
  logic [$clog2(PKT_FIFO+1)-1:0] pq_cnt;
  fifo_mw #(.T(pkt_instr_t), .WP(PPC), .DEPTH(PKT_FIFO)) u_pkt_fifo (
    .clk, .rst, .wr_en(pi_valid), .wr_data(pi), .rd_en(pq_rd), .rd_data(pq_out),
    .empty(pq_empty), .count(pq_cnt)
  );
  assign room_ok = 32'(pq_cnt) + 32'(4 * PPC + 2) <= 32'(PKT_FIFO);

  // ------------------------------------------------------------ DMA control
  logic       dc_valid, dc_ready, dc_in_ready;
  pkt_instr_t dc_pkt;
  logic       s_valid, s_ready;
  pkt_instr_t s_pkt;
  logic       trs_valid, trs_ready;
  trs_t       trs;
  logic       req_valid, req_ready;
  trs_req_t   req;

  dma_ctrl #(.CHANNELS(CHANNELS)) u_dma (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .in_valid(!pq_empty), .in_ready(dc_in_ready), .in_pkt(pq_out),
    .out_valid(dc_valid), .out_ready(dc_ready), .out_pkt(dc_pkt),
    .trs_valid, .trs_ready, .trs, .req_valid, .req_ready, .req, .dropped
  );
  assign pq_rd = !pq_empty && dc_in_ready;

  pipe #(.T(pkt_instr_t)) u_pipe (
    .clk, .rst, .in_data(dc_pkt), .in_src_rdy(dc_valid), .in_dst_rdy(dc_ready),
    .out_data(s_pkt), .out_src_rdy(s_valid), .out_dst_rdy(s_ready)
  );

  // ------------------------------------------------------------ scheduler
  logic        fid_valid, fid_pop, fid_full, fid_af, fq_empty, free_wr;
  logic [15:0] fid, free_id;
  logic [$clog2(NUM_TRS+1)-1:0] fq_cnt;
  logic [NCOL-1:0] pl_valid;
  crb_t            pl_crb [NCOL];
  logic            barrier;

  fifo #(.T(logic [15:0]), .DEPTH(NUM_TRS)) u_free_fifo (
    .clk, .rst, .wr_en(free_wr), .wr_data(free_id), .rd_en(fid_pop), .rd_data(fid),
    .empty(fq_empty), .full(fid_full), .almost_full(fid_af), .count(fq_cnt)
  );
  assign fid_valid = !fq_empty;

  scheduler #(.DATA_W(DATA_W), .PPC(PPC), .CHANNELS(CHANNELS), .PCIE_MTU(PCIE_MTU),
              .PAGE(PAGE), .NUM_TRS(NUM_TRS), .TIMEOUT(TIMEOUT)) u_sch (
    .clk, .rst,
    .pkt_valid(s_valid), .pkt_ready(s_ready), .pkt(s_pkt),
    .fid_valid, .fid, .fid_pop,
    .trs_valid, .trs_ready, .trs,
    .pl_valid, .pl_crb, .rd_ptr, .barrier
  );

  // ------------------------------------------------------------ crossbar
  logic           dma_we    [NCOL];
  logic [MAW-1:0] dma_waddr [NCOL];
  logic [63:0]    dma_wdata [NCOL];
  logic [MAW-1:0] dma_raddr;
  logic [DATA_W-1:0] dma_rdata;

  crossbar #(.DATA_W(DATA_W), .DBUF_WORDS(DBUF_WORDS), .DMA_DEPTH(DMA_D)) u_xbar (
    .clk, .rst, .pl_valid, .pl_crb,
    .dbuf_raddr, .dbuf_rdata, .hbuf_raddr, .hbuf_rdata,
    .dma_we, .dma_waddr, .dma_wdata
  );

  dma_buffer #(.DATA_W(DATA_W), .PCIE_MTU(PCIE_MTU), .NUM_TRS(NUM_TRS)) u_dmabuf (
    .clk, .we(dma_we), .waddr(dma_waddr), .wdata(dma_wdata),
    .raddr(dma_raddr), .rdata(dma_rdata)
  );

  // ------------------------------------------------------------ PCI Express
  pcie_axi_wr #(.DATA_W(DATA_W), .PCIE_MTU(PCIE_MTU), .NUM_TRS(NUM_TRS)) u_axi (
    .clk, .rst, .req_valid, .req_ready, .req,
    .raddr(dma_raddr), .rdata(dma_rdata), .free_wr, .free_id,
    .tvalid, .tready, .tdata, .tkeep, .tsop, .tlast, .tuser_addr, .tuser_len, .tuser_chan
  );
endmodule
