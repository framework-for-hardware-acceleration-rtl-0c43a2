// scheduler -- control path of the BUFFER -> CROSSBAR -> BUFFER RX data path.
//
// Turns packet instructions (frames in the data buffer, headers in the
// header buffer, each with its DMA channel) into PCI Express write
// transactions in the shared DMA buffer, and drives the crossbar that copies
// the data.  The chain, one item per cycle:
//
//   packet_breaker     frame -> subpackets that stay inside one buffer word
//   increment_per_dma  subpacket -> channel stream increment (8-byte padded);
//                      the subpacket waits in the subpacket FIFO
//   page_breaker       cuts increments at 4 KiB host pages (pair FIFO)
//   mtu_breaker        packs increments into PCIE_MTU-byte transactions per
//                      channel, takes free transaction ids, closes idle ones
//                      after a timeout; subtransactions go to the
//                      subtransaction FIFO, transactions to the transaction
//                      FIFO; keeps the barrier state
//   crb_gen            subtransaction + subpacket -> per-block crossbar
//                      instructions
//   planner            collision-free choice of block moves per cycle
//   trans_fifo_ctrl    lets a transaction go to the DMA controller only
//                      when the barrier state confirms its bytes are in the
//                      DMA buffer
//
// The barrier: the planner drains one colour first; when none of it is left
// in the planner or on its way there it pulses barrier, which advances the
// confirmed byte counts.  The oldest coloured item on the way to the planner
// is at the head of the subtransaction FIFO, or in the MTU breaker's output
// register; its colour is what the planner checks.
//
// rd_ptr is the approximate read pointer into the data buffer for the
// decoder.  FIFO depths are this implementation's choice; the transaction
// FIFO holds NUM_TRS entries so that it can never block (each entry owns a
// transaction id).
module scheduler
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W   = 1024,
  parameter int unsigned PPC      = 2,
  parameter int unsigned CHANNELS = 256,
  parameter int unsigned PCIE_MTU = 256,
  parameter int unsigned PAGE     = 4096,
  parameter int unsigned NUM_TRS  = 64,
  parameter int unsigned TIMEOUT  = 1024,
  parameter int unsigned WIN      = 2
) (
  input  logic        clk,
  input  logic        rst,
  // packet instructions
  input  logic        pkt_valid,
  output logic        pkt_ready,
  input  pkt_instr_t  pkt,
  // free transaction ids (FIFO head)
  input  logic        fid_valid,
  input  logic [15:0] fid,
  output logic        fid_pop,
  // transaction instructions to the DMA controller
  output logic        trs_valid,
  input  logic        trs_ready,
  output trs_t        trs,
  // crossbar control
  output logic [DATA_W/64-1:0] pl_valid,
  output crb_t        pl_crb [DATA_W/64],
  // approximate data buffer read pointer
  output wptr_t       rd_ptr,
  output logic        barrier
);
  localparam int unsigned NCOL = DATA_W / 64;

  // packet breaker -> increment per DMA
  logic  sp_valid, sp_ready, pb_busy;
  spkt_t sp;
  packet_breaker #(.DATA_W(DATA_W), .PPC(PPC)) u_pb (
    .clk, .rst,
    .in_valid(pkt_valid), .in_ready(pkt_ready), .in_instr(pkt),
    .out_valid(sp_valid), .out_ready(sp_ready), .out_spkt(sp), .busy(pb_busy)
  );

  // subpacket FIFO
  logic  spf_wr, spf_rd, spf_empty, spf_full, spf_af;
  spkt_t spf_in, spf_out;
  logic [$clog2(33)-1:0] spf_cnt;
  fifo #(.T(spkt_t), .DEPTH(32)) u_spkt_fifo (
    .clk, .rst, .wr_en(spf_wr), .wr_data(spf_in), .rd_en(spf_rd), .rd_data(spf_out),
    .empty(spf_empty), .full(spf_full), .almost_full(spf_af), .count(spf_cnt)
  );

  // increment per DMA -> page breaker
  logic inc_valid, pair_af;
  inc_t inc;
  increment_per_dma u_ipd (
    .clk, .rst,
    .in_valid(sp_valid), .in_ready(sp_ready), .in_spkt(sp),
    .spkt_wr(spf_wr), .spkt_data(spf_in), .spkt_full(spf_full),
    .inc_valid, .inc, .inc_stop(pair_af)
  );

  logic   pg_valid, pg_busy;
  pinc2_t pg_pair;
  page_breaker #(.CHANNELS(CHANNELS), .PAGE(PAGE)) u_pg (
    .clk, .rst, .in_valid(inc_valid), .in_inc(inc),
    .out_valid(pg_valid), .out_pair(pg_pair), .busy(pg_busy)
  );

  // pair FIFO: five increments may be in flight when almost_full is seen
  logic   pf_rd, pf_empty, pf_full;
  pinc2_t pf_out;
  logic [$clog2(17)-1:0] pf_cnt;
  fifo #(.T(pinc2_t), .DEPTH(16), .AF_LEVEL(10)) u_pair_fifo (
    .clk, .rst, .wr_en(pg_valid), .wr_data(pg_pair), .rd_en(pf_rd), .rd_data(pf_out),
    .empty(pf_empty), .full(pf_full), .almost_full(pair_af), .count(pf_cnt)
  );

  // MTU breaker
  logic  st_wr, st_af, st_rd, st_empty, st_full;
  strs_t st_in, st_out;
  logic  tr_wr, tr_af, tr_rd, tr_empty, tr_full;
  trs_t  tr_in, tr_out;
  soff_t sum_dma [CHANNELS];
  mtu_breaker #(.CHANNELS(CHANNELS), .PCIE_MTU(PCIE_MTU), .TIMEOUT(TIMEOUT)) u_mtu (
    .clk, .rst,
    .in_valid(!pf_empty), .in_pair(pf_out), .in_pop(pf_rd),
    .fid_valid, .fid, .fid_pop,
    .strs_wr(st_wr), .strs(st_in), .strs_stop(st_af),
    .trs_wr(tr_wr), .trs(tr_in), .trs_stop(tr_af),
    .barrier, .sum_dma, .rd_ptr
  );

  logic [$clog2(9)-1:0] st_cnt;
  fifo #(.T(strs_t), .DEPTH(8), .AF_LEVEL(6)) u_strs_fifo (
    .clk, .rst, .wr_en(st_wr), .wr_data(st_in), .rd_en(st_rd), .rd_data(st_out),
    .empty(st_empty), .full(st_full), .almost_full(st_af), .count(st_cnt)
  );

  logic [$clog2(NUM_TRS+2)-1:0] tr_cnt;
  fifo #(.T(trs_t), .DEPTH(NUM_TRS + 1), .AF_LEVEL(NUM_TRS)) u_trs_fifo (
    .clk, .rst, .wr_en(tr_wr), .wr_data(tr_in), .rd_en(tr_rd), .rd_data(tr_out),
    .empty(tr_empty), .full(tr_full), .almost_full(tr_af), .count(tr_cnt)
  );

  trans_fifo_ctrl #(.CHANNELS(CHANNELS)) u_tfc (
    .clk, .rst,
    .in_valid(!tr_empty), .in_trs(tr_out), .in_pop(tr_rd),
    .sum_dma,
    .out_valid(trs_valid), .out_trs(trs), .out_ready(trs_ready)
  );

  // crossbar instruction generator -> planner
  logic            cg_valid, cg_ready;
  logic [NCOL-1:0] cg_mask;
  crb_t            cg_crb [NCOL];
  crb_gen #(.DATA_W(DATA_W), .PCIE_MTU(PCIE_MTU)) u_cg (
    .clk, .rst,
    .strs_valid(!st_empty), .strs(st_out), .strs_pop(st_rd),
    .spkt_valid(!spf_empty), .spkt(spf_out), .spkt_pop(spf_rd),
    .out_valid(cg_valid), .out_ready(cg_ready), .out_mask(cg_mask), .out_crb(cg_crb)
  );

  // oldest coloured item still on its way to the planner
  logic up_valid, up_color, pl_empty;
  always_comb begin
    if (!st_empty)  begin up_valid = 1'b1; up_color = st_out.color; end
    else if (st_wr) begin up_valid = 1'b1; up_color = st_in.color;  end
    else            begin up_valid = 1'b0; up_color = 1'b0;         end
  end

  planner #(.DATA_W(DATA_W), .WIN(WIN)) u_pl (
    .clk, .rst,
    .in_valid(cg_valid), .in_ready(cg_ready), .in_mask(cg_mask), .in_crb(cg_crb),
    .up_valid, .up_color,
    .barrier, .empty(pl_empty), .pl_valid, .pl_crb
  );
endmodule
