// dma_ctrl -- DMA channel state: ring buffer space and host addresses.
//
// Every DMA channel has a ring buffer in host memory: a page-aligned base
// address, a power-of-two size of at least 4 KiB, the hardware write pointer
// (bytes handed to the channel so far) and the software read pointer (bytes
// the host has consumed, written by the driver).  All pointers are byte
// counts of the channel's stream; the ring position is the count modulo the
// size.
//
// Packet side: for each packet instruction from the application the block
// computes the bytes the frame will take in the ring (header plus frame
// rounded up to 8 bytes) and passes the instruction on to the scheduler.  If
// the channel is disabled or its ring lacks the space the frame is marked
// dropped (it still travels on, to free its buffer space), so one full
// channel never stops the others.  One instruction per cycle, valid/ready.
//
// Transaction side: a released transaction carries its stream offset; the
// block adds the channel's base address (offset modulo ring size) and hands
// it to the PCI Express side.
//
// Configuration port (a plain register write/read bus): address
// {channel, reg[1:0]}; reg 0 base address, reg 1 {enable, size_log2[5:0]},
// reg 2 software read pointer, reg 3 (read) hardware write pointer.
// Descriptor download and pointer write-back to the host are not part of
// this block (see the documentation).
module dma_ctrl
  import rxfw_pkg::*;
#(
  parameter int unsigned CHANNELS = 256
) (
  input  logic        clk,
  input  logic        rst,
  // configuration
  input  logic        cfg_we,
  input  logic [$clog2(CHANNELS)+1:0] cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  // packet instructions from the application
  input  logic        in_valid,
  output logic        in_ready,
  input  pkt_instr_t  in_pkt,
  output logic        out_valid,
  input  logic        out_ready,
  output pkt_instr_t  out_pkt,
  // transactions
  input  logic        trs_valid,
  output logic        trs_ready,
  input  trs_t        trs,
  output logic        req_valid,
  input  logic        req_ready,
  output trs_req_t    req,
  output logic [31:0] dropped
);
  localparam int unsigned CW = $clog2(CHANNELS);

  logic [63:0] base   [CHANNELS];
  logic [5:0]  szlog  [CHANNELS];
  logic        en     [CHANNELS];
  soff_t       sw_rd  [CHANNELS];
  soff_t       hw_wr  [CHANNELS];

  logic [CW-1:0] pch, tch, cch;
  logic [1:0]    creg;
  soff_t         need, used, size, rmask;
  logic          fits;

  assign cch  = cfg_addr[CW+1:2];
  assign creg = cfg_addr[1:0];

  // packet side
  always_comb begin
    pch  = in_pkt.chan[CW-1:0];
    need = 32'(in_pkt.hdr_len) + 32'(pad_blk(in_pkt.len));
    size = 32'(1) << szlog[pch];
    used = hw_wr[pch] - sw_rd[pch];
    fits = en[pch] && (need <= size - used);
    in_ready  = out_ready;
    out_valid = in_valid;
    out_pkt   = in_pkt;
    out_pkt.drop = in_pkt.drop || !fits;
  end

  // transaction side
  always_comb begin
    tch       = trs.chan[CW-1:0];
    req_valid = trs_valid;
    trs_ready = req_ready;
    req.id    = trs.id;
    req.chan  = trs.chan;
    req.len   = trs.len;
    rmask     = (soff_t'(1) << szlog[tch]) - soff_t'(1);
    req.addr  = base[tch] + {32'd0, trs.off & rmask};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dropped <= '0;
      for (int i = 0; i < CHANNELS; i++) begin
        en[i]    <= 1'b0;
        szlog[i] <= 6'd12;
        base[i]  <= '0;
        sw_rd[i] <= '0;
        hw_wr[i] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        if (!in_pkt.drop && fits) hw_wr[pch] <= hw_wr[pch] + need;
        if (!in_pkt.drop && !fits) dropped <= dropped + 1'b1;
      end
      if (cfg_we) begin
        case (creg)
          2'd0: base[cch]  <= cfg_wdata;
          2'd1: begin en[cch] <= cfg_wdata[6]; szlog[cch] <= cfg_wdata[5:0]; end
          2'd2: sw_rd[cch] <= cfg_wdata[31:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (creg)
      2'd0:    cfg_rdata = base[cch];
      2'd1:    cfg_rdata = {57'd0, en[cch], szlog[cch]};
      2'd2:    cfg_rdata = {32'd0, sw_rd[cch]};
      default: cfg_rdata = {32'd0, hw_wr[cch]};
    endcase
  end
endmodule
