// pcie_axi_wr -- PCI Express side: sends finished transactions to the host.
//
// Takes transaction requests (DMA buffer slot, host address, length) from
// the DMA controller, reads the slot's words from the DMA buffer and sends
// each transaction as one memory-write request on an AXI4-Stream style
// interface towards the PCI Express hard block: tdata carries payload words,
// the first beat also carries the request header (tuser_addr, tuser_len,
// tuser_chan with tsop), tlast marks the last beat, tkeep the valid bytes.
// When the last word of a slot has been read its id goes back to the free-id
// FIFO (free_wr).  After reset the block first fills that FIFO with all
// NUM_TRS ids, one per cycle.
//
// The DMA buffer read has one cycle of latency, so the words go through a
// small output FIFO whose almost-full flag stops the reads (two words may be
// in flight).  One word per cycle when the host side is ready.  The exact
// signal set of a vendor PCI Express block is not modelled; this stream is
// this implementation's stand-in for it.
module pcie_axi_wr
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W   = 1024,
  parameter int unsigned PCIE_MTU = 256,
  parameter int unsigned NUM_TRS  = 64,
  localparam int unsigned ROWS    = (PCIE_MTU / (DATA_W / 8) > 0) ? PCIE_MTU / (DATA_W / 8) : 1,
  localparam int unsigned DEPTH   = NUM_TRS * ROWS,
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_valid,
  output logic              req_ready,
  input  trs_req_t          req,
  // DMA buffer read port
  output logic [AW-1:0]     raddr,
  input  logic [DATA_W-1:0] rdata,
  // free transaction ids
  output logic              free_wr,
  output logic [15:0]       free_id,
  // stream towards PCI Express
  output logic              tvalid,
  input  logic              tready,
  output logic [DATA_W-1:0] tdata,
  output logic [DATA_W/8-1:0] tkeep,
  output logic              tsop,
  output logic              tlast,
  output logic [63:0]       tuser_addr,
  output logic [15:0]       tuser_len,
  output logic [15:0]       tuser_chan
);
  localparam int unsigned WB = DATA_W / 8;

  typedef struct packed {
    logic              sop;
    logic              last;
    logic [15:0]       nbytes;   // valid bytes in this beat
    logic [63:0]       addr;
    logic [15:0]       len;
    logic [15:0]       chan;
  } beat_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    beat_t             b;
  } ob_t;

  logic        init_done;
  logic [15:0] init_id;
  logic        busy;
  trs_req_t    cur;
  logic [15:0] beat;
  logic        rd_go, rd_q;
  beat_t       b_d, b_q;
  logic        of_af, of_empty, of_full;
  ob_t         of_in, of_out;
  logic [$clog2(5)-1:0] of_cnt;

  logic [15:0] nbeats;
  assign nbeats = (cur.len + 16'(WB - 1)) / 16'(WB);

  assign req_ready = init_done && !busy;
  assign rd_go     = busy && !of_af;
  assign raddr     = AW'(int'(cur.id) * ROWS + int'(beat));

  always_comb begin
    b_d.sop    = (beat == 0);
    b_d.last   = (beat == nbeats - 1'b1);
    b_d.nbytes = b_d.last ? cur.len - beat * 16'(WB) : 16'(WB);
    b_d.addr   = cur.addr;
    b_d.len    = cur.len;
    b_d.chan   = cur.chan;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      init_done <= 1'b0;
      init_id   <= '0;
      busy      <= 1'b0;
      beat      <= '0;
      rd_q      <= 1'b0;
      free_wr   <= 1'b0;
    end else begin
      free_wr <= 1'b0;
      if (!init_done) begin
        free_wr <= 1'b1;
        free_id <= init_id;
        init_id <= init_id + 1'b1;
        if (init_id == 16'(NUM_TRS - 1)) init_done <= 1'b1;
      end
      if (req_valid && req_ready) begin
        busy <= 1'b1;
        cur  <= req;
        beat <= '0;
      end else if (rd_go) begin
        if (b_d.last) begin
          busy    <= 1'b0;
          free_wr <= 1'b1;
          free_id <= cur.id;
        end
        beat <= beat + 1'b1;
      end
      rd_q <= rd_go;
    end
    b_q <= b_d;
  end

  assign of_in = '{data: rdata, b: b_q};

  fifo #(.T(ob_t), .DEPTH(4), .AF_LEVEL(2)) u_out (
    .clk, .rst, .wr_en(rd_q), .wr_data(of_in), .rd_en(tvalid && tready), .rd_data(of_out),
    .empty(of_empty), .full(of_full), .almost_full(of_af), .count(of_cnt)
  );

  always_comb begin
    tvalid     = !of_empty;
    tdata      = of_out.data;
    tsop       = of_out.b.sop;
    tlast      = of_out.b.last;
    tuser_addr = of_out.b.addr;
    tuser_len  = of_out.b.len;
    tuser_chan = of_out.b.chan;
    for (int i = 0; i < WB; i++) tkeep[i] = (16'(i) < of_out.b.nbytes);
  end
endmodule
