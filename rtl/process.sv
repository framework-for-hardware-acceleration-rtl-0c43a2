// process -- example application core: frame classification to DMA channels.
//
// The application core is the user's part of the framework: it sees every
// frame the decoder found and decides where it goes.  This example does the
// minimum a receiving application needs.  Frames with any decoder error
// are dropped.  Every other frame goes to the DMA channel given by the last
// byte of its destination MAC address modulo CHANNELS, and gets an 8-byte
// header (HDR_LEN = 8; HDR_LEN = 0 sends frames without header) holding
//   bits 15:0  frame length in bytes,
//   bits 31:16 DMA channel,
//   bits 63:32 frame sequence number,
// written into the header buffer at the frame's first word, at the start of
// the frame's region.  For every frame, dropped or not, a packet
// instruction is queued (dropped ones still free buffer space).  Up to PPC
// frames per cycle, one lane each; results one cycle after the metadata.
// The classification rule and the header layout are this example's choice.
module process
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W     = 1024,
  parameter int unsigned PPC        = 2,
  parameter int unsigned CHANNELS   = 256,
  parameter int unsigned DBUF_WORDS = 512,
  parameter int unsigned HDR_LEN    = 8
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [PPC-1:0]                 meta_valid,
  input  dec_meta_t                      meta [PPC],
  // header buffer write ports, one per region
  output logic [PPC-1:0]                 hb_we,
  output logic [$clog2(DBUF_WORDS)-1:0]  hb_waddr [PPC],
  output logic [$clog2(PPC > 1 ? PPC : 2)-1:0] hb_wregion [PPC],
  output logic [DATA_W/PPC-1:0]          hb_wdata [PPC],
  output logic [DATA_W/64/PPC-1:0]       hb_wblk_en [PPC],
  // packet instructions
  output logic [PPC-1:0]                 pi_valid,
  output pkt_instr_t                     pi [PPC]
);
  localparam int unsigned RB = DATA_W / 64 / PPC;

  logic [31:0] seq;

  always_ff @(posedge clk) begin
    logic [31:0] s;
    if (rst) begin
      seq      <= '0;
      pi_valid <= '0;
      hb_we    <= '0;
    end else begin
      s = seq;
      for (int k = 0; k < PPC; k++) begin
        logic  drop;
        chan_t ch;
        drop = meta[k].err_proto || meta[k].err_mtu || meta[k].err_len;
        ch   = chan_t'(32'(meta[k].first_blk[47:40]) % CHANNELS);
        pi_valid[k]       <= meta_valid[k];
        pi[k].drop        <= drop;
        pi[k].chan        <= ch;
        pi[k].word        <= meta[k].word;
        pi[k].blk         <= meta[k].blk;
        pi[k].len         <= meta[k].len;
        pi[k].hdr_len     <= 8'(HDR_LEN);
        hb_we[k]          <= meta_valid[k] && !drop && HDR_LEN != 0;
        hb_waddr[k]       <= meta[k].word[$clog2(DBUF_WORDS)-1:0];
        hb_wregion[k]     <= ($clog2(PPC > 1 ? PPC : 2))'(int'(meta[k].blk) / RB);
        hb_wdata[k]       <= '0;
        hb_wdata[k][63:0] <= {s, ch, meta[k].len};
        hb_wblk_en[k]     <= (DATA_W/64/PPC)'((1 << (HDR_LEN / 8)) - 1);
        if (meta_valid[k] && !drop) s = s + 1;
      end
      seq <= s;
    end
  end
endmodule
