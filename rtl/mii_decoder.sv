// mii_decoder -- finds Ethernet frames in a wide MII receive stream.
//
// Every cycle the decoder takes one DATA_W-bit MII word (RXD with one RXC
// control bit per byte) and walks its bytes in order.  A frame starts with
// the Start control character (0xFB) in the first byte of an 8-byte block,
// followed by six preamble bytes (0x55) and the start-of-frame delimiter
// (0xD5); the frame itself therefore begins on the next block.  It ends at
// the Terminate character (0xFD).  Any other control character inside a
// frame, a bad preamble, or a new Start before Terminate marks a protocol
// error.  Frames longer than ETH_MTU bytes are cut at ETH_MTU (MTU error),
// frames shorter than MIN_FRAME get a length error.
//
// Words that hold bytes of an accepted frame are written whole into the data
// buffer at the free-running write pointer wr_ptr.  Before a frame is
// accepted the decoder checks that the buffer, whose read side is only known
// through the approximate read pointer rd_ptr from the scheduler, has room
// for the longest frame; otherwise the frame is discarded, so the write
// pointer never has to be rolled back.  Frames are discarded the same way
// while room_ok is low (the application's instruction queue is nearly full).
//
// For each frame that ends, one dec_meta_t record is produced (up to PPC per
// cycle, one lane each), one cycle after the word.  Frames with errors are
// reported with their flags; the application decides what to do with them.
// The MII has no flow control, so the decoder never stalls.
//
// Follows the described function of the decoder; the byte-serial scan, the
// error rules and the free-space margin (longest frame plus two words) are
// this implementation's choices.
module mii_decoder
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W     = 1024,
  parameter int unsigned PPC        = 2,
  parameter int unsigned DBUF_WORDS = 512,
  parameter int unsigned ETH_MTU    = 1518,
  parameter int unsigned MIN_FRAME  = 64
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [DATA_W-1:0]   rxd,
  input  logic [DATA_W/8-1:0] rxc,
  input  wptr_t               rd_ptr,      // approximate read pointer
  input  logic                room_ok,     // downstream can take more frames
  // data buffer write port
  output logic                buf_we,
  output wptr_t               buf_wptr,
  output logic [DATA_W-1:0]   buf_wdata,
  // frames
  output logic [PPC-1:0]      meta_valid,
  output dec_meta_t           meta [PPC],
  output logic [31:0]         discarded,   // frames dropped for lack of space
  output wptr_t               wr_ptr
);
  localparam int unsigned NB   = DATA_W / 8;
  localparam int unsigned WB   = DATA_W / 8;
  localparam int unsigned NEED = (ETH_MTU + 2*WB - 1) / WB + 2;  // words

  typedef struct packed {
    logic        in_frm;
    logic        keep;
    logic [3:0]  pre;
    logic [15:0] len;
    wptr_t       st_word;
    logic [7:0]  st_blk;
    logic        errp;
    logic        errm;
    logic [63:0] first;
  } st_t;

  st_t st, st_n;
  logic [PPC-1:0] mv_n;
  dec_meta_t      m_n [PPC];
  logic           used_n;
  logic [31:0]    disc_n;
  logic           space_ok;

  assign space_ok = room_ok && ((16'(DBUF_WORDS) - (wr_ptr - rd_ptr)) >= 16'(NEED));

  always_comb begin
    int unsigned ev;
    logic [7:0] d;
    logic       c;
    st_n   = st;
    mv_n   = '0;
    for (int k = 0; k < PPC; k++) m_n[k] = '0;
    used_n = 1'b0;
    disc_n = discarded;
    ev     = 0;
    for (int i = 0; i < NB; i++) begin
      d = rxd[8*i +: 8];
      c = rxc[i];
      // end of a frame (Terminate, or an unexpected Start)
      if (st_n.in_frm && c && (d == MII_TERM || d == MII_START)) begin
        if (st_n.keep && st_n.len != 0) begin
          if (ev < PPC) begin
            mv_n[ev]            = 1'b1;
            m_n[ev].word        = st_n.st_word;
            m_n[ev].blk         = st_n.st_blk;
            m_n[ev].len         = st_n.len;
            m_n[ev].err_proto   = st_n.errp || (d == MII_START) || (st_n.pre != 0);
            m_n[ev].err_mtu     = st_n.errm;
            m_n[ev].err_len     = st_n.len < 16'(MIN_FRAME);
            m_n[ev].first_blk   = st_n.first;
            ev++;
          end else begin
            disc_n++;
          end
        end
        st_n.in_frm = 1'b0;
      end
      if (!st_n.in_frm) begin
        if (c && d == MII_START && (i % 8) == 0) begin
          st_n.in_frm = 1'b1;
          st_n.keep   = space_ok;
          if (!space_ok) disc_n++;
          st_n.pre    = 4'd7;
          st_n.len    = '0;
          st_n.errp   = 1'b0;
          st_n.errm   = 1'b0;
          st_n.first  = '0;
        end
      end else if (c) begin
        if (d != MII_TERM) st_n.errp = 1'b1;
      end else if (st_n.pre != 0) begin
        if (d != ((st_n.pre == 1) ? MII_SFD : MII_PREAMBLE)) st_n.errp = 1'b1;
        st_n.pre = st_n.pre - 1'b1;
      end else begin
        if (st_n.len == 0) begin
          st_n.st_word = wr_ptr;
          st_n.st_blk  = 8'(i / 8);
        end
        if (st_n.len < 8) st_n.first[8*st_n.len[2:0] +: 8] = d;
        if (st_n.len < 16'(ETH_MTU)) st_n.len = st_n.len + 1'b1;
        else                         st_n.errm = 1'b1;
        if (st_n.keep) used_n = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= '0;
      wr_ptr     <= '0;
      meta_valid <= '0;
      discarded  <= '0;
      buf_we     <= 1'b0;
    end else begin
      st         <= st_n;
      meta_valid <= mv_n;
      discarded  <= disc_n;
      buf_we     <= used_n;
      if (used_n) wr_ptr <= wr_ptr + 1'b1;
    end
    meta      <= m_n;
    buf_wptr  <= wr_ptr;
    buf_wdata <= rxd;
  end
endmodule
