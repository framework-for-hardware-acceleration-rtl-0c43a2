// rxfw_pkg -- shared constants and instruction formats of the RX data path.
//
// The RX data path moves Ethernet frames from an MII stream into per-channel
// DMA ring buffers in host memory.  Data is kept in 8-byte blocks end to end
// (the MII stream aligns every start of frame to 8 bytes and an on-chip RAM
// is 64 bits wide), so every address below the word level is a block index.
//
// The instruction records that travel between the blocks are defined here.
// Their fields have fixed widths (16-bit channel numbers, 16-bit free-running
// word pointers, 32-bit channel stream offsets) that are wide enough for any
// parameter setting the modules accept; the modules use only the low bits
// they need.  The MII control codes follow the usual 10/40/100/400G MII
// definition; the field widths are this implementation's choice.
package rxfw_pkg;

  // ---------------------------------------------------------------- MII
  localparam logic [7:0] MII_IDLE  = 8'h07;
  localparam logic [7:0] MII_START = 8'hFB;
  localparam logic [7:0] MII_TERM  = 8'hFD;
  localparam logic [7:0] MII_ERROR = 8'hFE;
  localparam logic [7:0] MII_PREAMBLE = 8'h55;
  localparam logic [7:0] MII_SFD      = 8'hD5;

  // Size of one crossbar data block in bytes (alignment of the framework).
  localparam int unsigned BLK_BYTES = 8;

  typedef logic [15:0] chan_t;   // DMA channel number
  typedef logic [15:0] wptr_t;   // free-running data buffer word pointer
  typedef logic [31:0] soff_t;   // byte offset in a channel's byte stream

  // Frame found by the decoder, handed to the application core.
  typedef struct packed {
    wptr_t        word;       // data buffer word holding the first frame byte
    logic [7:0]   blk;        // block of that word holding the first byte
    logic [15:0]  len;        // frame length in bytes (destination MAC .. FCS)
    logic         err_proto;  // error character or bad preamble inside the frame
    logic         err_mtu;    // frame longer than the MTU, cut at the MTU
    logic         err_len;    // frame shorter than the minimum frame
    logic [63:0]  first_blk;  // first 8 bytes of the frame, byte 0 in [7:0]
  } dec_meta_t;

  // Packet instruction: one frame and its header for the DMA controller and
  // the scheduler.  The header sits in the header buffer at the same word as
  // the first frame byte, at the first block of that block's region.
  typedef struct packed {
    logic         drop;       // frame is not sent; only frees buffer space
    chan_t        chan;
    wptr_t        word;
    logic [7:0]   blk;
    logic [15:0]  len;        // frame bytes
    logic [7:0]   hdr_len;    // header bytes, a multiple of BLK_BYTES
  } pkt_instr_t;

  // Subpacket: the part of a frame (or its header) inside one buffer word.
  typedef struct packed {
    logic         nodata;     // carries only the word pointer (dropped frame)
    logic         hdr;        // source is the header buffer
    chan_t        chan;
    wptr_t        word;
    logic [7:0]   blk;        // first block in the word
    logic [15:0]  len;        // bytes, at most one word
  } spkt_t;

  // Increment of one channel's byte stream (subpacket rounded up to blocks).
  typedef struct packed {
    logic         nodata;
    chan_t        chan;
    wptr_t        word;
    logic [15:0]  len;        // bytes, a multiple of BLK_BYTES
  } inc_t;

  // Increment after the 4 KiB page breaker: never crosses a page.
  typedef struct packed {
    logic         valid;
    logic         nodata;     // no bytes: only moves the read pointer
    wptr_t        word;       // data buffer word of the subpacket
    chan_t        chan;
    soff_t        off;        // stream offset of its first byte
    logic [15:0]  len;
    logic         page_end;   // ends exactly at a page boundary
    logic         color;      // barrier colour
  } pinc_t;

  typedef struct packed {
    pinc_t a;                 // first part
    pinc_t b;                 // second part (after the page boundary)
  } pinc2_t;

  // Subtransaction: where a run of stream bytes lands in the DMA buffer.
  typedef struct packed {
    logic [15:0]  trs_id;
    logic [15:0]  trs_off;    // byte offset inside the transaction
    logic [15:0]  len;        // bytes, a multiple of BLK_BYTES
    logic         color;
  } strs_t;

  // Transaction: one PCI Express memory write of one channel.
  typedef struct packed {
    logic [15:0]  id;         // DMA buffer slot
    chan_t        chan;
    soff_t        off;        // stream offset of the first byte
    logic [15:0]  len;        // payload bytes
  } trs_t;

  // Transaction with its host address, for the PCI Express side.
  typedef struct packed {
    logic [15:0]  id;
    chan_t        chan;
    logic [63:0]  addr;
    logic [15:0]  len;
  } trs_req_t;

  // Crossbar instruction: move one block into the DMA buffer.
  typedef struct packed {
    logic         hdr;        // source is the header buffer
    wptr_t        src_word;
    logic [7:0]   src_col;
    logic [15:0]  dst_row;
    logic [7:0]   dst_col;
    logic         color;
  } crb_t;

  function automatic logic [15:0] pad_blk(input logic [15:0] len);
    return (len + 16'(BLK_BYTES - 1)) & ~16'(BLK_BYTES - 1);
  endfunction

endpackage
