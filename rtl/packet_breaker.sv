// packet_breaker -- cuts packet instructions into subpackets.
//
// A frame in the data buffer may span several buffer words.  The rest of
// the scheduler works one buffer word at a time, so every packet instruction
// is cut into subpacket instructions that never leave a word: first the
// header (when hdr_len > 0; it lies in the header buffer at the frame's
// first word, at the start of the frame's region), then one subpacket per
// data word the frame touches.  A dropped frame becomes a single subpacket
// with nodata set: it carries only the word pointer, so the read pointer
// into the data buffer still moves past it.
//
// Valid/ready handshake on both sides.  One subpacket per cycle; a frame
// that fits one word and has no header passes in one cycle.  The order of
// subpackets is the order of the packet instructions.
module packet_breaker
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W = 1024,
  parameter int unsigned PPC    = 2
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  output logic       in_ready,
  input  pkt_instr_t in_instr,
  output logic       out_valid,
  input  logic       out_ready,
  output spkt_t      out_spkt,
  output logic       busy
);
  localparam int unsigned NCOL = DATA_W / 64;
  localparam int unsigned RB   = NCOL / PPC;

  typedef struct packed {
    logic        drop;
    logic        hdr_pend;
    chan_t       chan;
    wptr_t       word;
    logic [7:0]  blk;
    logic [15:0] rem;
    logic [7:0]  hdr_len;
  } cur_t;

  cur_t cur, src, nxt;
  logic        emit, done;
  logic [15:0] room;
  spkt_t sp;

  always_comb begin
    if (busy) src = cur;
    else src = '{drop: in_instr.drop,
                 hdr_pend: (in_instr.hdr_len != 0) && !in_instr.drop,
                 chan: in_instr.chan, word: in_instr.word, blk: in_instr.blk,
                 rem: in_instr.len, hdr_len: in_instr.hdr_len};
    emit = (busy || in_valid) && (!out_valid || out_ready);
    nxt  = src;
    sp   = '0;
    sp.chan = src.chan;
    sp.word = src.word;
    done = 1'b0;
    room = 16'((NCOL - int'(src.blk)) * 8);
    if (src.drop) begin
      sp.nodata = 1'b1;
      done      = 1'b1;
    end else if (src.hdr_pend) begin
      sp.hdr       = 1'b1;
      sp.blk       = 8'((int'(src.blk) / RB) * RB);
      sp.len       = 16'(src.hdr_len);
      nxt.hdr_pend = 1'b0;
      done         = (src.rem == 0);
    end else begin
      sp.blk = src.blk;
      sp.len = (src.rem < room) ? src.rem : room;
      nxt.rem  = src.rem - sp.len;
      nxt.word = src.word + 1'b1;
      nxt.blk  = '0;
      done     = (src.rem <= room);
    end
    in_ready = !busy && emit;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (emit) begin
        out_valid <= 1'b1;
        out_spkt  <= sp;
        busy      <= !done;
        cur       <= nxt;
      end
    end
  end
endmodule
