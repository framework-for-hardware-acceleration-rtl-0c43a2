// mtu_breaker -- packs channel stream increments into PCI Express writes.
//
// For every DMA channel the breaker keeps one open transaction: its DMA
// buffer slot (transaction id), its length so far and the stream offset of
// its first byte.  Each page-broken increment is appended to the open
// transaction of its channel, one piece per cycle.  A piece stops where the
// transaction reaches PCIE_MTU bytes; the rest of the increment continues in
// a new transaction the next cycle.  A transaction is closed when it is
// full, when it reaches a 4 KiB page boundary (page_end), or when its
// channel has seen no data for TIMEOUT cycles, so a quiet channel does not
// hold its data back forever.  Opening a transaction takes a free id from
// the free-id FIFO filled by the PCI Express side; without one the breaker
// waits.
//
// Outputs: a subtransaction instruction for every piece (where the bytes go
// in the DMA buffer), and a transaction instruction for every closed
// transaction.  The timeout check walks the channels one per cycle, in
// cycles where no transaction is closed by data; each channel keeps the time
// of its last data.  Consumes the pair FIFO head in place (pop when done).
//
// Barrier bookkeeping: every piece leaves with the current colour and is
// added to its channel's current byte count.  When the planner reports a
// barrier (every block of the colour it was draining is in the DMA buffer)
// the colour flips, the current counts are copied to the sampled counts and
// the sampled counts of the previous barrier become the confirmed counts
// sum_dma: all bytes counted there have reached the DMA buffer.  The data
// buffer word of the latest piece is treated the same way and gives rd_ptr,
// the approximate read pointer for the decoder.  The design places this
// bookkeeping in the page breaker; it is done here, after the wait for a
// free transaction id, so that an increment stalled for an id is not yet
// counted and cannot hold back the confirmation of transactions that would
// free ids (which would deadlock).
module mtu_breaker
  import rxfw_pkg::*;
#(
  parameter int unsigned CHANNELS = 256,
  parameter int unsigned PCIE_MTU = 256,
  parameter int unsigned TIMEOUT  = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // page-broken increments (FIFO head)
  input  logic        in_valid,
  input  pinc2_t      in_pair,
  output logic        in_pop,
  // free transaction ids (FIFO head)
  input  logic        fid_valid,
  input  logic [15:0] fid,
  output logic        fid_pop,
  // subtransaction instructions
  output logic        strs_wr,
  output strs_t       strs,
  input  logic        strs_stop,
  // transaction instructions
  output logic        trs_wr,
  output trs_t        trs,
  input  logic        trs_stop,
  // barrier
  input  logic        barrier,
  output soff_t       sum_dma [CHANNELS],
  output wptr_t       rd_ptr
);
  localparam int unsigned CW = $clog2(CHANNELS);

  logic        open   [CHANNELS];
  logic [15:0] tid    [CHANNELS];
  logic [15:0] olen   [CHANNELS];
  soff_t       start  [CHANNELS];
  logic [31:0] last   [CHANNELS];
  logic [31:0] now;
  logic [CW-1:0] scan;
  logic        sel;       // working on part b of the pair
  logic [15:0] done;      // bytes of the current part already placed

  pinc_t       cur;
  logic [CW-1:0] ch;
  logic        go, need_id;
  logic [15:0] rem, piece, base_len, new_len;
  logic [15:0] use_id;
  soff_t       use_start;
  logic        close, part_done;
  logic        tmo;
  logic        color;
  soff_t       cnt     [CHANNELS];
  soff_t       sampled [CHANNELS];
  wptr_t       cur_word, sampled_word;
  logic        skip;

  always_comb begin
    cur       = sel ? in_pair.b : in_pair.a;
    ch        = cur.chan[CW-1:0];
    rem       = cur.len - done;
    skip      = in_valid && cur.nodata;
    need_id   = !open[ch];
    go        = in_valid && !cur.nodata && !strs_stop && !trs_stop && (!need_id || fid_valid);
    use_id    = need_id ? fid : tid[ch];
    use_start = need_id ? cur.off + 32'(done) : start[ch];
    base_len  = need_id ? 16'd0 : olen[ch];
    piece     = (rem < 16'(PCIE_MTU) - base_len) ? rem : 16'(PCIE_MTU) - base_len;
    new_len   = base_len + piece;
    part_done = (piece == rem);
    close     = (new_len == 16'(PCIE_MTU)) || (part_done && cur.page_end);
    fid_pop   = go && need_id;
    in_pop    = skip || (go && part_done && (sel || !in_pair.b.valid));
    // timeout check, only when data does not use the transaction output
    tmo = !(go && close) && !trs_stop && open[scan] && (scan != ch || !go) &&
          (now - last[scan] >= 32'(TIMEOUT));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      now     <= '0;
      scan    <= '0;
      sel     <= 1'b0;
      done    <= '0;
      strs_wr <= 1'b0;
      trs_wr  <= 1'b0;
      color        <= 1'b1;   // the planner drains colour 0 first
      cur_word     <= '0;
      sampled_word <= '0;
      rd_ptr       <= '0;
      for (int i = 0; i < CHANNELS; i++) begin
        open[i]    <= 1'b0;
        cnt[i]     <= '0;
        sampled[i] <= '0;
        sum_dma[i] <= '0;
      end
    end else begin
      if (skip) cur_word <= cur.word;
      if (go) begin
        cnt[ch]  <= cnt[ch] + 32'(piece);
        cur_word <= cur.word;
      end
      if (barrier) begin
        color        <= !color;
        sampled      <= cnt;
        sum_dma      <= sampled;
        sampled_word <= cur_word;
        rd_ptr       <= sampled_word;
      end
      now     <= now + 1'b1;
      scan    <= (scan == CW'(CHANNELS - 1)) ? '0 : scan + 1'b1;
      strs_wr <= go;
      trs_wr  <= (go && close) || tmo;
      if (go) begin
        if (part_done) begin
          done <= '0;
          sel  <= !sel && in_pair.b.valid;
        end else begin
          done <= done + piece;
        end
        open[ch]  <= !close;
        tid[ch]   <= use_id;
        olen[ch]  <= new_len;
        start[ch] <= use_start;
        last[ch]  <= now;
      end
      if (tmo) open[scan] <= 1'b0;
    end
    strs.trs_id  <= use_id;
    strs.trs_off <= base_len;
    strs.len     <= piece;
    strs.color   <= color;
    if (go && close) trs <= '{id: use_id, chan: chan_t'(ch), off: use_start, len: new_len};
    else             trs <= '{id: tid[scan], chan: chan_t'(scan), off: start[scan], len: olen[scan]};
  end

  a_one_id: assert property (@(posedge clk) disable iff (rst) fid_pop |-> fid_valid);
endmodule
