// tb_mtu_breaker -- self-checking test of the MTU breaker (4 channels,
// 256-byte transactions, 8 transaction ids, timeout of 40 cycles).
//
// Each channel gets a random stream of increments (8..200 bytes, whole
// blocks), cut at 4 KiB pages the way the page breaker cuts them (second
// part in b, page_end on a part that ends on a boundary), mixed with no-data
// items.  The pair FIFO head, the free-id FIFO head and both stop inputs
// are random; the planner's barrier pulses at random.  Closed transactions
// give their id back after a random delay.
//
// Checked against the test's own bookkeeping: every piece lands right after
// the previous one in its transaction and never past 256 bytes; ids are
// only taken when free; each transaction's length is the sum of its pieces,
// its stream offset continues its channel's previous transaction, and it
// never crosses a page; a transaction shorter than 256 bytes ends on a page
// or was closed by the timeout; after the input ends every byte has left in
// a transaction; the confirmed counts sum_dma equal the per-channel piece
// bytes as they stood two barriers earlier.  Full, page-end and timeout
// closes, id starvation, stops and barriers must all occur.  Watchdog
// included.
module tb_mtu_breaker;
  import rxfw_pkg::*;
  localparam int CH = 4, MTU = 256, NID = 8, TMO = 40, PG = 4096;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_valid, in_pop, fid_valid, fid_pop, strs_wr, strs_stop, trs_wr, trs_stop, barrier;
  pinc2_t      in_pair;
  logic [15:0] fid;
  strs_t       strs;
  trs_t        trs;
  soff_t       sum_dma [CH];
  wptr_t       rd_ptr;

  mtu_breaker #(.CHANNELS(CH), .PCIE_MTU(MTU), .TIMEOUT(TMO)) u_dut (
    .clk, .rst, .in_valid, .in_pair, .in_pop, .fid_valid, .fid, .fid_pop,
    .strs_wr, .strs, .strs_stop, .trs_wr, .trs, .trs_stop, .barrier, .sum_dma, .rd_ptr);

  int checks = 0, failures = 0;
  int n_full = 0, n_page = 0, n_tmo = 0, n_starve = 0, n_stop = 0, n_bar = 0, n_trs = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  pinc2_t pair_q [$];
  int     part_ch [$], part_len [$];   // data parts in input order
  int     pool [$];                    // free ids
  int     ret_id [$], ret_at [$];      // ids to give back, and when
  int     acc [NID];                   // bytes placed in each open id
  bit     busy_id [NID];
  int     cnext [CH], total [CH];
  longint mcnt [CH], msamp [CH], mconf [CH];
  int     cyc = 0, part_used = 0;
  bit     in_en, id_en;

  assign in_valid  = in_en && pair_q.size() != 0;
  assign in_pair   = (pair_q.size() != 0) ? pair_q[0] : '0;
  assign fid_valid = id_en && pool.size() != 0;
  assign fid       = (pool.size() != 0) ? 16'(pool[0]) : 16'd0;

  initial begin
    int off [CH];
    for (int c = 0; c < CH; c++) begin
      off[c] = 0; total[c] = 0; cnext[c] = 0; mcnt[c] = 0; msamp[c] = 0; mconf[c] = 0;
    end
    for (int k = 0; k < NID; k++) begin acc[k] = 0; busy_id[k] = 0; end
    for (int i = 0; i < 2500; i++) begin
      pinc2_t p;
      int c, len, la;
      p = '0;
      c = $urandom % CH;
      if ($urandom % 10 == 0) begin
        p.a.valid = 1; p.a.nodata = 1; p.a.chan = chan_t'(c); p.a.word = wptr_t'(i);
        pair_q.push_back(p);
        continue;
      end
      len = 8 * (1 + $urandom % 25);
      la  = PG - (off[c] % PG);
      p.a.valid = 1; p.a.chan = chan_t'(c); p.a.word = wptr_t'(i); p.a.off = soff_t'(off[c]);
      if (len >= la) begin
        p.a.len = 16'(la); p.a.page_end = 1;
        part_ch.push_back(c); part_len.push_back(la);
        if (len > la) begin
          p.b.valid = 1; p.b.chan = chan_t'(c); p.b.word = wptr_t'(i);
          p.b.off = soff_t'(off[c] + la); p.b.len = 16'(len - la);
          part_ch.push_back(c); part_len.push_back(len - la);
        end
      end else begin
        p.a.len = 16'(len);
        part_ch.push_back(c); part_len.push_back(len);
      end
      off[c] += len;
      total[c] += len;
      pair_q.push_back(p);
    end
    for (int k = 0; k < NID; k++) pool.push_back(k);
  end

  bit quiet = 0;
  always @(negedge clk) begin
    in_en     <= quiet || ($urandom % 6 != 0);
    id_en     <= quiet || ($urandom % 8 != 0);
    strs_stop <= !quiet && ($urandom % 10 == 0);
    trs_stop  <= !quiet && ($urandom % 10 == 0);
    barrier   <= ($urandom % 40 == 0);
  end

  always @(posedge clk) if (!rst) begin
    cyc++;
    // confirmed counts, as of two barriers ago
    for (int c = 0; c < CH; c++) check(longint'(sum_dma[c]) == mconf[c], $sformatf("sum_dma[%0d]", c));
    if (strs_wr) begin
      int id, l, ch;
      id = int'(strs.trs_id);
      l  = int'(strs.len);
      check(id < NID && busy_id[id], "piece for an id not taken");
      check(l > 0 && l % 8 == 0, "piece length");
      check(int'(strs.trs_off) == acc[id], $sformatf("piece offset %0d exp %0d", strs.trs_off, acc[id]));
      acc[id] += l;
      check(acc[id] <= MTU, "transaction over MTU");
      check(part_ch.size() != 0, "piece without input");
      ch = part_ch[0];
      mcnt[ch] += longint'(l);
      part_used += l;
      check(part_used <= part_len[0], "piece crosses an input part");
      if (part_used == part_len[0]) begin
        void'(part_ch.pop_front()); void'(part_len.pop_front()); part_used = 0;
      end
    end
    if (trs_wr) begin
      int id, c, o, l;
      id = int'(trs.id); c = int'(trs.chan); o = int'(trs.off); l = int'(trs.len);
      check(id < NID && busy_id[id], "transaction for an id not taken");
      check(l == acc[id] && l > 0, $sformatf("transaction length %0d exp %0d", l, acc[id]));
      check(c < CH && o == cnext[c], $sformatf("transaction offset %0d exp %0d", o, cnext[c]));
      check((o % PG) + l <= PG, "transaction crosses a page");
      if (l == MTU) n_full++;
      else if ((o + l) % PG == 0) n_page++;
      else n_tmo++;
      cnext[c] += l;
      acc[id] = 0;
      busy_id[id] = 0;
      ret_id.push_back(id);
      ret_at.push_back(cyc + int'($urandom % 30));
      n_trs++;
    end
    if (fid_pop) begin
      check(fid_valid && !busy_id[pool[0]], "id taken twice");
      busy_id[pool[0]] = 1;
      void'(pool.pop_front());
    end
    if (in_valid && !in_pop && !fid_valid && !(strs_stop || trs_stop)) n_starve++;
    if (in_valid && (strs_stop || trs_stop)) n_stop++;
    if (in_pop) void'(pair_q.pop_front());
    if (ret_id.size() != 0 && cyc >= ret_at[0]) begin
      pool.push_back(ret_id[0]);
      void'(ret_id.pop_front()); void'(ret_at.pop_front());
    end
    if (barrier) begin
      n_bar++;
      mconf = msamp;
      msamp = mcnt;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (pair_q.size() == 0);
    quiet = 1;
    repeat (CH * TMO * 3 + 200) @(posedge clk);
    for (int c = 0; c < CH; c++) check(cnext[c] == total[c], $sformatf("channel %0d sent %0d of %0d", c, cnext[c], total[c]));
    check(part_ch.size() == 0, "input bytes not placed");
    check(n_full > 0 && n_page > 0 && n_tmo > 0 && n_starve > 0 && n_stop > 0 && n_bar > 0,
          "cases not hit");
    $display("transactions=%0d full=%0d page=%0d timeout=%0d starve=%0d stop=%0d barriers=%0d",
             n_trs, n_full, n_page, n_tmo, n_starve, n_stop, n_bar);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
