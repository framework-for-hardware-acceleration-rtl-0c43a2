// tb_crb_gen -- self-checking test of the crossbar instruction generator
// (1024-bit words of sixteen 8-byte blocks, 256-byte transactions, so two
// DMA buffer rows per transaction slot).
//
// The test builds a list of subpackets, each inside one word (random first
// block and length, from the data or the header buffer), and cuts each one
// into one or two subtransactions at a random block boundary, each placed at
// a random offset of a random transaction slot.  Both lists are presented
// as FIFO heads whose valid flags drop at random, and the planner's ready is
// random.  For every vector taken the test checks the mask (one bit per
// block) and, for each block, the source buffer, word and column and the
// destination row and column worked out here; it also checks that the
// subpacket is popped exactly with its last subtransaction.  Counts split
// subpackets, vectors that wrap into the second row and stalls; each must
// occur.  Watchdog included.
module tb_crb_gen;
  import rxfw_pkg::*;
  localparam int NCOL = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic  strs_valid, strs_pop, spkt_valid, spkt_pop, out_valid, out_ready;
  strs_t strs;
  spkt_t spkt;
  logic [NCOL-1:0] out_mask;
  crb_t  out_crb [NCOL];
  crb_gen u_dut (.clk, .rst, .strs_valid, .strs, .strs_pop, .spkt_valid, .spkt, .spkt_pop,
                 .out_valid, .out_ready, .out_mask, .out_crb);

  int checks = 0, failures = 0, n_split = 0, n_wrap = 0, n_stall = 0, n_vec = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  strs_t strs_q [$];
  spkt_t spkt_q [$];
  int    pos_q  [$];   // byte position of each subtransaction in its subpacket
  bit    last_q [$];   // subtransaction is the last of its subpacket
  bit    sv_en, pv_en;

  assign strs_valid = sv_en && strs_q.size() != 0;
  assign spkt_valid = pv_en && spkt_q.size() != 0;
  assign strs = (strs_q.size() != 0) ? strs_q[0] : '0;
  assign spkt = (spkt_q.size() != 0) ? spkt_q[0] : '0;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      spkt_t s;
      int blk, nb, cut;
      s = '0;
      s.hdr  = ($urandom % 4 == 0);
      s.chan = chan_t'($urandom % 256);
      s.word = wptr_t'($urandom);
      blk    = $urandom % NCOL;
      nb     = 1 + $urandom % (NCOL - blk);
      s.blk  = 8'(blk);
      s.len  = 16'(nb * 8 - ($urandom % 8));
      spkt_q.push_back(s);
      cut = (nb > 1 && $urandom % 3 == 0) ? 1 + $urandom % (nb - 1) : nb;
      if (cut != nb) n_split++;
      for (int p = 0; p < 2; p++) begin
        strs_t t;
        int b0, n, off;
        b0 = (p == 0) ? 0 : cut;
        n  = (p == 0) ? cut : nb - cut;
        if (n == 0) break;
        off = ($urandom % (32 - n + 1)) * 8;
        t = '0;
        t.trs_id  = 16'($urandom % 64);
        t.trs_off = 16'(off);
        t.len     = 16'(n * 8);
        t.color   = 1'($urandom);
        strs_q.push_back(t);
        pos_q.push_back(b0 * 8);
        last_q.push_back(b0 + n == nb);
      end
    end
  end

  always @(negedge clk) begin
    out_ready <= ($urandom % 4 != 0);
    sv_en     <= ($urandom % 5 != 0);
    pv_en     <= ($urandom % 5 != 0);
  end

  always @(posedge clk) if (!rst) begin
    if (out_valid && !out_ready) n_stall++;
    check(out_valid == (strs_valid && spkt_valid), "out_valid");
    check(strs_pop == (out_valid && out_ready), "strs_pop");
    if (strs_pop) begin
      int nb, pos;
      nb  = int'(strs.len) / 8;
      pos = pos_q[0];
      check(spkt_pop == last_q[0], "spkt_pop");
      for (int k = 0; k < NCOL; k++) begin
        int d;
        d = int'(strs.trs_off) / 8 + k;
        check(out_mask[k] == (k < nb), $sformatf("mask[%0d]", k));
        if (k < nb) begin
          check(out_crb[k].hdr == spkt.hdr && out_crb[k].src_word == spkt.word,
                $sformatf("source buffer/word, block %0d", k));
          check(int'(out_crb[k].src_col) == (int'(spkt.blk) + pos / 8 + k) % NCOL,
                $sformatf("src_col, block %0d", k));
          check(int'(out_crb[k].dst_row) == int'(strs.trs_id) * 2 + d / NCOL &&
                int'(out_crb[k].dst_col) == d % NCOL, $sformatf("destination, block %0d", k));
          check(out_crb[k].color == strs.color, "color");
          if (d / NCOL == 1 && d - k < NCOL) n_wrap++;
        end
      end
      n_vec++;
      void'(strs_q.pop_front());
      void'(pos_q.pop_front());
      void'(last_q.pop_front());
    end else begin
      check(!spkt_pop, "spkt_pop without strs_pop");
    end
    if (spkt_pop) void'(spkt_q.pop_front());
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    wait (strs_q.size() == 0);
    repeat (3) @(posedge clk);
    check(spkt_q.size() == 0, "subpackets left over");
    check(n_split > 0 && n_wrap > 0 && n_stall > 0, "cases not hit");
    $display("vectors=%0d split=%0d wrap=%0d stall=%0d", n_vec, n_split, n_wrap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
