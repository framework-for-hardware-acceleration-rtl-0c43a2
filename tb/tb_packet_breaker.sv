// tb_packet_breaker -- self-checking test of the packet breaker (1024-bit
// words of sixteen 8-byte blocks, two frame regions).
//
// Random packet instructions (start block 0..15, length 1..1518, header of
// 0 or 8 bytes, some dropped) are offered with random gaps while the
// consumer's ready is random.  A reference model lists the subpackets each
// instruction must become: for a dropped frame one no-data subpacket; else
// the header subpacket (header buffer, first block of the frame's region)
// and then one subpacket per buffer word the frame touches, each holding
// the bytes of the frame inside that word.  The output must be exactly
// that list, in order, and must stay stable while not taken.  Counts
// frames spanning several words, dropped frames and stalls; each must
// occur.  Watchdog included.
module tb_packet_breaker;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       in_valid, in_ready, out_valid, out_ready, busy;
  pkt_instr_t in_instr;
  spkt_t      out_spkt;
  packet_breaker u_dut (.clk, .rst, .in_valid, .in_ready, .in_instr, .out_valid, .out_ready,
                        .out_spkt, .busy);

  int checks = 0, failures = 0, n_multi = 0, n_drop = 0, n_stall = 0, n_got = 0;
  spkt_t exp_q [$];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic expect_instr(input pkt_instr_t p);
    spkt_t s;
    int rem, blk;
    logic [15:0] w;
    s = '0;
    s.chan = p.chan;
    s.word = p.word;
    if (p.drop) begin
      s.nodata = 1;
      exp_q.push_back(s);
      n_drop++;
      return;
    end
    if (p.hdr_len != 0) begin
      s.hdr = 1;
      s.blk = 8'((int'(p.blk) / 8) * 8);
      s.len = 16'(p.hdr_len);
      exp_q.push_back(s);
    end
    rem = int'(p.len);
    blk = int'(p.blk);
    w = p.word;
    if (rem > (16 - blk) * 8) n_multi++;
    while (rem > 0) begin
      int room, l;
      room = (16 - blk) * 8;
      l = (rem < room) ? rem : room;
      s = '0;
      s.chan = p.chan; s.word = w; s.blk = 8'(blk); s.len = 16'(l);
      exp_q.push_back(s);
      rem -= l;
      w++;
      blk = 0;
    end
  endtask

  logic drain = 1'b0;
  always @(posedge clk) if (!rst) begin
    if (in_valid && in_ready) expect_instr(in_instr);
    if (out_valid && out_ready) begin
      check(exp_q.size() != 0, "unexpected subpacket");
      if (exp_q.size() != 0) begin
        spkt_t e;
        e = exp_q.pop_front();
        check(out_spkt == e, $sformatf("subpacket %0d: got %p exp %p", n_got, out_spkt, e));
        n_got++;
      end
    end
    if (out_valid && !out_ready) n_stall++;
  end
  // random consumer
  always @(negedge clk) out_ready <= drain || ($urandom % 3 != 0);

  initial begin
    bit hs;
    in_valid = 0; in_instr = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      in_instr.drop    = ($urandom % 8 == 0);
      in_instr.chan    = chan_t'($urandom % 256);
      in_instr.word    = wptr_t'($urandom);
      in_instr.blk     = 8'($urandom % 16);
      in_instr.len     = ($urandom % 3 == 0) ? 16'(64) : 16'(1 + $urandom % 1518);
      in_instr.hdr_len = ($urandom % 4 == 0) ? 8'd0 : 8'd8;
      in_valid = 1;
      do begin
        @(posedge clk);
        hs = in_ready;
      end while (!hs);
      #1 in_valid = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    drain = 1;
    repeat (60) @(posedge clk);
    check(exp_q.size() == 0, "subpackets missing");
    check(n_multi > 0 && n_drop > 0 && n_stall > 0, "cases not hit");
    $display("multi=%0d drop=%0d stall=%0d subpackets=%0d", n_multi, n_drop, n_stall, n_got);
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
