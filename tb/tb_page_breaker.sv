// tb_page_breaker -- self-checking test of the 4 KiB page breaker (256
// channels, 4096-byte pages).
//
// Random increments (8..128 bytes in whole blocks, sometimes no-data
// increments of length 0) for a few channels, often the same channel on
// consecutive cycles, are fed one per cycle.  A reference model keeps each
// channel's stream offset.  Every output pair must arrive in order and
// equal the model: part a starts at the channel's offset and, when the
// increment crosses a page boundary, ends exactly at it (page_end set) with
// part b holding the rest; an increment ending on the boundary sets
// page_end without part b.  Counts split increments, exact page ends and
// back-to-back increments of one channel; each must occur.  Watchdog
// included.
module tb_page_breaker;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic   in_valid, out_valid, busy;
  inc_t   in_inc;
  pinc2_t out_pair;
  page_breaker u_dut (.clk, .rst, .in_valid, .in_inc, .out_valid, .out_pair, .busy);

  int checks = 0, failures = 0, n_split = 0, n_end = 0, n_b2b = 0, n_out = 0;
  longint off [4];
  inc_t   q [$];
  longint qoff [$];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    inc_t   e;
    longint o, rem;
    check(q.size() != 0, "output without input");
    if (q.size() != 0) begin
      e = q.pop_front();
      o = qoff.pop_front();
      rem = 4096 - (o % 4096);
      n_out++;
      check(out_pair.a.valid && out_pair.a.chan == e.chan && out_pair.a.word == e.word &&
            out_pair.a.nodata == e.nodata && longint'(out_pair.a.off) == o, "part a fields");
      if (!e.nodata && longint'(e.len) > rem) begin
        n_split++;
        check(longint'(out_pair.a.len) == rem && out_pair.a.page_end && out_pair.b.valid &&
              longint'(out_pair.b.off) == o + rem && longint'(out_pair.b.len) == longint'(e.len) - rem &&
              out_pair.b.chan == e.chan, "split");
      end else begin
        check(out_pair.a.len == e.len && !out_pair.b.valid, "no split");
        if (!e.nodata) check(out_pair.a.page_end == (longint'(e.len) == rem), "page_end");
        if (!e.nodata && longint'(e.len) == rem) n_end++;
      end
    end
  end

  initial begin
    static int last = -1;
    for (int c = 0; c < 4; c++) off[c] = 0;
    in_valid = 0; in_inc = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      int c;
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      c = ($urandom % 2 == 0 && last >= 0) ? last : int'($urandom % 4);
      in_inc.chan   = 16'(c * 37);
      in_inc.nodata = ($urandom % 10 == 0);
      in_inc.word   = 16'($urandom);
      in_inc.len    = in_inc.nodata ? 16'd0 : 16'(8 * (1 + $urandom % 16));
      if (in_valid) begin
        if (c == last) n_b2b++;
        q.push_back(in_inc);
        qoff.push_back(off[c]);
        off[c] += longint'(in_inc.len);
      end
      last = in_valid ? c : -1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (8) @(posedge clk);
    check(q.size() == 0, "outputs missing");
    check(n_split > 0 && n_end > 0 && n_b2b > 0, "cases not hit");
    $display("out %0d split %0d end %0d", n_out, n_split, n_end);
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
