// tb_increment_per_dma -- self-checking test of the increment stage.
//
// Random subpackets (random length 1..128 bytes, some with nodata) are
// offered with random valid, while the subpacket FIFO's full flag and the
// page breaker's stop signal toggle at random.  The test checks, against
// values computed here: ready is low exactly when full or stop is high; a
// subpacket with data is written to the subpacket FIFO unchanged in the
// cycle it is taken, a nodata one is not; one cycle later exactly one
// increment appears with the same channel and word and the length rounded
// up to a multiple of 8 bytes (0 for nodata).  Counts lengths that needed
// rounding, nodata subpackets and refused cycles; each must occur.  Watchdog
// included.
module tb_increment_per_dma;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic  in_valid, in_ready, spkt_wr, spkt_full, inc_valid, inc_stop;
  spkt_t in_spkt, spkt_data;
  inc_t  inc;
  increment_per_dma u_dut (.clk, .rst, .in_valid, .in_ready, .in_spkt, .spkt_wr, .spkt_data,
                           .spkt_full, .inc_valid, .inc, .inc_stop);

  int checks = 0, failures = 0, n_round = 0, n_nodata = 0, n_refused = 0, n_taken = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  bit    exp_v = 0;
  inc_t  exp_inc;
  initial begin
    in_valid = 0; in_spkt = '0; spkt_full = 0; inc_stop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 20000; n++) begin
      int l;
      // outputs of the previous cycle's input
      check(inc_valid == exp_v, "inc_valid");
      if (exp_v) check(inc == exp_inc, $sformatf("inc %p exp %p", inc, exp_inc));
      in_valid  = ($urandom % 4 != 0);
      spkt_full = ($urandom % 6 == 0);
      inc_stop  = ($urandom % 6 == 0);
      in_spkt        = '0;
      in_spkt.nodata = ($urandom % 8 == 0);
      in_spkt.hdr    = ($urandom % 4 == 0);
      in_spkt.chan   = chan_t'($urandom % 256);
      in_spkt.word   = wptr_t'($urandom);
      in_spkt.blk    = 8'($urandom % 16);
      l              = 1 + $urandom % 128;
      in_spkt.len    = 16'(l);
      #1;
      check(in_ready == !(spkt_full || inc_stop), "in_ready");
      check(spkt_wr == (in_valid && in_ready && !in_spkt.nodata), "spkt_wr");
      if (spkt_wr) check(spkt_data == in_spkt, "spkt_data");
      exp_v = in_valid && in_ready;
      exp_inc.nodata = in_spkt.nodata;
      exp_inc.chan   = in_spkt.chan;
      exp_inc.word   = in_spkt.word;
      exp_inc.len    = in_spkt.nodata ? 16'd0 : 16'(((l + 7) / 8) * 8);
      if (exp_v && !in_spkt.nodata && (l % 8) != 0) n_round++;
      if (exp_v && in_spkt.nodata) n_nodata++;
      if (in_valid && !in_ready) n_refused++;
      if (exp_v) n_taken++;
      @(negedge clk);
    end
    check(n_round > 0 && n_nodata > 0 && n_refused > 0, "cases not hit");
    $display("taken=%0d rounded=%0d nodata=%0d refused=%0d", n_taken, n_round, n_nodata, n_refused);
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
