// tb_trans_fifo_ctrl -- self-checking test of the transaction FIFO control
// (256 channels).
//
// A queue of transactions of four channels sits in front of the block; the
// confirmed byte count of each channel (what the barrier has confirmed to
// be in the DMA buffer) grows in random steps, never beyond what the queued
// transactions add up to.  The head must be offered exactly when its length
// fits in the confirmed bytes not yet released, unchanged, and popped only
// when taken.  Counts cycles in which the head waited for confirmation and
// in which the consumer was not ready; both must occur.  Watchdog included.
module tb_trans_fifo_ctrl;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic  in_valid, in_pop, out_valid, out_ready;
  trs_t  in_trs, out_trs;
  soff_t sum_dma [256];
  trans_fifo_ctrl u_dut (.clk, .rst, .in_valid, .in_trs, .in_pop, .sum_dma, .out_valid,
                         .out_trs, .out_ready);

  int checks = 0, failures = 0, n_wait = 0, n_nr = 0, n_out = 0;
  trs_t  q [$];
  soff_t total [4], rel [4];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) sum_dma[i] = '0;
    for (int c = 0; c < 4; c++) begin total[c] = 0; rel[c] = 0; end
    for (int i = 0; i < 3000; i++) begin
      trs_t t;
      t.id = 16'(i % 64);
      t.chan = 16'($urandom % 4);
      t.off = total[t.chan[1:0]];
      t.len = 16'(8 * (1 + $urandom % 32));
      total[t.chan[1:0]] += 32'(t.len);
      q.push_back(t);
    end
    in_valid = 0; in_trs = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (q.size() != 0 && n_out < 3000) begin
      bit fits;
      @(negedge clk);
      in_valid = 1;
      in_trs = q[0];
      out_ready = ($urandom % 4 != 0);
      for (int c = 0; c < 4; c++)
        if ($urandom % 3 == 0 && sum_dma[c] < total[c]) sum_dma[c] += 8 * ($urandom % 24);
      for (int c = 0; c < 4; c++) if (sum_dma[c] > total[c]) sum_dma[c] = total[c];
      #1;
      fits = 32'(q[0].len) <= sum_dma[q[0].chan[7:0]] - rel[q[0].chan[1:0]];
      check(out_valid == fits, "out_valid");
      if (out_valid) check(out_trs == q[0], "out_trs");
      check(in_pop == (out_valid && out_ready), "in_pop");
      if (!fits) n_wait++;
      if (fits && !out_ready) n_nr++;
      @(posedge clk);
      if (in_pop) begin
        rel[q[0].chan[1:0]] += 32'(q[0].len);
        void'(q.pop_front());
        n_out++;
      end
    end
    check(q.size() == 0, "not all transactions released");
    check(n_wait > 0 && n_nr > 0, "cases not hit");
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
