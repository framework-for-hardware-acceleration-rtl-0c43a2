// tb_fifo -- self-checking test of the synchronous FIFO (default 8 x 8 bit,
// almost_full at 7 entries).
//
// Random writes and reads (never writing when full, never reading when
// empty) are compared with a queue model: read data in order, empty, full,
// almost_full and count every cycle.  Counts cycles in which the FIFO was
// full and almost full; a run in which either never happened fails.
// A watchdog ends the run with a failure.
module tb_fifo;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic       wr_en, rd_en, empty, full, af;
  logic [7:0] wr_data, rd_data;
  logic [3:0] count;
  fifo u_dut (.clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .full,
              .almost_full(af), .count);

  int checks = 0, failures = 0, n_full = 0, n_af = 0;
  logic [7:0] m [$];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 4000; c++) begin
      int bias;
      bias = (c / 500) % 2 == 0 ? 3 : 1;   // alternate fill and drain phases
      @(negedge clk);
      check(empty == (m.size() == 0), "empty");
      check(full == (m.size() == 8), "full");
      check(af == (m.size() >= 7), "almost_full");
      check(int'(count) == m.size(), "count");
      if (m.size() != 0) check(rd_data == m[0], "data");
      if (full) n_full++;
      if (af) n_af++;
      wr_en   = !full && ($urandom % 4 < bias);
      rd_en   = !empty && ($urandom % 4 >= bias);
      wr_data = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(m.pop_front());
      if (wr_en) m.push_back(wr_data);
    end
    check(n_full > 0, "never full");
    check(n_af > 0, "never almost full");
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
