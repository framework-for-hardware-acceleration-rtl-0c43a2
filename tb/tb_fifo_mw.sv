// tb_fifo_mw -- self-checking test of the FIFO with several write ports
// (default two ports, 64 entries).
//
// Each cycle any subset of the ports writes (port 0 first in order) and the
// head may be read; data, empty and count are compared with a queue model.
// Cycles with both ports writing and with the FIFO holding more than half
// its depth are counted; a run without them fails.  Watchdog included.
module tb_fifo_mw;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [1:0] wr_en;
  logic [7:0] wr_data [2];
  logic       rd_en, empty;
  logic [7:0] rd_data;
  logic [6:0] count;
  fifo_mw u_dut (.clk, .rst, .wr_en, .wr_data, .rd_en, .rd_data, .empty, .count);

  int checks = 0, failures = 0, n_two = 0, n_deep = 0;
  logic [7:0] m [$];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data[0] = 0; wr_data[1] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 4000; c++) begin
      bit fill;
      fill = (c / 300) % 2 == 0;
      @(negedge clk);
      check(empty == (m.size() == 0), "empty");
      check(int'(count) == m.size(), "count");
      if (m.size() != 0) check(rd_data == m[0], "data");
      if (m.size() > 32) n_deep++;
      rd_en = !empty && ($urandom % 4 < (fill ? 1 : 3));
      for (int p = 0; p < 2; p++) begin
        wr_en[p]   = (m.size() + 2 <= 64) && ($urandom % 4 < (fill ? 3 : 1));
        wr_data[p] = 8'($urandom);
      end
      if (wr_en == 2'b11) n_two++;
      @(posedge clk);
      #1;
      if (rd_en) void'(m.pop_front());
      for (int p = 0; p < 2; p++) if (wr_en[p]) m.push_back(wr_data[p]);
    end
    check(n_two > 0, "never two writes");
    check(n_deep > 0, "never more than half full");
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
