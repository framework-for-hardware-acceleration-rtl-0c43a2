// tb_pipe -- self-checking test of the pipe (two-entry skid buffer that
// registers the ready signal).
//
// A random source and a random sink exchange a numbered sequence through the
// pipe.  Checked: every item arrives once and in order, in_dst_rdy is high
// whenever the pipe holds fewer than two items, and the output stays stable
// while stalled.  Counts stalls (out_src_rdy with out_dst_rdy low) and
// back-pressure on the input; a run without them fails.  Watchdog included.
module tb_pipe;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [7:0] in_data, out_data;
  logic in_src_rdy, in_dst_rdy, out_src_rdy, out_dst_rdy;
  pipe u_dut (.clk, .rst, .in_data, .in_src_rdy, .in_dst_rdy, .out_data, .out_src_rdy,
              .out_dst_rdy);

  int checks = 0, failures = 0, n_stall = 0, n_bp = 0, sent = 0, got = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_src_rdy = 0; out_dst_rdy = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      in_src_rdy  = ($urandom % 4 != 0);
      in_data     = 8'(sent);
      out_dst_rdy = ($urandom % 3 != 0);
      #1;
      check(in_dst_rdy == (sent - got < 2), "in_dst_rdy");
      check(out_src_rdy == (sent != got), "out_src_rdy");
      if (out_src_rdy) check(out_data == 8'(got), $sformatf("data %0d exp %0d", out_data, got));
      if (out_src_rdy && !out_dst_rdy) n_stall++;
      if (in_src_rdy && !in_dst_rdy) n_bp++;
      @(posedge clk);
      if (in_src_rdy && in_dst_rdy) sent++;
      if (out_src_rdy && out_dst_rdy) got++;
    end
    check(got > 1000, "throughput");
    check(n_stall > 0, "never stalled");
    check(n_bp > 0, "never back-pressured");
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
