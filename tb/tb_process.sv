// tb_process -- self-checking test of the example application core
// (1024-bit words, two frames per cycle, 256 channels, 8-byte headers).
//
// Random frame records (with random error flags) arrive on both lanes.  One
// cycle later each must give a packet instruction with the same place and
// length, the drop flag set exactly for frames with an error, and the
// channel taken from byte 5 of the frame; every kept frame must also write
// one 8-byte header {sequence, channel, length} into the first block of its
// region of the header buffer, with sequence numbers counting kept frames in
// lane order.  Counts dropped frames and cycles with both lanes busy; both
// must occur.  Watchdog included.
module tb_process;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [1:0]   meta_valid, hb_we, pi_valid;
  dec_meta_t    meta [2];
  logic [8:0]   hb_waddr [2];
  logic [0:0]   hb_wregion [2];
  logic [511:0] hb_wdata [2];
  logic [7:0]   hb_wblk_en [2];
  pkt_instr_t   pi [2];
  process u_dut (.clk, .rst, .meta_valid, .meta, .hb_we, .hb_waddr, .hb_wregion, .hb_wdata,
                 .hb_wblk_en, .pi_valid, .pi);

  int checks = 0, failures = 0, n_drop = 0, n_two = 0;
  logic [31:0] seq = 0;
  logic [1:0]  pv;
  dec_meta_t   pm [2];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    meta_valid = 0; pv = 0;
    for (int k = 0; k < 2; k++) meta[k] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        check(pi_valid[k] == pv[k], "pi_valid");
        if (pv[k]) begin
          bit drop;
          drop = pm[k].err_proto || pm[k].err_mtu || pm[k].err_len;
          check(pi[k].drop == drop && pi[k].chan == 16'(pm[k].first_blk[47:40]) &&
                pi[k].word == pm[k].word && pi[k].blk == pm[k].blk && pi[k].len == pm[k].len &&
                pi[k].hdr_len == 8, $sformatf("instruction lane %0d", k));
          check(hb_we[k] == !drop, "header write enable");
          if (!drop) begin
            check(hb_waddr[k] == pm[k].word[8:0] && hb_wregion[k] == pm[k].blk[3] &&
                  hb_wblk_en[k] == 8'h01 &&
                  hb_wdata[k][63:0] == {seq, 8'd0, pm[k].first_blk[47:40], pm[k].len},
                  $sformatf("header lane %0d", k));
            seq++;
          end else n_drop++;
        end else begin
          check(!hb_we[k], "header write without frame");
        end
      end
      for (int k = 0; k < 2; k++) begin
        meta_valid[k] = ($urandom % 2 == 0);
        meta[k].word = 16'($urandom);
        meta[k].blk  = 8'($urandom % 16);
        meta[k].len  = 16'(64 + $urandom % 1455);
        meta[k].err_proto = ($urandom % 10 == 0);
        meta[k].err_mtu   = ($urandom % 10 == 0);
        meta[k].err_len   = ($urandom % 10 == 0);
        meta[k].first_blk = {$urandom, $urandom};
      end
      if (meta_valid == 2'b11) n_two++;
      pv = meta_valid;
      pm = meta;
    end
    check(n_drop > 0 && n_two > 0, "cases not hit");
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
