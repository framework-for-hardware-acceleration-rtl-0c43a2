// tb_dma_ctrl -- self-checking test of the DMA channel controller (256
// channels).
//
// The bench configures eight channels with random page-aligned bases and
// ring sizes of 4..64 KiB (one left disabled) and then sends random packet
// instructions while the software read pointer of random channels moves up
// to the hardware write pointer now and then.  A reference model of every
// ring decides whether a frame (8-byte header plus frame rounded up to 8
// bytes) fits; the forwarded instruction must carry drop exactly for frames
// already dropped or that do not fit, the hardware write pointer (read over
// the configuration bus) and the dropped counter must match.  Random
// transactions must come out with address base + (offset mod ring size).
// Counts ring-full drops and frames accepted after one; both must occur.
// Watchdog included.
module tb_dma_ctrl;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        cfg_we, in_valid, in_ready, out_valid, out_ready;
  logic        trs_valid, trs_ready, req_valid, req_ready;
  logic [9:0]  cfg_addr;
  logic [63:0] cfg_wdata, cfg_rdata;
  pkt_instr_t  in_pkt, out_pkt;
  trs_t        trs;
  trs_req_t    req;
  logic [31:0] dropped;
  dma_ctrl u_dut (.clk, .rst, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata, .in_valid, .in_ready,
                  .in_pkt, .out_valid, .out_ready, .out_pkt, .trs_valid, .trs_ready, .trs,
                  .req_valid, .req_ready, .req, .dropped);

  int checks = 0, failures = 0, n_full = 0, n_after = 0, n_drops = 0;
  logic [63:0] base [8];
  int          szl [8];
  bit          en [8], was_full [8];
  longint      hw [8], sw [8];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic cfg_write(input int ch, input int r, input logic [63:0] v);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 10'(ch * 4 + r); cfg_wdata = v;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; in_valid = 0; in_pkt = '0; out_ready = 1;
    trs_valid = 0; trs = '0; req_ready = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 8; c++) begin
      base[c] = {16'h0, 16'($urandom), 32'h0} + (64'(c) << 20);
      szl[c]  = 12 + int'($urandom % 5);
      en[c]   = (c != 3);
      hw[c] = 0; sw[c] = 0; was_full[c] = 0;
      cfg_write(c * 32, 0, base[c]);
      cfg_write(c * 32, 1, {57'd0, en[c], 6'(szl[c])});
    end
    for (int n = 0; n < 4000; n++) begin
      int c;
      bit fits;
      longint need;
      @(negedge clk);
      c = int'($urandom % 8);
      in_valid = 1;
      in_pkt.drop = ($urandom % 8 == 0);
      in_pkt.chan = 16'(c * 32);
      in_pkt.len  = 16'(64 + $urandom % 1455);
      in_pkt.hdr_len = 8;
      in_pkt.word = 16'($urandom);
      in_pkt.blk  = 8'($urandom % 16);
      trs_valid = 1;
      trs.id = 16'($urandom % 64);
      trs.chan = 16'(c * 32);
      trs.off = $urandom;
      trs.len = 16'(8 * (1 + $urandom % 32));
      #1;
      need = 8 + ((longint'(in_pkt.len) + 7) / 8) * 8;
      fits = en[c] && need <= (longint'(1) << szl[c]) - (hw[c] - sw[c]);
      check(out_valid && in_ready, "handshake");
      check(out_pkt.drop == (in_pkt.drop || !fits), $sformatf("drop flag ch %0d", c));
      check(out_pkt.chan == in_pkt.chan && out_pkt.len == in_pkt.len &&
            out_pkt.word == in_pkt.word && out_pkt.blk == in_pkt.blk, "instruction fields");
      check(req_valid && trs_ready && req.id == trs.id && req.len == trs.len &&
            req.chan == trs.chan &&
            req.addr == base[c] + (64'(trs.off) & ((64'(1) << szl[c]) - 64'(1))), "transaction address");
      if (!in_pkt.drop && !fits) begin
        if (en[c]) begin n_full++; was_full[c] = 1; end
        n_drops++;
      end
      if (!in_pkt.drop && fits) begin
        hw[c] += need;
        if (was_full[c]) begin n_after++; was_full[c] = 0; end
      end
      @(posedge clk);
      #1 in_valid = 0; trs_valid = 0;
      if ($urandom % 6 == 0) begin
        int d;
        d = int'($urandom % 8);
        sw[d] = hw[d];
        cfg_write(d * 32, 2, 64'(sw[d]));
      end
      if (n % 97 == 0)
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          cfg_addr = 10'(k * 32 * 4 + 3);
          #1 check(cfg_rdata[31:0] == 32'(hw[k]), $sformatf("hw pointer ch %0d", k));
        end
    end
    @(negedge clk);
    check(int'(dropped) == n_drops, "dropped counter");
    check(n_full > 0 && n_after > 0, "cases not hit");
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
