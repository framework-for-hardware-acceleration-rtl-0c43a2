// tb_pcie_axi_wr -- self-checking test of the PCI Express write side (1024-bit
// words, 256-byte transactions, 64 slots).
//
// The bench plays the DMA buffer (a read returns, one cycle after the
// address, a word that encodes the row) and the free-id FIFO.  It first
// checks that all 64 ids are handed out once after reset.  It then sends
// random transaction requests for free slots only, with random lengths
// 8..256 bytes, while tready is random.  Each transaction must come out as
// ceil(len/128) beats, in request order, with tsop on the first beat,
// tlast on the last, tkeep covering exactly len bytes, the header fields
// equal to the request and the data equal to the slot's rows; its id must
// come back on free_wr once.  Counts backpressure cycles and two-beat
// transactions; both must occur.  Watchdog included.
module tb_pcie_axi_wr;
  import rxfw_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic          req_valid, req_ready, free_wr, tvalid, tready, tsop, tlast;
  trs_req_t      req;
  logic [6:0]    raddr;
  logic [1023:0] rdata, tdata;
  logic [15:0]   free_id, tuser_len, tuser_chan;
  logic [127:0]  tkeep;
  logic [63:0]   tuser_addr;
  pcie_axi_wr u_dut (.clk, .rst, .req_valid, .req_ready, .req, .raddr, .rdata, .free_wr,
                     .free_id, .tvalid, .tready, .tdata, .tkeep, .tsop, .tlast, .tuser_addr,
                     .tuser_len, .tuser_chan);

  function automatic logic [1023:0] rowval(input logic [6:0] r);
    logic [1023:0] v;
    for (int k = 0; k < 32; k++) v[32*k +: 32] = {25'(k), r} ^ 32'hA5A5_0000;
    return v;
  endfunction
  always_ff @(posedge clk) rdata <= rowval(raddr);

  int checks = 0, failures = 0, n_bp = 0, n_two = 0, n_done = 0;
  int free_q [$];
  bit busy [64];
  trs_req_t sent [$];
  int beat = 0;
  bit init_phase = 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst) begin
    if (free_wr) begin
      check(free_id < 64, "free id range");
      if (free_id < 64) begin
        check(busy[free_id[5:0]] || init_phase, "id freed while not in use");
        busy[free_id[5:0]] = 0;
        free_q.push_back(int'(free_id));
      end
    end
    if (tvalid && !tready) n_bp++;
    if (tvalid && tready) begin
      trs_req_t e;
      int nb;
      check(sent.size() != 0, "beat without request");
      if (sent.size() != 0) begin
        e = sent[0];
        nb = (int'(e.len) + 127) / 128;
        check(tsop == (beat == 0), "tsop");
        check(tlast == (beat == nb - 1), "tlast");
        check(tuser_addr == e.addr && tuser_len == e.len && tuser_chan == e.chan, "header");
        check(tdata == rowval(7'(int'(e.id) * 2 + beat)), "data");
        for (int i = 0; i < 128; i++)
          if (tkeep[i] != (beat * 128 + i < int'(e.len))) begin
            check(0, "tkeep");
            break;
          end
        beat++;
        if (tlast) begin
          if (nb == 2) n_two++;
          void'(sent.pop_front());
          beat = 0;
          n_done++;
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) busy[i] = 0;
    req_valid = 0; req = '0; tready = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (80) @(posedge clk);
    init_phase = 0;
    check(free_q.size() == 64, "initial ids");
    begin
      bit seen [64];
      for (int i = 0; i < 64; i++) seen[i] = 0;
      foreach (free_q[i]) seen[free_q[i]] = 1;
      for (int i = 0; i < 64; i++) check(seen[i], "initial id missing");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      tready = ($urandom % 4 != 0);
      if (!req_valid && free_q.size() != 0 && $urandom % 2 == 0) begin
        int id;
        id = free_q.pop_front();
        busy[id] = 1;
        req_valid = 1;
        req.id = 16'(id);
        req.chan = 16'($urandom % 256);
        req.addr = {32'h1, $urandom} & ~64'h7;
        req.len = 16'(8 * (1 + $urandom % 32));
      end
      @(posedge clk);
      if (req_valid && req_ready) begin
        sent.push_back(req);
        #1 req_valid = 0;
      end
    end
    @(negedge clk);
    tready = 1;
    repeat (200) @(posedge clk);
    check(sent.size() == 0 && !req_valid, "transactions left");
    check(free_q.size() == 64, "ids lost");
    check(n_done > 500, "throughput");
    check(n_bp > 0 && n_two > 0, "cases not hit");
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
