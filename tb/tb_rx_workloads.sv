// tb_rx_workloads -- measures the RX data path at its default size against
// the line rates it is meant for.
//
// Three workloads, each fed as an MII byte stream (128 bytes per cycle) of
// frames spread over 16 DMA channels with large rings, the host always
// ready:
//   A  400 Gb/s, 1518-byte frames back to back (12-byte gap);
//   B  400 Gb/s, 64-byte frames back to back;
//   C  100 Gb/s, 1518-byte frames: each frame followed by three times its
//      own length of idle, the same average rate as one MII word in four.
// After each workload the path drains (the transaction timeout closes the
// last partial writes).  For each one the bench counts frames sent,
// frames the decoder discarded for lack of buffer space, and the payload
// bytes written over PCI Express, which must equal header plus padded frame
// for every frame not discarded.
//
// Expected, from the scheduler's one item per cycle: a 1518-byte frame needs
// about 16 scheduler cycles (13-14 subpackets and header, plus one for each
// subpacket that crosses a 256-byte transaction boundary) but arrives every
// 12.1 MII cycles, so A keeps about three quarters of its frames (check
// 65-90 %); a 64-byte frame needs 2-3 cycles but arrives every 0.7, so B
// keeps roughly a quarter to a third (check 15-50 %); C must lose nothing.
// Ring overflows must not happen.  Watchdog included.
module tb_rx_workloads;
  import rxfw_pkg::*;

  localparam int DATA_W = 1024;
  localparam int WB     = DATA_W / 8;
  localparam int NCH    = 16;
  localparam longint unsigned RBASE = 64'h1_0000_0000;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [DATA_W-1:0] rxd;
  logic [WB-1:0]     rxc;
  logic        cfg_we;
  logic [9:0]  cfg_addr;
  logic [63:0] cfg_wdata, cfg_rdata;
  logic        tvalid, tready, tsop, tlast;
  logic [DATA_W-1:0] tdata;
  logic [WB-1:0]     tkeep;
  logic [63:0] tuser_addr;
  logic [15:0] tuser_len, tuser_chan;
  logic [31:0] discarded, dropped;

  rx_framework u_dut (
    .clk, .rst, .rxd, .rxc, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .tvalid, .tready, .tdata, .tkeep, .tsop, .tlast, .tuser_addr, .tuser_len,
    .tuser_chan, .discarded, .dropped
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- MII source
  logic [8:0] q [$];            // {ctrl, byte}

  task automatic put_idle(input int n);
    repeat (n) q.push_back({1'b1, MII_IDLE});
  endtask

  task automatic send_frame(input int len, input int ch);
    while (q.size() % 8 != 0) q.push_back({1'b1, MII_IDLE});
    q.push_back({1'b1, MII_START});
    repeat (6) q.push_back({1'b0, MII_PREAMBLE});
    q.push_back({1'b0, MII_SFD});
    for (int i = 0; i < len; i++)
      q.push_back({1'b0, (i == 5) ? 8'(ch) : 8'($urandom)});
    q.push_back({1'b1, MII_TERM});
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < WB; i++) begin
      if (q.size() != 0) {rxc[i], rxd[8*i +: 8]} <= q.pop_front();
      else               {rxc[i], rxd[8*i +: 8]} <= {1'b1, MII_IDLE};
    end
  end

  // ---------------------------------------------------------------- host
  longint unsigned bytes_out;
  always_ff @(posedge clk) begin
    if (rst) tready <= 1'b0;
    else     tready <= 1'b1;
    if (rst) bytes_out <= 0;
    else if (tvalid && tready && tsop) bytes_out <= bytes_out + longint'(tuser_len);
  end

  task automatic cfg_write(input int ch, input int r, input logic [63:0] v);
    @(negedge clk);
    cfg_we    = 1'b1;
    cfg_addr  = 10'(ch * 4 + r);
    cfg_wdata = v;
    @(negedge clk);
    cfg_we    = 1'b0;
  endtask

  task automatic wait_drained();
    int quiet;
    quiet = 0;
    while (q.size() != 0) @(posedge clk);
    while (quiet < 3000) begin
      @(posedge clk);
      if (tvalid) quiet = 0;
      else        quiet++;
    end
  endtask

  // runs one workload; returns the fraction of frames kept, in percent
  task automatic run(input string name, input int nfr, input int len, input int idle,
                     output int kept_pct);
    longint unsigned b0;
    int d0, c0, kept, c1, fb;
    fb = 8 + ((len + 7) / 8) * 8;   // header + padded frame
    b0 = bytes_out;
    d0 = int'(discarded);
    c0 = cyc;
    for (int n = 0; n < nfr; n++) begin
      send_frame(len, int'($urandom % NCH));
      put_idle(idle);
      while (q.size() > 4 * WB) @(posedge clk);
    end
    while (q.size() != 0) @(posedge clk);
    c1 = cyc;
    wait_drained();
    kept = nfr - (int'(discarded) - d0);
    kept_pct = kept * 100 / nfr;
    check(bytes_out - b0 == longint'(kept) * longint'(fb),
          $sformatf("%s: %0d bytes written, expected %0d", name, bytes_out - b0, kept * fb));
    $display("%s: %0d frames in %0d cycles, kept %0d (%0d%%)", name, nfr, c1 - c0, kept, kept_pct);
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc == 300000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int pa, pb, pc;
    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int ch = 0; ch < NCH; ch++) begin
      cfg_write(ch, 0, RBASE + (64'(ch) << 20));
      cfg_write(ch, 1, {57'd0, 1'b1, 6'd20});
    end
    repeat (100) @(posedge clk);
    run("A 400G 1518 B", 300, 1518, 12, pa);
    check(pa >= 65 && pa <= 90, "A: share of frames kept outside 65-90 %");
    run("B 400G 64 B", 3000, 64, 12, pb);
    check(pb >= 15 && pb <= 50, "B: share of frames kept outside 15-50 %");
    run("C 100G 1518 B", 100, 1518, 3 * (1518 + 20), pc);
    check(pc == 100, "C: frames lost at 100 Gb/s");
    check(dropped == 0, "ring overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
