// tb_rx_framework -- end-to-end test of the RX data path at its default size
// (1024-bit MII words, 2 frames per cycle, 256 channels, 256-byte PCI Express
// writes, 4 KiB pages).
//
// How it works: the bench builds an MII byte stream of Ethernet frames
// (Start on an 8-byte boundary, preamble, SFD, frame, Terminate, idle gap)
// and feeds it 128 bytes per cycle.  Byte 5 of a frame (last byte of the
// destination MAC) selects the DMA channel.  Channels 0..15 get 1 MiB rings
// at 0x1_0000_0000 + ch * 1 MiB, except channel 7, which gets a 4 KiB ring
// that the bench never frees, so it overflows.  A host memory model stores
// every byte the PCI Express stream writes.
//
// Checks, per write: length 1..256 bytes, no 4 KiB page crossing, address
// inside the channel's ring, no byte written twice, tlast on the right beat.
// At the end every channel's ring is parsed as header (len, channel,
// sequence) + frame padded to 8 bytes, up to the hardware write pointer read
// over the configuration bus, and its frames must be the good frames sent
// to that channel, in order, some possibly missing (dropped or discarded).
// The counts must add up: matched + dropped + discarded covers every good
// frame sent.
//
// Traffic phases: mixed random frames 64..1518 bytes with error frames
// (error character, too short, too long); back-to-back 64-byte frames that
// overload the single-lane scheduler; host backpressure (tready low) that
// uses up the free transaction ids; then an idle drain that lets the
// timeout close the last partial transactions.  Each of these mechanisms is
// counted and one that never happened is a failure.  A watchdog stops the
// run with a failure.
module tb_rx_framework;
  import rxfw_pkg::*;

  localparam int DATA_W = 1024;
  localparam int WB     = DATA_W / 8;
  localparam int NCH    = 16;          // channels used by the bench
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
  typedef byte unsigned frame_t [];
  frame_t exp_q [NCH][$];       // good frames sent per channel
  int good_sent = 0, err_sent = 0;

  task automatic put_idle(input int n);
    repeat (n) q.push_back({1'b1, MII_IDLE});
  endtask

  // kind: 0 good, 1 error character, 2 too short, 3 too long
  task automatic send_frame(input int len, input int ch, input int kind);
    frame_t f;
    f = new[len];
    foreach (f[i]) f[i] = 8'($urandom);
    f[5] = 8'(ch);
    while (q.size() % 8 != 0) q.push_back({1'b1, MII_IDLE});
    q.push_back({1'b1, MII_START});
    repeat (6) q.push_back({1'b0, MII_PREAMBLE});
    q.push_back({1'b0, MII_SFD});
    foreach (f[i]) begin
      if (kind == 1 && i == len / 2) q.push_back({1'b1, MII_ERROR});
      else                          q.push_back({1'b0, f[i]});
    end
    q.push_back({1'b1, MII_TERM});
    if (kind == 0) begin
      exp_q[ch].push_back(f);
      good_sent++;
    end else begin
      err_sent++;
    end
  endtask

  always @(posedge clk) begin
    for (int i = 0; i < WB; i++) begin
      if (q.size() != 0) {rxc[i], rxd[8*i +: 8]} <= q.pop_front();
      else               {rxc[i], rxd[8*i +: 8]} <= {1'b1, MII_IDLE};
    end
  end

  // ---------------------------------------------------------------- host
  byte unsigned mem [longint unsigned];
  longint unsigned cur_addr;
  int cur_len, cur_beat, in_trs = 0;
  bit tready_low = 0;
  longint unsigned next_off [256] = '{default: 0};
  int n_trs = 0, n_full = 0, n_short = 0, n_pgend = 0, n_bp = 0;

  always_ff @(posedge clk) begin
    if (rst) tready <= 1'b0;
    else     tready <= !tready_low && ($urandom % 8 != 0);
  end

  always @(posedge clk) if (!rst && tvalid && !tready) n_bp++;

  always @(posedge clk) begin
    if (!rst && tvalid && tready) begin
      if (tsop) begin
        longint unsigned rb;
        int ch;
        check(in_trs == 0, "tsop inside a transaction");
        cur_addr = tuser_addr;
        cur_len  = int'(tuser_len);
        cur_beat = 0;
        in_trs   = 1;
        ch = int'(tuser_chan);
        rb = RBASE + (longint'(ch) << 20);
        n_trs++;
        check(cur_len > 0 && cur_len <= 256, $sformatf("length %0d", cur_len));
        check((cur_addr % 4096) + longint'(cur_len) <= 4096,
              $sformatf("page crossing at %h len %0d", cur_addr, cur_len));
        check(ch < NCH && cur_addr >= rb &&
              cur_addr + longint'(cur_len) <= rb + ((ch == 7) ? 4096 : (1 << 20)),
              $sformatf("address %h outside ring of channel %0d", cur_addr, ch));
        check(cur_addr % 8 == 0, "unaligned write");
        check(cur_addr == rb + next_off[ch],
              $sformatf("ch %0d: write at %h, expected %h", ch, cur_addr, rb + next_off[ch]));
        next_off[ch] = cur_addr + longint'(cur_len) - rb;
        if (cur_len == 256) n_full++;
        else if ((cur_addr + longint'(cur_len)) % 4096 == 0) n_pgend++;
        else n_short++;
      end
      if (in_trs != 0) begin
        for (int i = 0; i < WB; i++)
          if (tkeep[i]) begin
            longint unsigned a;
            a = cur_addr + longint'(cur_beat) * longint'(WB) + longint'(i);
            if (mem.exists(a)) begin
              check(0, $sformatf("byte %h written twice", a));
            end
            mem[a] = tdata[8*i +: 8];
          end
        cur_beat++;
        check(tlast == (cur_beat * WB >= cur_len), "tlast position");
        if (tlast) in_trs = 0;
      end
    end
  end

  // ---------------------------------------------------------------- mechanisms
  // n_conflict (blocks left in the planner window after a cycle) is only
  // reported: with one instruction vector per cycle, each conflict-free on
  // its own, the window never has to hold blocks back in this top.
  int n_errdrop = 0, n_two_end = 0, n_barrier = 0, n_conflict = 0;
  int n_stall = 0, n_split = 0, n_noid = 0;
  always @(posedge clk) if (!rst) begin
    int have, picked;
    for (int k = 0; k < 2; k++)
      if (u_dut.pi_valid[k] && u_dut.pi[k].drop) n_errdrop++;
    if (u_dut.meta_valid == 2'b11) n_two_end++;
    if (u_dut.barrier) n_barrier++;
    if (u_dut.s_valid && !u_dut.s_ready) n_stall++;
    if (u_dut.u_sch.pg_valid && u_dut.u_sch.pg_pair.b.valid) n_split++;
    if (u_dut.fq_empty && u_dut.u_sch.u_mtu.in_valid) n_noid++;
    have = 0;
    for (int w = 0; w < 2; w++) have += $countones(u_dut.u_sch.u_pl.mask[w]);
    picked = $countones(u_dut.u_sch.u_pl.pick_v);
    if (have > picked) n_conflict++;
  end

  // ---------------------------------------------------------------- config
  task automatic cfg_write(input int ch, input int r, input logic [63:0] v);
    @(negedge clk);
    cfg_we    = 1'b1;
    cfg_addr  = 10'(ch * 4 + r);
    cfg_wdata = v;
    @(negedge clk);
    cfg_we    = 1'b0;
  endtask

  task automatic cfg_read(input int ch, input int r, output logic [63:0] v);
    cfg_addr = 10'(ch * 4 + r);
    #1;
    v = cfg_rdata;
  endtask

  // ---------------------------------------------------------------- watchdog
  int cycle = 0;
  always @(posedge clk) begin
    cycle++;
    if (cycle == 400000) begin
      failures++;
      $display("FAIL: watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic wait_drained();
    int quiet = 0;
    while (q.size() != 0) @(posedge clk);
    while (quiet < 3000) begin
      @(posedge clk);
      if (tvalid) quiet = 0;
      else        quiet++;
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    static int matched = 0;

    cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    for (int ch = 0; ch < NCH; ch++) begin
      cfg_write(ch, 0, RBASE + (64'(ch) << 20));
      cfg_write(ch, 1, {57'd0, 1'b1, (ch == 7) ? 6'd12 : 6'd20});
    end
    repeat (100) @(posedge clk);

    // phase 1: mixed traffic with error frames
    for (int n = 0; n < 400; n++) begin
      int r, len, kind;
      r = int'($urandom % 20);
      kind = (r == 0) ? 1 : (r == 1) ? 2 : (r == 2) ? 3 : 0;
      len  = (kind == 2) ? 40 : (kind == 3) ? 1600 : 64 + int'($urandom % 1455);
      send_frame(len, int'($urandom % NCH), kind);
      put_idle(int'($urandom % 24));
      while (q.size() > 4 * WB) @(posedge clk);
    end
    // phase 2: back-to-back minimum-size frames
    for (int n = 0; n < 1500; n++) begin
      send_frame(64, int'($urandom % NCH), 0);
      while (q.size() > 4 * WB) @(posedge clk);
    end
    // phase 3: host backpressure
    tready_low = 1;
    for (int n = 0; n < 150; n++) begin
      send_frame(64 + int'($urandom % 600), int'($urandom % NCH), 0);
      put_idle(64);
      while (q.size() > 4 * WB) @(posedge clk);
    end
    repeat (2000) @(posedge clk);
    tready_low = 0;
    wait_drained();

    // ------------------------------------------------------------ results
    for (int ch = 0; ch < NCH; ch++) begin
      longint unsigned base;
      int pos, hw, ei;
      logic [63:0] rv;
      base = RBASE + (longint'(ch) << 20);
      cfg_read(ch, 3, rv);
      hw = int'(rv);
      pos = 0;
      ei = 0;
      while (pos < hw) begin
        logic [63:0] h;
        int flen;
        bit ok;
        h = '0;
        for (int i = 0; i < 8; i++) begin
          if (!mem.exists(base + longint'(pos) + longint'(i))) begin
            check(0, $sformatf("ch %0d: header byte %0d not written", ch, pos + i));
            break;
          end
          h[8*i +: 8] = mem[base + longint'(pos) + longint'(i)];
        end
        flen = int'(h[15:0]);
        check(int'(h[31:16]) == ch, $sformatf("ch %0d: header channel %0d", ch, h[31:16]));
        if (flen < 64 || flen > 1518) begin
          check(0, $sformatf("ch %0d: bad length %0d", ch, flen));
          break;
        end
        ok = 0;
        while (ei < exp_q[ch].size() && !ok) begin
          if (exp_q[ch][ei].size() == flen) begin
            ok = 1;
            for (int i = 0; i < flen; i++)
              if (!mem.exists(base + longint'(pos) + 64'd8 + longint'(i)) ||
                  mem[base + longint'(pos) + 64'd8 + longint'(i)] != exp_q[ch][ei][i]) begin
                ok = 0;
                break;
              end
          end
          ei++;
        end
        check(ok, $sformatf("ch %0d: frame at %0d not among those sent", ch, pos));
        if (ok) matched++;
        pos += 8 + ((flen + 7) / 8) * 8;
      end
      check(pos == hw, $sformatf("ch %0d: stream length %0d vs pointer %0d", ch, pos, hw));
    end
    check(matched + int'(dropped) + int'(discarded) >= good_sent,
          $sformatf("lost frames: matched %0d dropped %0d discarded %0d sent %0d",
                    matched, dropped, discarded, good_sent));
    check(matched + int'(dropped) + int'(discarded) <= good_sent + err_sent,
          "more frames accounted for than sent");
    check(in_trs == 0, "transaction left open");
    $display("sent %0d good, %0d bad; matched %0d dropped %0d discarded %0d",
             good_sent, err_sent, matched, dropped, discarded);
    $display("trs %0d: full %0d page-end %0d short %0d; split %0d barrier %0d conflict %0d",
             n_trs, n_full, n_pgend, n_short, n_split, n_barrier, n_conflict);
    $display("errdrop %0d two-end %0d stall %0d backpressure %0d no-id %0d",
             n_errdrop, n_two_end, n_stall, n_bp, n_noid);
    check(matched > good_sent / 4, "too few frames delivered");
    check(n_errdrop > 0,   "mechanism: error frames dropped");
    check(discarded > 0,   "mechanism: decoder discard");
    check(dropped > 0,     "mechanism: ring full drop");
    check(n_split > 0,     "mechanism: page split");
    check(n_full > 0,      "mechanism: full-size transaction");
    check(n_short > 0,     "mechanism: timeout close");
    check(n_barrier > 0,   "mechanism: barrier");
    check(n_two_end > 0,   "mechanism: two frames end in one word");
    check(n_stall > 0,     "mechanism: scheduler stall");
    check(n_bp > 0,        "mechanism: host backpressure");
    check(n_noid > 0,      "mechanism: free ids used up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
