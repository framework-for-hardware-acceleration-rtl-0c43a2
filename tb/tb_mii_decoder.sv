// tb_mii_decoder -- self-checking test of the MII decoder (1024-bit words,
// two frames per cycle, 512-word data buffer, 1518-byte MTU).
//
// The bench sends an MII stream of random frames (Start on an 8-byte
// boundary, preamble, SFD, frame, Terminate, random idle gap) mixed with
// bad frames: an error character inside, a bad preamble, too short (40
// bytes) and too long (1600 bytes).  It keeps a copy of the data buffer from
// the decoder's write port and the approximate read pointer follows the
// write pointer, except during a phase where it stands still and the
// application's room_ok is low for a while.
//
// Every frame record must match the next frame sent that was not discarded:
// length (cut at 1518), error flags, first 8 bytes, and for good frames
// every byte read back from the buffer copy at the reported word and block.
// Frames missing from the records must equal the discarded counter, and the
// decoder may never run more than 512 words ahead of the read pointer.
// Counts two frames ending in one word, discards and each error kind; a
// run missing one fails.  Watchdog included.
module tb_mii_decoder;
  import rxfw_pkg::*;
  localparam int WB = 128;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [1023:0] rxd, buf_wdata;
  logic [WB-1:0] rxc;
  wptr_t         rd_ptr, wr_ptr, buf_wptr;
  logic          room_ok, buf_we;
  logic [1:0]    meta_valid;
  dec_meta_t     meta [2];
  logic [31:0]   discarded;
  mii_decoder u_dut (.clk, .rst, .rxd, .rxc, .rd_ptr, .room_ok, .buf_we, .buf_wptr, .buf_wdata,
                     .meta_valid, .meta, .discarded, .wr_ptr);

  typedef struct { byte unsigned d []; int kind; } frm_t;
  frm_t sent [$];
  logic [8:0] q [$];
  logic [1023:0] bufm [512];
  int checks = 0, failures = 0, skipped = 0, n_two = 0, n_rec = 0;
  int n_kind [5] = '{default: 0};
  bit freeze = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // kind: 0 good, 1 error character, 2 too short, 3 too long, 4 bad preamble
  task automatic send(input int len, input int kind);
    frm_t f;
    f.d = new[len];
    f.kind = kind;
    foreach (f.d[i]) f.d[i] = 8'($urandom);
    while (q.size() % 8 != 0) q.push_back({1'b1, MII_IDLE});
    q.push_back({1'b1, MII_START});
    for (int i = 0; i < 6; i++) q.push_back({1'b0, (kind == 4 && i == 3) ? 8'h57 : MII_PREAMBLE});
    q.push_back({1'b0, MII_SFD});
    foreach (f.d[i])
      if (kind == 1 && i == len / 2) q.push_back({1'b1, MII_ERROR});
      else                           q.push_back({1'b0, f.d[i]});
    q.push_back({1'b1, MII_TERM});
    sent.push_back(f);
  endtask

  always @(posedge clk)
    for (int i = 0; i < WB; i++)
      if (q.size() != 0) {rxc[i], rxd[8*i +: 8]} <= q.pop_front();
      else               {rxc[i], rxd[8*i +: 8]} <= {1'b1, MII_IDLE};

  always_ff @(posedge clk)
    if (rst)          rd_ptr <= '0;
    else if (!freeze) rd_ptr <= wr_ptr;

  always @(posedge clk) if (!rst) begin
    if (buf_we) bufm[buf_wptr[8:0]] = buf_wdata;
    check(16'(wr_ptr - rd_ptr) <= 16'd512, "write pointer ran past the read pointer");
    if (meta_valid == 2'b11) n_two++;
    for (int k = 0; k < 2; k++)
      if (meta_valid[k]) begin
        frm_t f;
        int elen;
        bit found;
        found = 0;
        n_rec++;
        while (sent.size() != 0 && !found) begin
          f = sent.pop_front();
          elen = (f.kind == 1) ? f.d.size() - 1 : (f.d.size() > 1518) ? 1518 : f.d.size();
          if (int'(meta[k].len) == elen && meta[k].first_blk[7:0] == f.d[0] &&
              meta[k].first_blk[63:56] == f.d[7]) found = 1;
          else skipped++;
        end
        check(found, "record matches no frame sent");
        if (found) begin
          n_kind[f.kind]++;
          check(meta[k].err_proto == (f.kind == 1 || f.kind == 4) &&
                meta[k].err_len == (elen < 64) && meta[k].err_mtu == (f.kind == 3),
                $sformatf("error flags kind %0d: %b%b%b len %0d", f.kind, meta[k].err_proto, meta[k].err_len, meta[k].err_mtu, meta[k].len));
          for (int i = 0; i < 8; i++)
            check(meta[k].first_blk[8*i +: 8] == f.d[i], "first block");
          if (f.kind == 0)
            for (int i = 0; i < elen; i++) begin
              int b, w;
              b = int'(meta[k].blk) * 8 + i;
              w = (int'(meta[k].word) + b / WB) % 512;
              if (bufm[w][8 * (b % WB) +: 8] != f.d[i]) begin
                check(0, $sformatf("frame byte %0d in the buffer", i));
                break;
              end
            end
          checks++;
        end
      end
  end

  initial begin
    room_ok = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1200; n++) begin
      int r, kind, len;
      r = int'($urandom % 25);
      kind = (r < 4) ? r + 1 : 0;
      len = (kind == 2) ? 40 : (kind == 3) ? 1600 : ($urandom % 3 == 0) ? 64 : 64 + int'($urandom % 1455);
      if (n >= 600 && n < 700) begin kind = 0; len = 64 + int'($urandom % 64); end
      send(len, kind);
      repeat ($urandom % 16) q.push_back({1'b1, MII_IDLE});
      if (n == 600) begin freeze = 1; room_ok = 0; end
      if (n == 680) room_ok = 1;
      if (n == 700) freeze = 0;
      while (q.size() > 4 * WB) @(posedge clk);
    end
    while (q.size() != 0) @(posedge clk);
    repeat (10) @(posedge clk);
    skipped += sent.size();
    check(skipped == int'(discarded), $sformatf("missing %0d vs discarded %0d", skipped, discarded));
    check(n_two > 0 && discarded > 0, "two-frame word or discard not seen");
    for (int k = 0; k < 5; k++) check(n_kind[k] > 0, $sformatf("frame kind %0d not seen", k));
    $display("records %0d discarded %0d two %0d", n_rec, discarded, n_two);
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
