// tb_crossbar -- self-checking test of the crossbar (16 columns of 64-bit
// blocks; data and header buffer read ports; DMA buffer write ports).
//
// The bench plays both source buffers: a read returns, one cycle after the
// address, a block value that encodes buffer, word and column.  Each cycle
// it issues a random collision-free set of block moves (each destination
// column at most once, each source column at most once per buffer), and
// checks one cycle later that every destination column writes exactly the
// expected block at the expected row, and nothing else.  Counts moves from
// the header buffer and cycles with ten or more moves; both must occur.
// Watchdog included.
module tb_crossbar;
  import rxfw_pkg::*;
  localparam int NCOL = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic [NCOL-1:0] pl_valid;
  crb_t            pl_crb [NCOL];
  logic [8:0]      dbuf_raddr [NCOL], hbuf_raddr [NCOL];
  logic [63:0]     dbuf_rdata [NCOL], hbuf_rdata [NCOL];
  logic            dma_we [NCOL];
  logic [6:0]      dma_waddr [NCOL];
  logic [63:0]     dma_wdata [NCOL];
  crossbar u_dut (.clk, .rst, .pl_valid, .pl_crb, .dbuf_raddr, .dbuf_rdata, .hbuf_raddr,
                  .hbuf_rdata, .dma_we, .dma_waddr, .dma_wdata);

  function automatic logic [63:0] blkval(input bit hdr, input logic [8:0] w, input int c);
    return {hdr ? 8'hAA : 8'h55, 8'(c), 16'(w), 32'h1234_5678 ^ {23'd0, w}};
  endfunction

  always_ff @(posedge clk)
    for (int c = 0; c < NCOL; c++) begin
      dbuf_rdata[c] <= blkval(0, dbuf_raddr[c], c);
      hbuf_rdata[c] <= blkval(1, hbuf_raddr[c], c);
    end

  int checks = 0, failures = 0, n_hdr = 0, n_busy = 0;
  logic [NCOL-1:0] ev;
  crb_t            ec [NCOL];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    pl_valid = '0;
    for (int d = 0; d < NCOL; d++) pl_crb[d] = '0;
    ev = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int dperm [NCOL], hperm [NCOL];
      @(negedge clk);
      for (int d = 0; d < NCOL; d++)
        if (ev[d]) begin
          check(dma_we[d] && dma_waddr[d] == ec[d].dst_row[6:0] &&
                dma_wdata[d] == blkval(ec[d].hdr, ec[d].src_word[8:0], int'(ec[d].src_col)),
                $sformatf("column %0d", d));
        end else begin
          check(!dma_we[d], $sformatf("column %0d wrote", d));
        end
      for (int i = 0; i < NCOL; i++) begin dperm[i] = i; hperm[i] = i; end
      dperm.shuffle();
      hperm.shuffle();
      for (int d = 0; d < NCOL; d++) begin
        pl_valid[d] = ($urandom % 4 != 0);
        pl_crb[d].hdr      = ($urandom % 4 == 0);
        pl_crb[d].src_word = 16'($urandom);
        pl_crb[d].src_col  = 8'(pl_crb[d].hdr ? hperm[d] : dperm[d]);
        pl_crb[d].dst_row  = 16'($urandom % 128);
        pl_crb[d].dst_col  = 8'(d);
        pl_crb[d].color    = 1'($urandom);
        if (pl_valid[d] && pl_crb[d].hdr) n_hdr++;
      end
      if ($countones(pl_valid) >= 10) n_busy++;
      ev = pl_valid;
      ec = pl_crb;
    end
    check(n_hdr > 0 && n_busy > 0, "cases not hit");
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
