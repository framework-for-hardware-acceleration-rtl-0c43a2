// tb_header_buffer -- self-checking test of the header buffer (512 words of
// 1024 bits in two 512-bit regions, one write port per region lane, with a
// block enable per 64-bit block, and one read port per column).
//
// Each cycle both lanes may write random blocks of a random region of a
// random word (the two lanes never pick the same word and region); every
// column reads a random word.  Read data are compared with a reference
// memory one cycle later.  Counts cycles with both lanes writing and
// partial-block writes; both must occur.  Watchdog included.
module tb_header_buffer;
  localparam int NCOL = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [1:0]   we;
  logic [8:0]   waddr [2];
  logic [0:0]   wregion [2];
  logic [511:0] wdata [2];
  logic [7:0]   wblk_en [2];
  logic [8:0]   raddr [NCOL];
  logic [63:0]  rdata [NCOL];
  header_buffer u_dut (.clk, .we, .waddr, .wregion, .wdata, .wblk_en, .raddr, .rdata);

  int checks = 0, failures = 0, n_two = 0, n_part = 0, n_rd = 0;
  logic [63:0] ref_m [512][NCOL];
  bit          valid [512][NCOL];
  logic [63:0] exp_d [NCOL];
  bit          exp_v [NCOL];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) for (int c = 0; c < NCOL; c++) valid[i][c] = 0;
    for (int c = 0; c < NCOL; c++) exp_v[c] = 0;
    we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        if (exp_v[c]) begin
          check(rdata[c] == exp_d[c], $sformatf("column %0d", c));
          n_rd++;
        end
      for (int p = 0; p < 2; p++) begin
        we[p]      = ($urandom % 2 == 0);
        waddr[p]   = 9'($urandom % 32);
        wregion[p] = 1'($urandom);
        for (int k = 0; k < 16; k++) wdata[p][32*k +: 32] = $urandom;
        wblk_en[p] = 8'($urandom);
      end
      if (waddr[1] == waddr[0] && wregion[1] == wregion[0]) we[1] = 0;
      if (we == 2'b11) n_two++;
      for (int p = 0; p < 2; p++) if (we[p] && wblk_en[p] != 8'hff && wblk_en[p] != 0) n_part++;
      for (int c = 0; c < NCOL; c++) begin
        raddr[c] = 9'($urandom % 32);
        exp_v[c] = valid[raddr[c]][c];
        exp_d[c] = ref_m[raddr[c]][c];
      end
      @(posedge clk);
      for (int p = 0; p < 2; p++)
        if (we[p])
          for (int b = 0; b < 8; b++)
            if (wblk_en[p][b]) begin
              ref_m[waddr[p]][8 * wregion[p] + b] = wdata[p][64*b +: 64];
              valid[waddr[p]][8 * wregion[p] + b] = 1;
            end
    end
    check(n_rd > 1000, "few reads checked");
    check(n_two > 0 && n_part > 0, "write cases not hit");
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
