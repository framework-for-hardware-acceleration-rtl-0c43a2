// tb_dma_buffer -- self-checking test of the DMA buffer (64 transaction
// slots of two 1024-bit rows, one write port per 64-bit column, one
// whole-row read port).
//
// Every column writes a random row with random probability each cycle; a
// random row is read and compared one cycle later with a reference memory.
// Counts cycles in which columns wrote different rows at once (the case the
// per-column ports exist for); it must occur.  Watchdog included.
module tb_dma_buffer;
  localparam int NCOL = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we    [NCOL];
  logic [6:0]    waddr [NCOL];
  logic [63:0]   wdata [NCOL];
  logic [6:0]    raddr;
  logic [1023:0] rdata;
  dma_buffer u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0, n_mix = 0, n_rd = 0;
  logic [63:0] ref_m [128][NCOL];
  bit          valid [128][NCOL];
  logic [63:0] exp_d [NCOL];
  bit          exp_v [NCOL];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 128; i++) for (int c = 0; c < NCOL; c++) valid[i][c] = 0;
    for (int c = 0; c < NCOL; c++) exp_v[c] = 0;
    for (int n = 0; n < 4000; n++) begin
      bit mix;
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        if (exp_v[c]) begin
          check(rdata[64*c +: 64] == exp_d[c], $sformatf("column %0d", c));
          n_rd++;
        end
      mix = 0;
      for (int c = 0; c < NCOL; c++) begin
        we[c]    = ($urandom % 3 == 0);
        waddr[c] = 7'($urandom % 16);
        wdata[c] = {$urandom, $urandom};
        if (c > 0 && we[c] && we[0] && waddr[c] != waddr[0]) mix = 1;
      end
      if (mix) n_mix++;
      raddr = 7'($urandom % 16);
      for (int c = 0; c < NCOL; c++) begin
        exp_v[c] = valid[raddr][c];
        exp_d[c] = ref_m[raddr][c];
      end
      @(posedge clk);
      for (int c = 0; c < NCOL; c++)
        if (we[c]) begin ref_m[waddr[c]][c] = wdata[c]; valid[waddr[c]][c] = 1; end
    end
    check(n_rd > 1000, "few reads checked");
    check(n_mix > 0, "no mixed-row writes");
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
