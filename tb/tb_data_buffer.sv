// tb_data_buffer -- self-checking test of the data buffer (512 words of
// 1024 bits, one whole-word write port, one read port per 64-bit column).
//
// Random words are written at random addresses while every column reads
// its own random address; read data (one cycle after the address) are
// compared with a reference memory, including same-cycle read and write of
// one address (the old word must come out).  Counts reads of words that
// have been written and such read-during-write cases; both must occur.
// Watchdog included.
module tb_data_buffer;
  localparam int NCOL = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic          we;
  logic [8:0]    waddr;
  logic [1023:0] wdata;
  logic [8:0]    raddr [NCOL];
  logic [63:0]   rdata [NCOL];
  data_buffer u_dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  int checks = 0, failures = 0, n_rd = 0, n_rw = 0;
  logic [1023:0] ref_m [512];
  bit            valid [512];
  logic [63:0]   exp_d [NCOL];
  bit            exp_v [NCOL];
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) valid[i] = 0;
    for (int c = 0; c < NCOL; c++) exp_v[c] = 0;
    we = 0; waddr = 0; wdata = '0;
    for (int c = 0; c < NCOL; c++) raddr[c] = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        if (exp_v[c]) begin
          check(rdata[c] == exp_d[c], $sformatf("column %0d", c));
          n_rd++;
        end
      we    = ($urandom % 2 == 0);
      waddr = 9'($urandom % 64);
      for (int k = 0; k < 32; k++) wdata[32*k +: 32] = $urandom;
      for (int c = 0; c < NCOL; c++) begin
        raddr[c] = ($urandom % 4 == 0) ? waddr : 9'($urandom % 64);
        exp_v[c] = valid[raddr[c]];
        exp_d[c] = ref_m[raddr[c]][64*c +: 64];
        if (we && raddr[c] == waddr && valid[waddr]) n_rw++;
      end
      @(posedge clk);
      if (we) begin ref_m[waddr] = wdata; valid[waddr] = 1; end
    end
    check(n_rd > 1000, "few reads checked");
    check(n_rw > 0, "no read during write");
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
