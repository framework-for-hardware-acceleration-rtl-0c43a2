// tb_planner -- self-checking test of the planner (16 columns, window of two
// instruction vectors, greedy collision-free block choice, barrier colours).
//
// The bench plays the crossbar instruction generator: random vectors whose
// blocks have random source columns, header/data source and destination
// columns, so that blocks of the two vectors in the window collide.  Every
// block carries a unique number in its source word.  The bench colours new
// vectors like the MTU breaker does (colour flips at every barrier, starting
// at 1 while the planner drains colour 0) and reports the colour of its
// waiting vector as the oldest upstream item.
//
// Checks: each output block sits in its own destination column, no source
// column of one buffer is used twice in a cycle, every block comes out once
// and only after it went in; when barrier pulses, no block of the colour
// just drained is left in the planner or waiting; at the end every block has
// come out.  Counts cycles with blocks held back by a conflict, and
// barriers; both must occur.  Watchdog included.
module tb_planner;
  import rxfw_pkg::*;
  localparam int NCOL = 16;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic            in_valid, in_ready, up_valid, up_color, barrier, empty;
  logic [NCOL-1:0] in_mask, pl_valid;
  crb_t            in_crb [NCOL], pl_crb [NCOL];
  planner u_dut (.clk, .rst, .in_valid, .in_ready, .in_mask, .in_crb, .up_valid, .up_color,
                 .barrier, .empty, .pl_valid, .pl_crb);

  int checks = 0, failures = 0, n_conf = 0, n_bar = 0, n_in = 0, n_out = 0;
  bit   outstanding [int];      // block number -> colour
  logic col_of [int];
  logic mtu_color = 1'b1, prio = 1'b0;
  int   uid = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  task automatic new_vector();
    in_mask = '0;
    for (int k = 0; k < NCOL; k++) begin
      in_mask[k]         = ($urandom % 3 != 0);
      in_crb[k].hdr      = ($urandom % 5 == 0);
      in_crb[k].src_word = 16'(uid);
      in_crb[k].src_col  = 8'($urandom % NCOL);
      in_crb[k].dst_row  = 16'($urandom);
      in_crb[k].dst_col  = 8'($urandom % NCOL);
      in_crb[k].color    = mtu_color;
      uid++;
    end
    if (in_mask == 0) in_mask[0] = 1'b1;
  endtask

  initial begin
    static int cyc = 0;
    in_valid = 0; in_mask = '0; up_valid = 0; up_color = 0;
    for (int k = 0; k < NCOL; k++) in_crb[k] = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (cyc < 4000 || outstanding.size() != 0 || in_valid) begin
      logic [NCOL-1:0] sd, sh;
      @(negedge clk);
      cyc++;
      // outputs of the last edge
      sd = '0; sh = '0;
      for (int d = 0; d < NCOL; d++)
        if (pl_valid[d]) begin
          int id;
          id = int'(pl_crb[d].src_word);
          check(int'(pl_crb[d].dst_col) == d, "destination column");
          if (pl_crb[d].hdr) begin check(!sh[pl_crb[d].src_col[3:0]], "header source reused");
                                   sh[pl_crb[d].src_col[3:0]] = 1; end
          else               begin check(!sd[pl_crb[d].src_col[3:0]], "data source reused");
                                   sd[pl_crb[d].src_col[3:0]] = 1; end
          check(outstanding.exists(id), $sformatf("block %0d not expected", id));
          outstanding.delete(id);
          n_out++;
        end
      if (barrier) begin
        bit left;
        left = 0;
        foreach (outstanding[i]) if (col_of[i] == prio) left = 1;
        check(!left, "barrier with blocks of the drained colour left");
        check(!(in_valid && in_crb[0].color == prio), "barrier with a vector waiting");
        prio = !prio;
        mtu_color = !mtu_color;
        n_bar++;
      end
      begin
        int have;
        have = 0;
        for (int w = 0; w < 2; w++) have += $countones(u_dut.mask[w]);
        if (have > $countones(u_dut.pick_v)) n_conf++;
      end
      if (!in_valid && cyc < 4000 && $urandom % 4 != 0) begin
        new_vector();
        in_valid = 1;
      end
      up_valid = in_valid;
      up_color = in_crb[0].color;
      #1;
      @(posedge clk);
      if (in_valid && in_ready) begin
        for (int k = 0; k < NCOL; k++)
          if (in_mask[k]) begin
            outstanding[int'(in_crb[k].src_word)] = 1;
            col_of[int'(in_crb[k].src_word)] = in_crb[k].color;
            n_in++;
          end
        #1 in_valid = 0;
      end
      if (cyc > 20000) break;
    end
    repeat (3) @(posedge clk);
    check(outstanding.size() == 0, "blocks never came out");
    check(n_in == n_out && n_in > 1000, "block count");
    check(n_conf > 0, "no conflicts");
    check(n_bar > 2, "too few barriers");
    $display("in %0d out %0d conflicts %0d barriers %0d", n_in, n_out, n_conf, n_bar);
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
