// tb_pipe_reg_field -- self-checking test of the pipelined register field
// (256 entries of 32 bits, three-cycle read-modify-write with forwarding).
//
// Random increments, often to the same few entries on consecutive cycles so
// that both forwarding paths (from the stage just ahead, and from the write
// back stage) are needed, are applied alongside a reference array.  Every
// output must give the old and new value of its entry, its index and the
// carried aux word, three cycles after the input; the final state must equal
// the reference.  Back-to-back hits on one entry (distance 1 and 2) are
// counted and must both occur.  Watchdog included.
module tb_pipe_reg_field;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;
  logic        in_valid, out_valid;
  logic [7:0]  in_idx, out_idx;
  logic [31:0] in_inc, in_aux, out_old, out_new, out_aux;
  logic [31:0] state [256];
  pipe_reg_field u_dut (.clk, .rst, .in_valid, .in_idx, .in_inc, .in_aux, .out_valid,
                        .out_idx, .out_old, .out_new, .out_aux, .state);

  int checks = 0, failures = 0, n_d1 = 0, n_d2 = 0;
  logic [31:0] ref_v [256];
  typedef struct { logic [7:0] idx; logic [31:0] old_v, new_v, aux; } exp_t;
  exp_t eq [$];
  int last1 = -1, last2 = -1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (!rst && out_valid) begin
    exp_t e;
    check(eq.size() != 0, "unexpected output");
    if (eq.size() != 0) begin
      e = eq.pop_front();
      check(out_idx == e.idx && out_old == e.old_v && out_new == e.new_v && out_aux == e.aux,
            $sformatf("idx %0d old %0d new %0d exp idx %0d old %0d new %0d",
                      out_idx, out_old, out_new, e.idx, e.old_v, e.new_v));
    end
  end

  initial begin
    for (int i = 0; i < 256; i++) ref_v[i] = '0;
    in_valid = 0; in_idx = 0; in_inc = 0; in_aux = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 5000; c++) begin
      exp_t e;
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_idx   = ($urandom % 2 == 0) ? 8'($urandom % 3) : 8'($urandom);
      in_inc   = 32'($urandom % 1000);
      in_aux   = $urandom;
      if (in_valid) begin
        if (int'(in_idx) == last1) n_d1++;
        if (int'(in_idx) == last2) n_d2++;
        e.idx = in_idx; e.old_v = ref_v[in_idx]; e.new_v = ref_v[in_idx] + in_inc;
        e.aux = in_aux;
        ref_v[in_idx] = e.new_v;
        eq.push_back(e);
      end
      last2 = last1;
      last1 = in_valid ? int'(in_idx) : -1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(posedge clk);
    check(eq.size() == 0, "outputs missing");
    for (int i = 0; i < 256; i++) check(state[i] == ref_v[i], $sformatf("state %0d", i));
    check(n_d1 > 0 && n_d2 > 0, "forwarding cases not hit");
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
