// pipe -- two-item pipeline register that breaks the ready path.
//
// In a pipeline with src_rdy/dst_rdy flow control the ready signal would
// otherwise run combinationally through every stage.  The pipe holds an
// output register and one spare (skid) register.  The ready it gives
// upstream (in_dst_rdy) is a flop: it drops as soon as one item is parked in
// the spare register, and the spare register catches the item that upstream
// may still send in that cycle.  Full throughput when downstream is ready,
// one cycle latency.
module pipe #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst,
  input  T     in_data,
  input  logic in_src_rdy,
  output logic in_dst_rdy,
  output T     out_data,
  output logic out_src_rdy,
  input  logic out_dst_rdy
);
  T     skid;
  logic skid_vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_src_rdy <= 1'b0;
      skid_vld    <= 1'b0;
    end else begin
      if (!out_src_rdy || out_dst_rdy) begin
        // output register free (or being emptied): take the spare item first
        if (skid_vld) begin
          out_data    <= skid;
          out_src_rdy <= 1'b1;
          skid_vld    <= 1'b0;
        end else begin
          out_data    <= in_data;
          out_src_rdy <= in_src_rdy && in_dst_rdy;
        end
      end else if (in_src_rdy && in_dst_rdy) begin
        skid     <= in_data;
        skid_vld <= 1'b1;
      end
    end
  end

  assign in_dst_rdy = !skid_vld;

  a_out_stable: assert property (@(posedge clk) disable iff (rst)
    out_src_rdy && !out_dst_rdy |=> out_src_rdy && $stable(out_data));
endmodule
