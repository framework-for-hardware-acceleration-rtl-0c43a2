// pipe_reg_field -- pipelined register field with a read-modify-write unit.
//
// Keeps one W-bit state per index (one per DMA channel) in flip-flops and
// updates one entry per cycle: new = old + inc.  A plain register field
// would read, add and write back in one cycle, a long loop through the read
// multiplexer and write demultiplexer.  Here the update is cut into three
// stages:
//   DF  read the entry (the input is registered first),
//   EX  add, taking the operand from a forwarding path when a newer value is
//       still in flight: EX->EX from the item one ahead, WB->EX from the item
//       two ahead (it was written back in the cycle this item was read),
//   WB  write the result back and present it at the outputs.
// An update issued at cycle t appears on out_* at t+3.  There is no
// backpressure; the caller keeps room downstream.  The three-stage split
// and the two forwarding paths follow the published structure; the adder as
// the update function is the one this framework needs.
module pipe_reg_field #(
  parameter int unsigned N = 256,
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [$clog2(N)-1:0] in_idx,
  input  logic [W-1:0]         in_inc,
  input  logic [W-1:0]         in_aux,     // carried along unchanged
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic [W-1:0]         out_old,
  output logic [W-1:0]         out_new,
  output logic [W-1:0]         out_aux,
  output logic [W-1:0]         state [N]   // all entries, for snapshots
);
  localparam int unsigned IW = $clog2(N);

  typedef struct packed {
    logic          valid;
    logic [IW-1:0] idx;
    logic [W-1:0]  inc;
    logic [W-1:0]  aux;
  } op_t;

  op_t          s1, s2;
  logic [W-1:0] s2_val;          // value read in DF
  logic         s4_valid;        // item written back one cycle ago
  logic [IW-1:0] s4_idx;
  logic [W-1:0] s4_new;
  logic [W-1:0] operand;

  // EX operand selection (the forwarding control)
  always_comb begin
    if (out_valid && out_idx == s2.idx)      operand = out_new;  // EX->EX
    else if (s4_valid && s4_idx == s2.idx)   operand = s4_new;   // WB->EX
    else                                     operand = s2_val;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1.valid  <= 1'b0;
      s2.valid  <= 1'b0;
      out_valid <= 1'b0;
      s4_valid  <= 1'b0;
      for (int i = 0; i < N; i++) state[i] <= '0;
    end else begin
      s1        <= '{valid: in_valid, idx: in_idx, inc: in_inc, aux: in_aux};
      s2        <= s1;
      s2_val    <= state[s1.idx];
      out_valid <= s2.valid;
      out_idx   <= s2.idx;
      out_old   <= operand;
      out_new   <= operand + s2.inc;
      out_aux   <= s2.aux;
      if (out_valid) state[out_idx] <= out_new;
      s4_valid  <= out_valid;
      s4_idx    <= out_idx;
      s4_new    <= out_new;
    end
  end
endmodule
