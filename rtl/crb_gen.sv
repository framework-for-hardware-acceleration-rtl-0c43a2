// crb_gen -- crossbar instruction generator.
//
// Pairs each subtransaction instruction (where a run of stream bytes goes in
// the DMA buffer) with the subpacket it belongs to (where those bytes are in
// the data or header buffer) and expands it into one crossbar instruction
// per 8-byte block: source buffer, word and column; destination row and
// column of the DMA buffer.  Subtransactions arrive in the same order as the
// subpackets; a subpacket that was split between two transactions is used
// by two subtransactions, so the position inside the current subpacket is
// kept.  One subtransaction per cycle becomes a vector of up to NCOL
// instructions (one word never holds more blocks than that); mask marks
// the valid ones.  The blocks of one vector come from distinct source
// columns and go to distinct destination columns.  Valid/ready towards the
// planner; both FIFO heads are consumed in place.
module crb_gen
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W   = 1024,
  parameter int unsigned PCIE_MTU = 256
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  strs_valid,
  input  strs_t strs,
  output logic  strs_pop,
  input  logic  spkt_valid,
  input  spkt_t spkt,
  output logic  spkt_pop,
  output logic  out_valid,
  input  logic  out_ready,
  output logic [DATA_W/64-1:0] out_mask,
  output crb_t  out_crb [DATA_W/64]
);
  localparam int unsigned NCOL = DATA_W / 64;
  localparam int unsigned ROWS = PCIE_MTU / (DATA_W / 8);
  localparam int unsigned TROWS = (ROWS > 0) ? ROWS : 1;

  logic [15:0] spos;     // bytes of the current subpacket already placed
  int unsigned nblk, sblk, dblk;

  assign out_valid = strs_valid && spkt_valid;
  assign strs_pop  = out_valid && out_ready;
  assign spkt_pop  = strs_pop && (spos + strs.len >= pad_blk(spkt.len));

  always_comb begin
    nblk = int'(strs.len) / 8;
    for (int k = 0; k < NCOL; k++) begin
      sblk = int'(spkt.blk) + int'(spos) / 8 + k;
      dblk = int'(strs.trs_off) / 8 + k;
      out_mask[k]         = (k < nblk);
      out_crb[k].hdr      = spkt.hdr;
      out_crb[k].src_word = spkt.word;
      out_crb[k].src_col  = 8'(sblk % NCOL);
      out_crb[k].dst_row  = 16'(int'(strs.trs_id) * TROWS + dblk / NCOL);
      out_crb[k].dst_col  = 8'(dblk % NCOL);
      out_crb[k].color    = strs.color;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)           spos <= '0;
    else if (spkt_pop) spos <= '0;
    else if (strs_pop) spos <= spos + strs.len;
  end
endmodule
