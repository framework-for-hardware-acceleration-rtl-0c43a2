// planner -- schedules crossbar block moves without write collisions.
//
// Every column of the DMA buffer takes one write per cycle and every column
// of the data and header buffers gives one read per cycle.  The planner holds
// a window of WIN instruction vectors from the crossbar instruction
// generator and each cycle picks a set of block moves in which no source
// column (per source buffer) and no destination column is used twice: a
// greedy maximal matching.  Candidates are visited by colour (the colour
// being drained first) and then by age, oldest vector first, so every block
// is eventually moved.  Picked blocks leave the window; a vector whose
// blocks have all left frees its slot, and the slots are kept in age order.
//
// Barrier: the planner drains colour prio.  When the window holds no block
// of that colour and none is on its way (the oldest coloured item upstream,
// up_valid/up_color, is absent or of the other colour; items arrive in
// order) and no block of that colour was picked in the last XB_LAT cycles
// (so every picked block has been written into the DMA buffer through the
// crossbar pipeline), it pulses barrier and drains the other colour next.
// After reset colour 0 is drained first.
//
// Outputs are registered, indexed by destination column: pl_valid[d] and
// pl_crb[d] move one block into DMA buffer column d.  Window size WIN = 2 is
// this implementation's choice; the greedy matching stands in for the
// maximal pair matching the design calls for.
module planner
  import rxfw_pkg::*;
#(
  parameter int unsigned DATA_W = 1024,
  parameter int unsigned WIN    = 2,
  parameter int unsigned XB_LAT = 4    // cycles from a pick to the DMA buffer write
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [DATA_W/64-1:0] in_mask,
  input  crb_t                 in_crb [DATA_W/64],
  input  logic                 up_valid,
  input  logic                 up_color,
  output logic                 barrier,
  output logic                 empty,
  output logic [DATA_W/64-1:0] pl_valid,
  output crb_t                 pl_crb [DATA_W/64]
);
  localparam int unsigned NCOL = DATA_W / 64;

  logic [NCOL-1:0] mask [WIN];
  crb_t            crb  [WIN][NCOL];
  logic            prio;

  logic [NCOL-1:0] mask_n [WIN];
  crb_t            crb_n  [WIN][NCOL];
  logic [NCOL-1:0] pick_v;
  crb_t            pick   [NCOL];
  logic            any_prio, bar_n, accept;
  logic [1:0]      pick_col;            // a block of colour 0 / 1 picked now
  logic [XB_LAT-1:0] hist0, hist1;      // ... in the last XB_LAT cycles

  always_comb begin
    logic [NCOL-1:0] dused, sdused, shused;
    logic [NCOL-1:0] left [WIN];
    int unsigned     n;
    dused  = '0;
    sdused = '0;
    shused = '0;
    pick_v = '0;
    pick_col = '0;
    for (int d = 0; d < NCOL; d++) pick[d] = '0;
    any_prio = 1'b0;
    for (int w = 0; w < WIN; w++) begin
      left[w] = mask[w];
      for (int k = 0; k < NCOL; k++)
        if (mask[w][k] && crb[w][k].color == prio) any_prio = 1'b1;
    end
    // pass 0: colour being drained, pass 1: the other colour
    for (int pass = 0; pass < 2; pass++)
      for (int w = 0; w < WIN; w++)
        for (int k = 0; k < NCOL; k++) begin
          crb_t c;
          logic  sfree;
          c = crb[w][k];
          sfree = c.hdr ? !shused[c.src_col[$clog2(NCOL)-1:0]]
                        : !sdused[c.src_col[$clog2(NCOL)-1:0]];
          if (left[w][k] && ((c.color == prio) == (pass == 0)) &&
              sfree && !dused[c.dst_col[$clog2(NCOL)-1:0]]) begin
            left[w][k] = 1'b0;
            dused[c.dst_col[$clog2(NCOL)-1:0]] = 1'b1;
            if (c.hdr) shused[c.src_col[$clog2(NCOL)-1:0]] = 1'b1;
            else       sdused[c.src_col[$clog2(NCOL)-1:0]] = 1'b1;
            pick_v[c.dst_col[$clog2(NCOL)-1:0]] = 1'b1;
            pick_col[c.color] = 1'b1;
            pick[c.dst_col[$clog2(NCOL)-1:0]]   = c;
          end
        end
    // compact the window (keep age order) and append the new vector
    n = 0;
    for (int w = 0; w < WIN; w++) begin
      mask_n[w] = '0;
      for (int k = 0; k < NCOL; k++) crb_n[w][k] = crb[w][k];
    end
    for (int w = 0; w < WIN; w++)
      if (left[w] != 0) begin
        mask_n[n] = left[w];
        for (int k = 0; k < NCOL; k++) crb_n[n][k] = crb[w][k];
        n++;
      end
    in_ready = (n < WIN);
    accept   = in_valid && in_ready;
    if (accept) begin
      mask_n[n] = in_mask;
      for (int k = 0; k < NCOL; k++) crb_n[n][k] = in_crb[k];
    end
    bar_n = !any_prio && (!up_valid || up_color != prio) &&
            ((prio == 1'b0) ? (hist0 == 0) : (hist1 == 0));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int w = 0; w < WIN; w++) mask[w] <= '0;
      prio     <= 1'b0;
      barrier  <= 1'b0;
      hist0    <= '0;
      hist1    <= '0;
      pl_valid <= '0;
    end else begin
      mask     <= mask_n;
      pl_valid <= pick_v;
      barrier  <= bar_n;
      hist0    <= XB_LAT'({hist0, pick_col[0]});
      hist1    <= XB_LAT'({hist1, pick_col[1]});
      if (bar_n) prio <= !prio;
    end
    crb    <= crb_n;
    pl_crb <= pick;
  end

  always_comb begin
    empty = 1'b1;
    for (int w = 0; w < WIN; w++) if (mask[w] != 0) empty = 1'b0;
  end
endmodule
