// page_breaker -- 4 KiB page breaker.
//
// A PCI Express transaction may not cross a 4 KiB page of host memory.  The
// page breaker keeps the current byte offset of every DMA channel's stream
// (ring buffers are page aligned, so the offset locates the page) in a
// pipelined register field, and cuts each increment that crosses a page
// boundary into two: the pair {a, b}.  Part a then ends exactly at the
// boundary and is flagged page_end; so is an increment that happens to end
// on the boundary.  Increments with nodata (dropped frames) pass as a pair
// with an empty part a that only carries the data buffer word.
//
// No backpressure inside: the register field pipeline runs freely and the
// caller stops new increments with the almost-full flag of the FIFO that
// takes the pairs (the register field's three stages and the output
// register are in flight).  Latency: input to out_valid four cycles.
//
// The barrier bookkeeping that the design attaches to this block (colour,
// sampled and confirmed byte counts) is kept in the MTU breaker, where the
// bytes are actually handed to the crossbar; see mtu_breaker.
module page_breaker
  import rxfw_pkg::*;
#(
  parameter int unsigned CHANNELS = 256,
  parameter int unsigned PAGE     = 4096
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  inc_t   in_inc,
  output logic   out_valid,
  output pinc2_t out_pair,
  output logic   busy
);
  localparam int unsigned CW = $clog2(CHANNELS);

  logic          rf_valid;
  logic [CW-1:0] rf_idx;
  logic [31:0]   rf_old, rf_new, rf_aux;
  logic [31:0]   state [CHANNELS];
  logic [2:0]    inflight;

  pipe_reg_field #(.N(CHANNELS), .W(32)) u_rf (
    .clk, .rst,
    .in_valid (in_valid),
    .in_idx   (in_inc.chan[CW-1:0]),
    .in_inc   (32'(in_inc.len)),
    .in_aux   ({in_inc.nodata, in_inc.word, in_inc.len[14:0]}),
    .out_valid(rf_valid),
    .out_idx  (rf_idx),
    .out_old  (rf_old),
    .out_new  (rf_new),
    .out_aux  (rf_aux),
    .state    (state)
  );

  logic        a_nodata;
  wptr_t       a_word;
  logic [15:0] a_len, pg_rem;
  assign a_nodata = rf_aux[31];
  assign a_word   = rf_aux[30:15];
  assign a_len    = {1'b0, rf_aux[14:0]};
  assign pg_rem   = 16'(PAGE - (rf_old % PAGE));

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      inflight  <= '0;
    end else begin
      inflight  <= {inflight[1:0], in_valid};
      out_valid <= rf_valid;
    end
    out_pair.a.valid    <= 1'b1;
    out_pair.a.nodata   <= a_nodata;
    out_pair.a.word     <= a_word;
    out_pair.a.chan     <= chan_t'(rf_idx);
    out_pair.a.off      <= rf_old;
    out_pair.a.color    <= 1'b0;
    out_pair.b.nodata   <= 1'b0;
    out_pair.b.word     <= a_word;
    out_pair.b.chan     <= chan_t'(rf_idx);
    out_pair.b.off      <= rf_old + 32'(pg_rem);
    out_pair.b.color    <= 1'b0;
    out_pair.b.page_end <= 1'b0;
    if (a_len > pg_rem) begin
      out_pair.a.len      <= pg_rem;
      out_pair.a.page_end <= 1'b1;
      out_pair.b.valid    <= 1'b1;
      out_pair.b.len      <= a_len - pg_rem;
    end else begin
      out_pair.a.len      <= a_len;
      out_pair.a.page_end <= (a_len == pg_rem) && !a_nodata;
      out_pair.b.valid    <= 1'b0;
      out_pair.b.len      <= '0;
    end
  end

  assign busy = (inflight != 0) || rf_valid || out_valid;
endmodule
