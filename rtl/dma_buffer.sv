// dma_buffer -- shared buffer of PCI Express write transactions.
//
// One buffer serves all DMA channels.  It holds NUM_TRS transaction slots of
// PCIE_MTU bytes each; a slot is ROWS = PCIE_MTU / (DATA_W/8) words, and a
// transaction id is simply its slot number.  Like the other buffers it is
// split into NCOL 64-bit columns; here every column has its own write
// address, so the crossbar can write up to NCOL blocks of different
// transactions in one cycle as long as their columns differ (the scheduler's
// planner guarantees that).  The PCI Express side reads whole words with one
// address, data one cycle later.  Slots are allocated dynamically through a
// free-id FIFO outside this block.  NUM_TRS = 64 is this implementation's
// choice; the document leaves the size open.
module dma_buffer #(
  parameter int unsigned DATA_W   = 1024,
  parameter int unsigned PCIE_MTU = 256,
  parameter int unsigned NUM_TRS  = 64,
  localparam int unsigned DEPTH   = NUM_TRS * ((PCIE_MTU / (DATA_W / 8) > 0) ? PCIE_MTU / (DATA_W / 8) : 1),
  localparam int unsigned AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we    [DATA_W/64],
  input  logic [AW-1:0]     waddr [DATA_W/64],
  input  logic [63:0]       wdata [DATA_W/64],
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);
  localparam int unsigned NCOL = DATA_W / 64;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [63:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we[c]) mem[waddr[c]] <= wdata[c];
      rdata[64*c +: 64] <= mem[raddr];
    end
  end
endmodule
