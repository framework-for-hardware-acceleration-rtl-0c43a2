// header_buffer -- per-frame headers written by the application core.
//
// Same column organisation and read side as the data buffer: NCOL 64-bit
// memories, one read address per column, read data one cycle later.  A word
// is divided into PPC uniform regions of NCOL/PPC blocks.  A frame's header
// is stored at the same word as the frame's first byte, in that byte's
// region, always starting at the region's first block; hdr_len selects how
// many blocks of the region are written (byte enables per block).  Two
// frames that start in the same word start in different regions, so up to
// PPC headers can be written per cycle, one write port per region.
module header_buffer #(
  parameter int unsigned DATA_W = 1024,
  parameter int unsigned PPC    = 2,
  parameter int unsigned DEPTH  = 512
) (
  input  logic                     clk,
  input  logic [PPC-1:0]           we,
  input  logic [$clog2(DEPTH)-1:0] waddr [PPC],
  input  logic [$clog2(PPC > 1 ? PPC : 2)-1:0] wregion [PPC],
  input  logic [DATA_W/PPC-1:0]    wdata [PPC],
  input  logic [DATA_W/64/PPC-1:0] wblk_en [PPC],
  input  logic [$clog2(DEPTH)-1:0] raddr [DATA_W/64],
  output logic [63:0]              rdata [DATA_W/64]
);
  localparam int unsigned NCOL = DATA_W / 64;
  localparam int unsigned RB   = NCOL / PPC;   // blocks per region

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [63:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      for (int p = 0; p < PPC; p++)
        if (we[p] && int'(wregion[p]) == c / RB && wblk_en[p][c % RB])
          mem[waddr[p]] <= wdata[p][64*(c % RB) +: 64];
      rdata[c] <= mem[raddr[c]];
    end
  end
endmodule
