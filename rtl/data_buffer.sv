// data_buffer -- store-and-forward buffer of received MII words.
//
// The buffer is built from NCOL independent 64-bit wide memories (columns),
// one per 8-byte block of a DATA_W-bit word.  The decoder writes a whole
// word at once.  On the read side every column has its own address, so the
// crossbar can fetch blocks of different words in the same cycle, as long as
// no two of them sit in the same column.  Read data appears one cycle after
// the address (synchronous block RAM).  Frames stay in the buffer until the
// application has finished with them, because the application decides only
// at the end of a frame where it goes.  Addresses are the low bits of the
// free-running word pointer.  The column split follows the described 8-byte
// alignment; the depth default (512 words, one 36 Kb RAM per column) is this
// implementation's choice.
module data_buffer #(
  parameter int unsigned DATA_W = 1024,
  parameter int unsigned DEPTH  = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DATA_W-1:0]        wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr [DATA_W/64],
  output logic [63:0]              rdata [DATA_W/64]
);
  localparam int unsigned NCOL = DATA_W / 64;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    logic [63:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we) mem[waddr] <= wdata[64*c +: 64];
      rdata[c] <= mem[raddr[c]];
    end
  end
endmodule
