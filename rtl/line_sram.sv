// line_sram: dual-port SRAM holding one row of reconstructed pixels.
//
// The intra predictor keeps the bottom pixel row of the macroblock row above
// the current one in two such memories, one for luma (Y) and one for both
// chroma components (Cb in the lower half of the addresses, Cr in the upper
// half). For a 1920-pixel-wide picture each holds 1920 bytes, 3.75 Kbytes in
// total, which is the SRAM size the document reports. Word width (eight
// pixels) and port behaviour are this design's choices.
//
// One write port and one read port, both synchronous to clk. A read returns
// the word addressed in the cycle re is high on rdata in the next cycle; a
// read of the address written in the same cycle returns the old word. The
// array is not reset.
module line_sram #(
  parameter int DEPTH = 240,
  parameter int WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
