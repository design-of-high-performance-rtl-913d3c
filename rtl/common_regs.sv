// common_regs: the common registers of the predict samples processor.
//
// N registers of W bits (the document uses seven 14-bit registers) hold
// values a common computation unit produced so that later cycles can reuse
// them instead of computing them again: luma 4x4 filter results shared by the
// two halves of a block, partial sums and final values of the DC modes, and
// the plane-mode parameters t1, t2, t3 and the multiples 3, 5, 6 and 7 of t3.
// Each register has its own write enable; a write takes effect at the next
// rising clock edge and all registers are read at any time. Synchronous
// active-low reset clears them (reset behaviour is this design's choice).
module common_regs #(
  parameter int N = 7,
  parameter int W = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        we,
  input  logic [N-1:0][W-1:0] wdata,
  output logic [N-1:0][W-1:0] rdata
);
  always_ff @(posedge clk) begin
    if (!rst_n) rdata <= '0;
    else
      for (int i = 0; i < N; i++)
        if (we[i]) rdata[i] <= wdata[i];
  end
endmodule
