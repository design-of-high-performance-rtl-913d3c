// tb_line_sram: random simultaneous reads and writes on the dual-port line
// SRAM, compared with a model: one cycle read latency, a read of the word
// written in the same cycle returns the old contents.
module tb_line_sram;
  localparam int DEPTH = 240;
  logic clk = 1'b0;
  logic we, re;
  logic [7:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [DEPTH];
  bit          known [DEPTH];
  logic [63:0] exp_q;
  bit          exp_v;
  int checks = 0, failures = 0;

  line_sram #(.DEPTH(DEPTH), .WIDTH(64)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0; exp_v = 0;
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata != exp_q) begin failures++; if (failures < 10) $display("read got %h exp %h", rdata, exp_q); end
      end
      we = i < DEPTH ? 1'b1 : 1'($urandom_range(1));
      waddr = i < DEPTH ? 8'(i) : 8'($urandom_range(DEPTH - 1));
      wdata = {$urandom, $urandom};
      re = (i >= DEPTH) && 1'($urandom_range(1));
      raddr = ($urandom_range(3) == 0) ? waddr : 8'($urandom_range(DEPTH - 1));
      exp_v = re && known[raddr];
      exp_q = model[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
