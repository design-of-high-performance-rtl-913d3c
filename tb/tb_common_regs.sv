// tb_common_regs: random writes with random enables into the seven 14-bit
// common registers, compared every cycle with a model; also checks reset.
module tb_common_regs;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [6:0] we;
  logic [6:0][13:0] wdata, rdata, model;
  int checks = 0, failures = 0;

  common_regs #(.N(7), .W(14)) dut (.clk, .rst_n, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; wdata = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (rdata != '0) begin failures++; $display("not cleared by reset"); end
    for (int i = 0; i < 1000; i++) begin
      we = 7'($urandom);
      for (int r = 0; r < 7; r++) wdata[r] = 14'($urandom);
      @(negedge clk);
      for (int r = 0; r < 7; r++) if (we[r]) model[r] = wdata[r];
      checks++;
      if (rdata != model) begin
        failures++;
        if (failures < 10) $display("cycle %0d: got %h exp %h", i, rdata, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
