// tb_ccu2: checks the 2-input common computation unit against
// (a+b+1) >> beta (arithmetic shift) for random signed and pixel operands.
module tb_ccu2;
  logic signed [15:0] a, b;
  logic [2:0] beta;
  logic signed [17:0] f;
  int checks = 0, failures = 0;

  ccu2 #(.IN_W(16)) dut (.a, .b, .beta, .f);

  task automatic check();
    longint e;
    #1;
    e = (longint'(a) + longint'(b) + 1) >>> beta;
    checks++;
    if (longint'(f) != e) begin
      failures++;
      if (failures < 10) $display("a=%0d b=%0d beta=%0d: got %0d exp %0d", a, b, beta, f, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); beta = 3'($urandom_range(7));
      check();
    end
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom_range(255)); b = 16'($urandom_range(255)); beta = 3'd1;
      check();
    end
    a = 16'sh7fff; b = 16'sh7fff; beta = 0; check();
    a = -16'sh8000; b = -16'sh8000; beta = 0; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
