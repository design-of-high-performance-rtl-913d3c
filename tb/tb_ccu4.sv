// tb_ccu4: checks the 4-input common computation unit against
// (W+X+Y+Z+2) >> alpha (arithmetic shift) for random signed operands,
// for pixel operands and for the extreme operand values.
module tb_ccu4;
  logic signed [15:0] w, x, y, z;
  logic [2:0] alpha;
  logic signed [17:0] f;
  int checks = 0, failures = 0;

  ccu4 #(.IN_W(16)) dut (.w, .x, .y, .z, .alpha, .f);

  task automatic check();
    longint e;
    #1;
    e = (longint'(w) + longint'(x) + longint'(y) + longint'(z) + 2) >>> alpha;
    checks++;
    if (longint'(f) != e) begin
      failures++;
      if (failures < 10) $display("w=%0d x=%0d y=%0d z=%0d a=%0d: got %0d exp %0d", w, x, y, z, alpha, f, e);
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
      w = 16'($urandom); x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      alpha = 3'($urandom_range(7));
      check();
    end
    for (int i = 0; i < 3000; i++) begin
      w = 16'($urandom_range(255)); x = 16'($urandom_range(255));
      y = 16'($urandom_range(255)); z = 16'($urandom_range(255));
      alpha = 3'($urandom_range(5));
      check();
    end
    w = 16'sh7fff; x = 16'sh7fff; y = 16'sh7fff; z = 16'sh7fff; alpha = 0; check();
    w = -16'sh8000; x = -16'sh8000; y = -16'sh8000; z = -16'sh8000; alpha = 0; check();
    w = -16'sd7; x = 16'sd0; y = 16'sd0; z = 16'sd0; alpha = 1; check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
