// tb_intra_pred_full: end-to-end test of the intra predictor at its default
// size, one whole 1920x1088 picture (120x68 macroblocks): the upper half
// with reconstructed pixels returned at once, the lower half with random
// delays (see tb_intra_core).
module tb_intra_pred_full;
  int checks, failures;
  bit done;
  tb_intra_core #(.COLS(120), .ROWS(68), .FRAMES(1)) core (.checks, .failures, .done);
  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
