// tb_intra_pred_top: end-to-end test of the intra predictor on a small
// picture of 4x3 macroblocks, three pictures in a row (see tb_intra_core).
module tb_intra_pred_top;
  int checks, failures;
  bit done;
  tb_intra_core #(.COLS(4), .ROWS(3), .FRAMES(3)) core (.checks, .failures, .done);
  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
