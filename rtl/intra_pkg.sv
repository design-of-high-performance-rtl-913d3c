// intra_pkg: types and constants shared by the H.264 intra prediction circuit.
//
// The circuit predicts one macroblock (16x16 luma plus two 8x8 chroma blocks)
// at a time from its reconstructed neighbours. Predictions leave the circuit
// in groups of eight pixels:
//   - luma 4x4 blocks: two columns of four rows (shape GRP_2X4),
//   - luma 16x16 and chroma 8x8 blocks: one column of eight rows (GRP_1X8).
// The arithmetic width of the common computation units and of the seven
// common registers (14 bits) follows the document; the group shapes, the
// operand width of 16 bits and the mode encodings (those of H.264) are this
// design's choices.
package intra_pkg;

  typedef logic [7:0] pix_t;

  localparam int REG_W    = 14;  // common register width
  localparam int NUM_REGS = 7;   // number of common registers
  localparam int OP_W     = 16;  // operand width of the common computation units
  localparam int NUM_CCU4 = 5;   // 4-input common computation units
  localparam int NUM_CCU2 = 3;   // 2-input common computation units
  localparam int NUM_OUT  = 8;   // prediction pixels per cycle

  typedef logic signed [REG_W-1:0] creg_t;
  typedef logic signed [OP_W-1:0]  op_t;

  // Block class a prediction job works on
  typedef enum logic [1:0] {CLS_L4 = 2'd0, CLS_L16 = 2'd1, CLS_CH = 2'd2} cls_e;

  // Colour component
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Luma 4x4 prediction modes (H.264 numbering)
  localparam logic [3:0] M4_V = 4'd0, M4_H = 4'd1, M4_DC = 4'd2, M4_DDL = 4'd3,
                         M4_DDR = 4'd4, M4_VR = 4'd5, M4_HD = 4'd6, M4_VL = 4'd7,
                         M4_HU = 4'd8;
  // Luma 16x16 prediction modes
  localparam logic [3:0] M16_V = 4'd0, M16_H = 4'd1, M16_DC = 4'd2, M16_PLANE = 4'd3;
  // Chroma prediction modes
  localparam logic [3:0] MC_DC = 4'd0, MC_H = 4'd1, MC_V = 4'd2, MC_PLANE = 4'd3;

  // Neighbouring samples of the block being predicted.
  // Luma 4x4: top[0..7] = A..H (E..H already replaced by D when the top-right
  // samples are not available), left[0..3] = 0..3, corner = S.
  // Luma 16x16: top[0..15], left[0..15]. Chroma: top[0..7], left[0..7].
  typedef struct packed {
    pix_t            corner;
    pix_t [15:0]     top;
    pix_t [15:0]     left;
  } nbr_t;

  // Position of an output group inside the block being predicted
  typedef struct packed {
    logic [3:0] x;   // column of the group's first pixel
    logic [3:0] y;   // row of the group's first pixel
  } gpos_t;

  function automatic pix_t clip1(input logic signed [OP_W+1:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
