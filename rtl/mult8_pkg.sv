// mult8_pkg: sizes and types shared by the 8x8 compressor-tree multiplier.
//
// The multiplier works on two 8-bit unsigned operands and gives a 16-bit
// product. Between the reduction stages the partial products are passed as a
// set of rows, each 16 bits wide, where bit w of a row is one bit of weight
// 2^w (column C(w+1) in the column numbering used throughout these files).
// A column that holds fewer bits than there are rows has zeros in the unused
// rows. The operand width of 8 is the design's; the row type is this design's
// own way of carrying the column heights between modules.
package mult8_pkg;

  localparam int unsigned N  = 8;       // operand width
  localparam int unsigned PW = 2 * N;   // product width

  typedef logic [PW-1:0] row_t;

  // Height of each column after the first reduction stage (C1..C16).
  // Stage 1 leaves at most 4 bits per column, stage 2 at most 2.
  localparam int unsigned STAGE2_HEIGHT [PW] =
      '{1, 2, 3, 4, 4, 4, 4, 4, 4, 4, 4, 4, 4, 2, 1, 0};

endpackage
