// mult8x8: 8x8 unsigned multiplier whose partial products are reduced with
// 4-2 compressors.
//
// Three stages, all combinational:
//   1. pp_gen        - 64 AND gates form the partial products (height 8).
//   2. reduce_stage1 - height 8 -> 4 (8 compressors, 2 half, 2 full adders).
//      reduce_stage2 - height 4 -> 2 (10 compressors, 1 half, 1 full adder).
//   3. cpa_ripple    - two rows -> 16-bit product (1 half, 13 full adders).
// In total 18 4-2 compressors, 16 full adders and 4 half adders. The stage
// heights and the counter count per column follow the reduction plan this
// multiplier is built around; the ripple adder and the wiring inside each
// column are this design's choice.
//
// Ports: x, y 8-bit unsigned operands; p = x * y, 16 bits. There is no clock:
// the product is valid one combinational delay after the operands.
module mult8x8 (
  input  logic [7:0]  x,
  input  logic [7:0]  y,
  output logic [15:0] p
);

  import mult8_pkg::*;

  logic [N-1:0] pp [N];
  row_t         rows4 [4];
  row_t         rows2 [2];

  pp_gen        u_pp   (.x(x), .y(y), .pp(pp));
  reduce_stage1 u_red1 (.pp(pp), .r(rows4));
  reduce_stage2 u_red2 (.r_in(rows4), .r_out(rows2));
  cpa_ripple    u_cpa  (.a(rows2[0]), .b(rows2[1]), .p(p));

endmodule
