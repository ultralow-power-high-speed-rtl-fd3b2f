// cpa_ripple: the carry propagate adder that ends the multiplication.
//
// Adds the two rows left by the reduction stages into the product. The rows
// have the shape the 8x8 reduction leaves: column C1 has one bit (row b is 0
// there) and C16 has none, so the adder is a ripple chain of one half adder
// at C2 and full adders at C3..C15, whose final carry becomes product bit 15
// (13 full adders for the 8x8 case). The multiplier only says that a carry
// propagate adder follows; the ripple form is this design's choice, the
// simplest that does the job. Bit 0 of b and bit PW-1 of both rows must be 0
// and are not read. Purely combinational.
module cpa_ripple
  import mult8_pkg::*;
(
  input  row_t a,
  input  row_t b,
  output row_t p
);

  logic [PW-1:0] c;   // c[w]: carry out of weight w

  assign p[0] = a[0];
  assign c[0] = 1'b0;

  half_adder u_ha (.a(a[1]), .b(b[1]), .s(p[1]), .c(c[1]));

  for (genvar w = 2; w <= PW-2; w++) begin : g_fa
    full_adder u_fa (.a(a[w]), .b(b[w]), .ci(c[w-1]), .s(p[w]), .co(c[w]));
  end

  assign p[PW-1] = c[PW-2];
  assign c[PW-1] = 1'b0;

endmodule
