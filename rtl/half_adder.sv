// half_adder: adds two bits of equal weight, a + b = s + 2*c.
//
// The sum comes from an XOR-XNOR cell, the same cell the compressor uses; the
// carry is a plain AND. The multiplier only names its half adders, so this
// construction is this design's choice. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  logic xn;

  xor_xnor u_xx (.a(a), .b(b), .x(s), .xn(xn));

  always_comb c = a & b;

  logic unused_xn;
  assign unused_xn = xn;

endmodule
