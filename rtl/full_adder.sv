// full_adder: the 3-2 compressor, a + b + ci = s + 2*co.
//
// Built from the same cells as the 4-2 compressor: two XOR-XNOR cells give
// s = a ^ b ^ ci, and a MUX selected by a ^ b gives co = (a^b) ? ci : a.
// The multiplier only names its full adders, so this construction is this
// design's choice. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  logic xab, xnab, xn_s;

  xor_xnor u_xx_ab (.a(a),   .b(b),  .x(xab), .xn(xnab));
  xor_xnor u_xx_s  (.a(xab), .b(ci), .x(s),   .xn(xn_s));
  mux2     u_mux_co (.sel(xab), .d0(a), .d1(ci), .y(co));

  logic unused;
  assign unused = xnab ^ xn_s;

endmodule
