// compressor_4_2: a 4-2 compressor made only of XOR-XNOR and 2:1 MUX cells.
//
// Five inputs of equal weight (x1..x4 and cin) are compressed into sum, of the
// same weight, and carry and cout, of twice that weight, so that
//   x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout).
// The logic is
//   sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
//   carry = (x1^x2^x3^x4) ? cin : x4
//   cout  = (x1^x2)       ? x3  : x1
// cout does not depend on cin, so in a row of compressors the cout of one can
// feed the cin of the next without a ripple.
//
// Structure (six cells): one XOR-XNOR cell on x1,x2 and one on x3,x4; a MUX
// selected by x1^x2 gives cout; a differential MUX pair selected by x1^x2
// turns the XOR/XNOR of x3,x4 into the XOR/XNOR of all four inputs; a MUX
// selected by cin picks the sum from that pair, and a MUX selected by the
// four-input XOR picks carry from cin and x4. The differential MUX is written
// as two mux2 cells with crossed data inputs; that split is this design's
// choice. Purely combinational: the critical path is two cell levels of
// XOR/MUX to the four-input XOR, then one MUX.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  logic x12, xn12;       // x1 ^ x2 and its complement
  logic x34, xn34;       // x3 ^ x4 and its complement
  logic x1234, xn1234;   // x1 ^ x2 ^ x3 ^ x4 and its complement

  xor_xnor u_xx12 (.a(x1), .b(x2), .x(x12), .xn(xn12));
  xor_xnor u_xx34 (.a(x3), .b(x4), .x(x34), .xn(xn34));

  // Carry-out generator: independent of cin.
  mux2 u_mux_cout (.sel(x12), .d0(x1), .d1(x3), .y(cout));

  // Differential MUX: XOR/XNOR of x3,x4 steered by x1^x2.
  mux2 u_mux_x  (.sel(x12), .d0(x34),  .d1(xn34), .y(x1234));
  mux2 u_mux_xn (.sel(x12), .d0(xn34), .d1(x34),  .y(xn1234));

  // Sum: cin is the select, the four-input XOR/XNOR are the data.
  mux2 u_mux_sum (.sel(cin), .d0(x1234), .d1(xn1234), .y(sum));

  // Carry generator.
  mux2 u_mux_carry (.sel(x1234), .d0(x4), .d1(cin), .y(carry));

  // xn12 is the unused half of the first XOR-XNOR cell.
  logic unused_xn12;
  assign unused_xn12 = xn12;

endmodule
