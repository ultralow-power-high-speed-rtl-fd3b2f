// mux2: the 2:1 multiplexer cell of the compressor.
//
// Passes d1 when sel is 1 and d0 when sel is 0. The compressor uses it as its
// carry generator and to form the sum, where the select is meant to settle
// before the data so that the output follows the data with one cell delay.
// The transistor-level cell is a six-transistor pass design; here only its
// logic function is kept. Purely combinational, no clock.
//
// Ports: sel select, d0/d1 data, y output.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y
);

  always_comb y = sel ? d1 : d0;

endmodule
