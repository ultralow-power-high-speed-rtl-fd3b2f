// xor_xnor: the XOR-XNOR module, giving a XOR b and a XNOR b at the same time.
//
// In silicon this is a pass-transistor cell whose weak internal levels are
// restored by a cross-coupled pair of feedback transistors, so both polarities
// swing fully even at sub-threshold supplies. At the logic level that
// restoration is invisible: the two outputs are exact complements of each
// other. Purely combinational, no clock.
//
// Ports: a, b inputs; x = a ^ b; xn = ~(a ^ b).
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);

  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end

endmodule
