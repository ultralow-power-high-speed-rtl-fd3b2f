// pp_gen: partial-product generation of the 8x8 multiplier.
//
// Forms the 64 partial-product bits pp[i][j] = x[i] & y[j], each of weight
// 2^(i+j), i.e. in column C(i+j+1). Column Ck holds min(k, 16-k) bits, so the
// tallest column, C8, has 8. Purely combinational; unsigned operands.
module pp_gen
  import mult8_pkg::*;
(
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] pp [N]   // pp[i][j] = x[i] & y[j]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = y & {N{x[i]}};
    end
  end

endmodule
