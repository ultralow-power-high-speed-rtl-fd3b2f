// reduce_stage2: second (last) partial-product reduction stage, height 4 -> 2.
//
// Takes the four rows left by reduce_stage1 (column heights in
// mult8_pkg::STAGE2_HEIGHT) and returns two rows with the same column sum and
// at most two bits per column, ready for the carry propagate adder:
//   C1, C2   unchanged
//   C3       one half adder                          (3 bits)
//   C4       one 4-2 compressor, cin = 0             (4 bits + 1 carry)
//   C5-C13   one 4-2 compressor each, cin = cout of the previous column
//            (4 bits + the carry of the previous column)
//   C14      one full adder                          (2 bits + carry + cout)
//   C15      unchanged, plus the full-adder carry
// giving 10 compressors, 1 half adder and 1 full adder. The counters per
// column follow the multiplier's reduction plan; the input assignment and the
// cin = 0 at C4 are this design's choice. Row positions that are empty by the
// height table are not read. Purely combinational.
module reduce_stage2
  import mult8_pkg::*;
(
  input  row_t r_in  [4],
  output row_t r_out [2]
);

  // C3: half adder
  logic s3, h3;
  half_adder u_ha3 (.a(r_in[0][2]), .b(r_in[1][2]), .s(s3), .c(h3));

  // C4..C13: one compressor per column. Index w = column - 1.
  logic [PW-1:0] s, k, o;   // sum, carry, cout of the compressor at weight w

  compressor_4_2 u_c4 (.x1(r_in[0][3]), .x2(r_in[1][3]), .x3(r_in[2][3]), .x4(r_in[3][3]),
                       .cin(1'b0), .sum(s[3]), .carry(k[3]), .cout(o[3]));

  for (genvar w = 4; w <= 12; w++) begin : g_col
    compressor_4_2 u_c (.x1(r_in[0][w]), .x2(r_in[1][w]), .x3(r_in[2][w]), .x4(r_in[3][w]),
                        .cin(o[w-1]), .sum(s[w]), .carry(k[w]), .cout(o[w]));
  end

  // C14: full adder on the two bits and the carry of C13; C13's cout stays.
  logic s14, f14;
  full_adder u_fa14 (.a(r_in[0][13]), .b(r_in[1][13]), .ci(k[12]), .s(s14), .co(f14));

  always_comb begin
    r_out[0] = '0;
    r_out[1] = '0;
    r_out[0][0] = r_in[0][0];
    r_out[0][1] = r_in[0][1];  r_out[1][1] = r_in[1][1];
    r_out[0][2] = s3;          r_out[1][2] = r_in[2][2];
    r_out[0][3] = s[3];        r_out[1][3] = h3;
    for (int w = 4; w <= 12; w++) begin
      r_out[0][w] = s[w];
      r_out[1][w] = k[w-1];
    end
    r_out[0][13] = s14;        r_out[1][13] = o[12];
    r_out[0][14] = r_in[0][14]; r_out[1][14] = f14;
  end

  // Outputs of the unused positions: s/k/o below C4 and above C13 are not
  // driven by a compressor.
  assign s[2:0] = '0;   assign k[2:0] = '0;   assign o[2:0] = '0;
  assign s[PW-1:13] = '0; assign k[PW-1:13] = '0; assign o[PW-1:13] = '0;

endmodule
