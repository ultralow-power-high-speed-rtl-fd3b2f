// reduce_stage1: first partial-product reduction stage, column height 8 -> 4.
//
// Input are the 64 partial products; output are four rows whose column sum
// equals the sum of the partial products, with no column taller than 4. The
// target height 4 is the largest power of two below the starting height 8.
// Columns are numbered C1 (weight 1) to C16 (weight 2^15). Counters used,
// column by column:
//   C1-C4  unchanged (heights 1..4)
//   C5     one half adder                            (5 bits)
//   C6     one 4-2 compressor, cin = 0               (6 bits + 1 carry)
//   C7     one 4-2 compressor and one half adder     (7 bits + 1 carry)
//   C8     two 4-2 compressors, the second with cin=0 (8 bits + 2 carries)
//   C9     two 4-2 compressors, one x4 tied to 0     (7 bits + 2 carries)
//   C10    one 4-2 compressor and one full adder     (6 bits + 2 carries + cout)
//   C11    one 4-2 compressor                        (5 bits + 2 carries)
//   C12    one full adder                            (4 bits + carry + cout)
//   C13-C15 unchanged (heights 4, 2, 1)
// giving 8 compressors, 2 half adders and 2 full adders. The cout of a
// compressor drives the cin of a compressor in the next column where there is
// one; otherwise (C10's second cout, C11's cout) it joins the next column as a
// plain bit. The counter count per column follows the multiplier's reduction
// plan; which partial product enters which counter input, and the cin = 0
// choices, are this design's own. Output heights per column are listed in
// mult8_pkg::STAGE2_HEIGHT; unused row positions are 0. Purely combinational.
module reduce_stage1
  import mult8_pkg::*;
(
  input  logic [N-1:0] pp [N],   // pp[i][j], weight 2^(i+j)
  output row_t         r  [4]
);

  // col[c][k]: k-th partial product of column Cc (c = 1..15).
  logic [N-1:0] col [1:PW-1];

  always_comb begin
    for (int c = 1; c < PW; c++) begin
      col[c] = '0;
      for (int i = 0; i < N; i++) begin
        if (c - 1 - i >= 0 && c - 1 - i < N) begin
          // k counts from the lowest i present in the column
          col[c][i - ((c > N) ? (c - N) : 0)] = pp[i][c-1-i];
        end
      end
    end
  end

  // C5: half adder
  logic s5h, h5;
  half_adder u_ha5 (.a(col[5][0]), .b(col[5][1]), .s(s5h), .c(h5));

  // C6: 4-2 compressor, cin = 0
  logic s6, k6, o6;
  compressor_4_2 u_c6 (.x1(col[6][0]), .x2(col[6][1]), .x3(col[6][2]), .x4(col[6][3]),
                       .cin(1'b0), .sum(s6), .carry(k6), .cout(o6));

  // C7: 4-2 compressor (cin from C6) and half adder
  logic s7, k7, o7, s7h, h7;
  compressor_4_2 u_c7 (.x1(col[7][0]), .x2(col[7][1]), .x3(col[7][2]), .x4(col[7][3]),
                       .cin(o6), .sum(s7), .carry(k7), .cout(o7));
  half_adder u_ha7 (.a(col[7][4]), .b(col[7][5]), .s(s7h), .c(h7));

  // C8: two 4-2 compressors
  logic s8a, k8a, o8a, s8b, k8b, o8b;
  compressor_4_2 u_c8a (.x1(col[8][0]), .x2(col[8][1]), .x3(col[8][2]), .x4(col[8][3]),
                        .cin(o7), .sum(s8a), .carry(k8a), .cout(o8a));
  compressor_4_2 u_c8b (.x1(col[8][4]), .x2(col[8][5]), .x3(col[8][6]), .x4(col[8][7]),
                        .cin(1'b0), .sum(s8b), .carry(k8b), .cout(o8b));

  // C9: two 4-2 compressors, one input of the second tied to 0
  logic s9a, k9a, o9a, s9b, k9b, o9b;
  compressor_4_2 u_c9a (.x1(col[9][0]), .x2(col[9][1]), .x3(col[9][2]), .x4(col[9][3]),
                        .cin(o8a), .sum(s9a), .carry(k9a), .cout(o9a));
  compressor_4_2 u_c9b (.x1(col[9][4]), .x2(col[9][5]), .x3(col[9][6]), .x4(1'b0),
                        .cin(o8b), .sum(s9b), .carry(k9b), .cout(o9b));

  // C10: 4-2 compressor and full adder (second C9 cout enters as a plain bit)
  logic s10, k10, o10, s10f, f10;
  compressor_4_2 u_c10 (.x1(col[10][0]), .x2(col[10][1]), .x3(col[10][2]), .x4(col[10][3]),
                        .cin(o9a), .sum(s10), .carry(k10), .cout(o10));
  full_adder u_fa10 (.a(col[10][4]), .b(col[10][5]), .ci(o9b), .s(s10f), .co(f10));

  // C11: 4-2 compressor
  logic s11, k11, o11;
  compressor_4_2 u_c11 (.x1(col[11][0]), .x2(col[11][1]), .x3(col[11][2]), .x4(col[11][3]),
                        .cin(o10), .sum(s11), .carry(k11), .cout(o11));

  // C12: full adder
  logic s12f, f12;
  full_adder u_fa12 (.a(col[12][0]), .b(col[12][1]), .ci(col[12][2]), .s(s12f), .co(f12));

  // Output rows: bit w holds a bit of column C(w+1).
  always_comb begin
    for (int n = 0; n < 4; n++) r[n] = '0;
    // C1..C4 pass through
    r[0][0] = col[1][0];
    r[0][1] = col[2][0];  r[1][1] = col[2][1];
    r[0][2] = col[3][0];  r[1][2] = col[3][1];  r[2][2] = col[3][2];
    r[0][3] = col[4][0];  r[1][3] = col[4][1];  r[2][3] = col[4][2];  r[3][3] = col[4][3];
    // C5
    r[0][4]  = s5h;  r[1][4]  = col[5][2];  r[2][4]  = col[5][3];  r[3][4]  = col[5][4];
    // C6
    r[0][5]  = s6;   r[1][5]  = col[6][4];  r[2][5]  = col[6][5];  r[3][5]  = h5;
    // C7
    r[0][6]  = s7;   r[1][6]  = s7h;        r[2][6]  = col[7][6];  r[3][6]  = k6;
    // C8
    r[0][7]  = s8a;  r[1][7]  = s8b;        r[2][7]  = k7;         r[3][7]  = h7;
    // C9
    r[0][8]  = s9a;  r[1][8]  = s9b;        r[2][8]  = k8a;        r[3][8]  = k8b;
    // C10
    r[0][9]  = s10;  r[1][9]  = s10f;       r[2][9]  = k9a;        r[3][9]  = k9b;
    // C11
    r[0][10] = s11;  r[1][10] = col[11][4]; r[2][10] = k10;        r[3][10] = f10;
    // C12
    r[0][11] = s12f; r[1][11] = col[12][3]; r[2][11] = k11;        r[3][11] = o11;
    // C13..C15 pass through, plus the full-adder carry from C12
    r[0][12] = col[13][0]; r[1][12] = col[13][1]; r[2][12] = col[13][2]; r[3][12] = f12;
    r[0][13] = col[14][0]; r[1][13] = col[14][1];
    r[0][14] = col[15][0];
  end

endmodule
