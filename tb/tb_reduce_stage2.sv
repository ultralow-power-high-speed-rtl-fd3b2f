// tb_reduce_stage2: random test of the second reduction stage.
// Four rows are drawn at random within the column heights the first stage
// leaves (mult8_pkg::STAGE2_HEIGHT), including all-ones rows. The two output
// rows must have the same sum, at most two bits per column, bit 0 of the
// second row zero and column C16 empty.
module tb_reduce_stage2;
  import mult8_pkg::*;
  row_t r_in [4];
  row_t r_out [2];
  int checks = 0, failures = 0;

  reduce_stage2 dut (.r_in(r_in), .r_out(r_out));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int unsigned sum_in, sum_out;
      for (int n = 0; n < 4; n++) begin
        r_in[n] = (t == 0) ? '1 : row_t'($urandom);
        for (int w = 0; w < PW; w++)
          if (n >= STAGE2_HEIGHT[w]) r_in[n][w] = 1'b0;
      end
      #1;
      sum_in = 0;
      for (int n = 0; n < 4; n++) sum_in += int'(r_in[n]);
      sum_out = int'(r_out[0]) + int'(r_out[1]);
      checks++;
      if (sum_in != sum_out) begin
        failures++;
        if (failures < 10) $display("FAIL in %0d out %0d", sum_in, sum_out);
      end
      checks++;
      if (r_out[1][0] || r_out[0][PW-1] || r_out[1][PW-1]) begin
        failures++;
        if (failures < 10) $display("FAIL output shape");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
