// tb_reduce_stage1: exhaustive test of the first reduction stage.
// For all 65536 operand pairs the partial products are formed here and
// applied; the four output rows must add up to x*y and no column may hold a
// bit above its allowed height (mult8_pkg::STAGE2_HEIGHT, at most 4).
module tb_reduce_stage1;
  import mult8_pkg::*;
  logic [N-1:0] pp [N];
  row_t         r  [4];
  int checks = 0, failures = 0;

  reduce_stage1 dut (.pp(pp), .r(r));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 256; xv++) begin
      for (int yv = 0; yv < 256; yv++) begin
        int unsigned total;
        bit shape_ok;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++)
            pp[i][j] = xv[i] & yv[j];
        #1;
        total = 0;
        shape_ok = 1;
        for (int n = 0; n < 4; n++)
          for (int w = 0; w < PW; w++) begin
            total += int'(r[n][w]) << w;
            if (n >= STAGE2_HEIGHT[w] && r[n][w]) shape_ok = 0;
          end
        checks++;
        if (total != xv * yv) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d rows sum %0d", xv, yv, total);
        end
        checks++;
        if (!shape_ok) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d y=%0d column too tall", xv, yv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
