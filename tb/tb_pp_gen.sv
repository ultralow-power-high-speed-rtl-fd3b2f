// tb_pp_gen: checks the partial-product generator for 2000 random operand
// pairs plus the all-ones and zero corners: every pp[i][j] must be x[i]&y[j],
// and the weighted sum of all 64 bits must equal x*y.
module tb_pp_gen;
  import mult8_pkg::*;
  logic [N-1:0] x, y;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen dut (.x(x), .y(y), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2002; t++) begin
      int unsigned total;
      bit bits_ok;
      if (t == 0)      begin x = '1; y = '1; end
      else if (t == 1) begin x = '0; y = 8'h5A; end
      else             begin x = N'($urandom); y = N'($urandom); end
      #1;
      total = 0;
      bits_ok = 1;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          if (pp[i][j] !== (x[i] & y[j])) bits_ok = 0;
          if (pp[i][j]) total += 1 << (i + j);
        end
      checks++;
      if (!bits_ok) begin
        failures++;
        $display("FAIL bit mismatch x=%0d y=%0d", x, y);
      end
      checks++;
      if (total != int'(x) * int'(y)) begin
        failures++;
        $display("FAIL weighted sum %0d != %0d", total, int'(x) * int'(y));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
