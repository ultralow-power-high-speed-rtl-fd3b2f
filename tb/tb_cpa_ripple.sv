// tb_cpa_ripple: feeds the carry propagate adder random rows shaped like the
// reduction output (bit 0 of b and bit 15 of both rows zero), plus the case
// that ripples a carry through the whole chain, and compares with a + b.
module tb_cpa_ripple;
  import mult8_pkg::*;
  row_t a, b, p;
  int checks = 0, failures = 0;
  int long_ripples = 0;

  cpa_ripple dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5001; t++) begin
      if (t == 0) begin
        a = 16'h7FFF;  b = 16'h0002;   // carry ripples from C2 to the top
      end else begin
        a = row_t'($urandom) & 16'h7FFF;
        b = row_t'($urandom) & 16'h7FFE;
      end
      #1;
      checks++;
      if (int'(p) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%h b=%h p=%h", a, b, p);
      end
      if (p[15]) long_ripples++;
    end
    checks++;
    if (long_ripples == 0) begin
      failures++;
      $display("FAIL carry into bit 15 never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
