// tb_xor_xnor: exhaustive self-checking test of the XOR-XNOR cell.
// All four input pairs are applied; x must be the odd parity of the inputs
// (worked out by counting ones) and xn its complement.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int ones;
      {a, b} = v[1:0];
      #1;
      ones = int'(a) + int'(b);
      checks++;
      if (x !== (ones == 1)) begin
        failures++;
        $display("FAIL a=%0b b=%0b x=%0b", a, b, x);
      end
      checks++;
      if (xn !== (ones != 1)) begin
        failures++;
        $display("FAIL a=%0b b=%0b xn=%0b", a, b, xn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
