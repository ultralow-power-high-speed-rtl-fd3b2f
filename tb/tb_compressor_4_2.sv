// tb_compressor_4_2: exhaustive test of the 4-2 compressor over all 32 input
// combinations. For each it checks
//   - the count rule x1+x2+x3+x4+cin = sum + 2*(carry+cout),
//   - each output against its equation, evaluated here from counted ones,
//   - that cout is the same for cin = 0 and cin = 1 (independent of cin).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%0b%0b%0b%0b cin=%0b -> sum=%0b carry=%0b cout=%0b",
               what, x1, x2, x3, x4, cin, sum, carry, cout);
    end
  endtask

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_cin0;
      for (int ci = 0; ci < 2; ci++) begin
        int ones4, odd12, odd4;
        {x1, x2, x3, x4} = v[3:0];
        cin = ci[0];
        #1;
        ones4 = int'(x1) + int'(x2) + int'(x3) + int'(x4);
        odd12 = (int'(x1) + int'(x2)) % 2;
        odd4  = ones4 % 2;
        check(ones4 + ci == int'(sum) + 2 * (int'(carry) + int'(cout)), "count");
        check(int'(sum) == (ones4 + ci) % 2, "sum");
        check(carry == ((odd4 == 1) ? cin : x4), "carry");
        check(cout == ((odd12 == 1) ? x3 : x1), "cout");
        if (ci == 0) cout_cin0 = cout;
        else check(cout == cout_cin0, "cout independent of cin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
