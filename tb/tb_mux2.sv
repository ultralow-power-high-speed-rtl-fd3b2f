// tb_mux2: exhaustive self-checking test of the 2:1 MUX cell over all eight
// combinations of sel, d0 and d1.
module tb_mux2;
  logic sel, d0, d1, y;
  int checks = 0, failures = 0;

  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_y;
      {sel, d1, d0} = v[2:0];
      #1;
      if (sel == 1'b1) exp_y = d1;
      else             exp_y = d0;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%0b d0=%0b d1=%0b y=%0b", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
