// tb_mult8x8: end-to-end test of the 8x8 compressor-tree multiplier with its
// default parameters. All 65536 operand pairs are applied. Checked per pair:
// the product against x*y, and the intermediate rows after each reduction
// stage against x*y (the reduction must never lose or add weight).
// It also counts how often the design's mechanisms fire and fails if one
// never does: a stage-1 compressor with all five inputs high, a cout->cin
// link carrying a 1 in stage 2, a half-adder and a full-adder carry in
// stage 1, and a carry out of the propagate adder into product bit 15.
module tb_mult8x8;
  logic [7:0]  x, y;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_full5 = 0, n_chain = 0, n_ha = 0, n_fa = 0, n_cpa = 0;

  mult8x8 dut (.x(x), .y(y), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned rows_sum4();
    int unsigned s = 0;
    for (int n = 0; n < 4; n++) s += int'(dut.rows4[n]);
    return s;
  endfunction

  initial begin
    for (int xv = 0; xv < 256; xv++) begin
      for (int yv = 0; yv < 256; yv++) begin
        int unsigned expect_p;
        x = xv[7:0];
        y = yv[7:0];
        expect_p = xv * yv;
        #1;
        checks++;
        if (int'(p) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d, got %0d", xv, yv, expect_p, p);
        end
        checks++;
        if (rows_sum4() != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL stage-1 rows of %0d*%0d sum to %0d", xv, yv, rows_sum4());
        end
        checks++;
        if (int'(dut.rows2[0]) + int'(dut.rows2[1]) != expect_p) begin
          failures++;
          if (failures < 10) $display("FAIL stage-2 rows of %0d*%0d", xv, yv);
        end
        if (dut.u_red1.u_c8a.x1 && dut.u_red1.u_c8a.x2 && dut.u_red1.u_c8a.x3 &&
            dut.u_red1.u_c8a.x4 && dut.u_red1.u_c8a.cin) n_full5++;
        if (dut.u_red2.o[12]) n_chain++;
        if (dut.u_red1.h5)    n_ha++;
        if (dut.u_red1.f12)   n_fa++;
        if (p[15])            n_cpa++;
      end
    end
    $display("events: full5=%0d chain=%0d ha_carry=%0d fa_carry=%0d cpa_carry=%0d",
             n_full5, n_chain, n_ha, n_fa, n_cpa);
    checks++; if (n_full5 == 0) begin failures++; $display("FAIL no 5-input compression"); end
    checks++; if (n_chain == 0) begin failures++; $display("FAIL cout->cin never 1"); end
    checks++; if (n_ha == 0)    begin failures++; $display("FAIL no half-adder carry"); end
    checks++; if (n_fa == 0)    begin failures++; $display("FAIL no full-adder carry"); end
    checks++; if (n_cpa == 0)   begin failures++; $display("FAIL no carry into p[15]"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
