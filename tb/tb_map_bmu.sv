// tb_map_bmu: exhaustive test of the Max-Log-MAP branch metric unit over all
// systematic, parity and a-priori values; the reference is the doubled
// correlation metric plus 16, worked out with integers here.
module tb_map_bmu;
  logic signed [2:0] ys, yp;
  logic signed [3:0] la;
  logic [5:0] gamma [4];
  int checks = 0, failures = 0;

  map_bmu dut (.ys(ys), .yp(yp), .la(la), .gamma(gamma));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, su;
    for (int a = -4; a < 4; a++)
      for (int b = -4; b < 4; b++)
        for (int c = -8; c < 8; c++) begin
          ys = 3'(a); yp = 3'(b); la = 4'(c);
          #1;
          su = a + c;
          for (int u = 0; u < 2; u++)
            for (int p = 0; p < 2; p++) begin
              e = (u ? su : -su) + (p ? b : -b) + 16;
              checks++;
              if (int'(gamma[u*2+p]) != e) begin
                failures++;
                if (failures < 10) $display("FAIL ys=%0d yp=%0d la=%0d u=%0d p=%0d got %0d exp %0d",
                                            a, b, c, u, p, gamma[u*2+p], e);
              end
            end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
