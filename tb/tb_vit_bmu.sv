// tb_vit_bmu: exhaustive test of the Viterbi branch metric unit. For every
// pair of 2-bit soft values and every code word the metric must be the
// number of "agreement" steps, counted here bit by bit.
module tb_vit_bmu;
  logic [1:0] r0, r1;
  logic [2:0] bm [4];
  int checks = 0, failures = 0;

  vit_bmu dut (.r0(r0), .r1(r1), .bm(bm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        r0 = 2'(a); r1 = 2'(b);
        #1;
        for (int w = 0; w < 4; w++) begin
          e = 0;
          // agreement of soft value x with bit c: x if c = 1, 3 - x if c = 0
          e += (w & 1) ? a : 3 - a;
          e += (w & 2) ? b : 3 - b;
          checks++;
          if (int'(bm[w]) != e) begin
            failures++;
            $display("FAIL r0=%0d r1=%0d w=%0d got %0d exp %0d", a, b, w, bm[w], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
