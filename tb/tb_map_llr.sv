// tb_map_llr: checks the soft-output unit with random forward/backward metrics
// whose spread is within 96 around a random base (as the recursions keep
// them) and random branch metrics 0..32. The reference computes the two
// maxima over the sixteen branches with plain integers (no wrap-around) and
// takes their difference.
module tb_map_llr;
  logic [8:0] alpha [8], beta [8];
  logic [5:0] gamma [4];
  logic signed [8:0] llr;
  int checks = 0, failures = 0;

  map_llr dut (.alpha(alpha), .beta(beta), .gamma(gamma), .llr(llr));

  function automatic int nxt(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return ((s << 1) & 6) | a;
  endfunction
  function automatic int par(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return a ^ (s & 1) ^ ((s >> 2) & 1);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ia [8], ib [8], m [2], tot, ba, bb, e;
    for (int t = 0; t < 2000; t++) begin
      ba = $urandom_range(0, 511);
      bb = $urandom_range(0, 511);
      for (int s = 0; s < 8; s++) begin
        ia[s] = $urandom_range(0, 96);
        ib[s] = $urandom_range(0, 96);
        alpha[s] = 9'((ba + ia[s]) % 512);
        beta[s]  = 9'((bb + ib[s]) % 512);
      end
      for (int w = 0; w < 4; w++) gamma[w] = 6'($urandom_range(0, 32));
      #1;
      m[0] = -1; m[1] = -1;
      for (int u = 0; u < 2; u++)
        for (int s = 0; s < 8; s++) begin
          tot = ia[s] + ib[nxt(s, u)] + int'(gamma[u*2 + par(s, u)]);
          if (tot > m[u]) m[u] = tot;
        end
      e = m[1] - m[0];
      checks++;
      if (int'(llr) != e) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, llr, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
