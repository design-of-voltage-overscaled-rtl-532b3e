// tb_vit_acs_array: checks the 128-state ACS array step by step against a
// behavioural Viterbi metric update written here from the code definition
// (generators 247/371 octal, state = last seven inputs, newest in bit 0).
// Random branch metrics (0..6) are applied with random stalls; after each
// enabled step all 128 metrics and decisions are compared.
module tb_vit_acs_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         en, init;
  logic [2:0]   bm [4];
  logic [127:0] dec;
  logic [7:0]   sm [128];

  vit_acs_array dut (.clk(clk), .en(en), .init(init), .bm(bm), .dec(dec), .sm(sm));

  int ref_sm [128];
  int ref_dec [128];

  // code word {c1,c0} for input u leaving state s
  function automatic int code_word(int s, int u);
    int r, c0, c1;
    r = u << 7;
    for (int i = 0; i < 7; i++) if ((s >> i) & 1) r |= 1 << (6 - i);
    c0 = $countones(r & 'o247) & 1;
    c1 = $countones(r & 'o371) & 1;
    return c1 * 2 + c0;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nsm [128];
    int p0, p1, a, b, d;
    bit ok;
    en = 1'b0; init = 1'b1;
    for (int w = 0; w < 4; w++) bm[w] = '0;
    @(posedge clk); #1;
    init = 1'b0;
    for (int s = 0; s < 128; s++) begin
      ref_sm[s] = (s == 0) ? 0 : 256 - 32;
      checks++;
      if (int'(sm[s]) != ref_sm[s]) begin failures++; $display("FAIL init s=%0d", s); end
    end
    for (int t = 0; t < 300; t++) begin
      en = ($urandom_range(0, 4) != 0);
      for (int w = 0; w < 4; w++) bm[w] = 3'($urandom_range(0, 6));
      if (en) begin
        for (int ns = 0; ns < 128; ns++) begin
          p0 = ns >> 1;
          p1 = (ns >> 1) | 64;
          a = (ref_sm[p0] + int'(bm[code_word(p0, ns & 1)])) % 256;
          b = (ref_sm[p1] + int'(bm[code_word(p1, ns & 1)])) % 256;
          d = (a - b + 256) % 256;
          ref_dec[ns] = (d >= 128) ? 1 : 0;
          nsm[ns] = ref_dec[ns] ? b : a;
        end
        ref_sm = nsm;
      end
      @(posedge clk); #1;
      ok = 1'b1;
      for (int s = 0; s < 128; s++) begin
        if (int'(sm[s]) != ref_sm[s]) ok = 1'b0;
        if (t > 0 && int'(dec[s]) != ref_dec[s]) ok = 1'b0;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL step %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
