// tb_map_acs_array: checks the forward and the backward 8-state ACS arrays of
// the Max-Log-MAP decoder against recursions written here from the code
// definition (feedback 1+D^2+D^3, parity 1+D+D^3), in 9-bit modulo
// arithmetic with the larger candidate kept. Random branch metrics 0..32,
// random enables.
module tb_map_acs_array;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       en, init;
  logic [5:0] gamma [4];
  logic [8:0] fsm [8], bsm [8];

  map_acs_array #(.BACKWARD(1'b0)) dut_f (.clk(clk), .en(en), .init(init), .gamma(gamma), .sm(fsm));
  map_acs_array #(.BACKWARD(1'b1)) dut_b (.clk(clk), .en(en), .init(init), .gamma(gamma), .sm(bsm));

  // encoder: state bits r1 (bit0) r2 (bit1) r3 (bit2)
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
  function automatic int mmax(int a, int b);   // modulo-512 larger
    return (((a - b + 512) % 512) >= 256) ? b : a;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fa [8], ba [8], nf [8], nb [8];
    bit ok;
    en = 1'b0; init = 1'b1;
    for (int w = 0; w < 4; w++) gamma[w] = '0;
    @(posedge clk); #1;
    init = 1'b0;
    for (int s = 0; s < 8; s++) begin
      fa[s] = (s == 0) ? 0 : 512 - 64;
      ba[s] = 0;
    end
    for (int t = 0; t < 400; t++) begin
      en = ($urandom_range(0, 3) != 0);
      for (int w = 0; w < 4; w++) gamma[w] = 6'($urandom_range(0, 32));
      if (en) begin
        for (int s = 0; s < 8; s++) begin nf[s] = -1; nb[s] = -1; end
        for (int s = 0; s < 8; s++)
          for (int u = 0; u < 2; u++) begin
            int ns, g, cand;
            ns = nxt(s, u);
            g  = int'(gamma[u*2 + par(s, u)]);
            cand = (fa[s] + g) % 512;
            nf[ns] = (nf[ns] < 0) ? cand : mmax(nf[ns], cand);
            cand = (ba[ns] + g) % 512;
            nb[s] = (nb[s] < 0) ? cand : mmax(nb[s], cand);
          end
        fa = nf;
        ba = nb;
      end
      @(posedge clk); #1;
      ok = 1'b1;
      for (int s = 0; s < 8; s++) begin
        if (int'(fsm[s]) != fa[s]) ok = 1'b0;
        if (int'(bsm[s]) != ba[s]) ok = 1'b0;
      end
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("FAIL step %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
