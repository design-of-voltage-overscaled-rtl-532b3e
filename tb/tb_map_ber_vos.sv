// tb_map_ber_vos: bit-error-rate workload of the Max-Log-MAP decoder under
// AWGN with voltage-overscaling-induced read errors in the partitioned state
// metric memory.
//
// Blocks of 64 random bits are encoded with the 8-state recursive
// systematic code; systematic and parity bits are sent as BPSK (+1 for '1')
// over AWGN, with the noise of the rate-1/3 Turbo code at the chosen Eb/N0
// (sigma = sqrt(1 / (2 * Eb/N0 / 3))), and quantized to 3-bit soft values
// round(2y) clipped to -4..3. No a-priori information is given, so this is
// one constituent decoding, not a full Turbo iteration.
//
// Memory errors: whenever a stored forward metric vector is read, each bit
// of the LSB bank (bits 2..0 of every metric) flips with probability Pe^L,
// each bit of the middle bank (5..3) with Pe^M and each MSB-bank bit (8..6)
// with Pe^H. Flips are applied to the stored word just before the LLR is
// sampled and undone right after (transient read errors).
//
// Printed: BER per setting, next to the error rate of hard decisions on the
// systematic channel values. Checked: error-free decoding at 2 dB removes at
// least a fifth of the channel's errors, every setting stays below 2.5e-1, and that errors were injected where asked.
module tb_map_ber_vos;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 64;
  localparam int NBLK = 250;
  localparam int NCFG = 6;
  real cfg_ebn0 [NCFG] = '{2.0, 2.0, 2.0, 2.0, 2.0, 1.0};
  real cfg_pl   [NCFG] = '{0.0, 0.005, 0.01, 0.05, 0.0, 0.0};
  real cfg_pm   [NCFG] = '{0.0, 0.0, 0.0, 0.0, 0.001, 0.0};

  logic              rst, in_valid, in_ready, llr_valid;
  logic signed [2:0] ys, yp;
  logic signed [3:0] la;
  logic [5:0]        llr_idx;
  logic signed [8:0] llr;
  vos_level_e        lvl [3];

  map_decoder #(.N(N)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
    .ys(ys), .yp(yp), .la(la), .llr_valid(llr_valid), .llr_idx(llr_idx), .llr(llr),
    .mem_lvl(lvl));

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
  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction
  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction
  function automatic logic [2:0] quant(real y);
    int q;
    q = $rtoi($floor(2.0 * y + 0.5));
    if (q < -4) q = -4;
    if (q > 3) q = 3;
    return 3'(q);
  endfunction
  function automatic logic [23:0] flips(real p);
    logic [23:0] m;
    m = '0;
    if (p > 0.0) for (int i = 0; i < 24; i++) m[i] = (urand01() < p);
    return m;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ub [N], errs, nbits, n_inj, k, a, raw;
    real sigma, ber;
    logic [23:0] ml, mm, mh;
    rst = 1'b1; in_valid = 1'b0; ys = '0; yp = '0; la = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int c = 0; c < NCFG; c++) begin
      sigma = $sqrt(1.0 / (2.0 * (10.0 ** (cfg_ebn0[c] / 10.0)) / 3.0));
      errs = 0; nbits = 0; n_inj = 0; raw = 0;
      for (int b = 0; b < NBLK; b++) begin
        s = 0;
        k = 0;
        while (k < N) begin
          if (k == 0 || in_valid) begin
            ub[k] = $urandom_range(0, 1);
            ys = quant((ub[k] ? 1.0 : -1.0) + sigma * gauss());
            yp = quant((par(s, ub[k]) ? 1.0 : -1.0) + sigma * gauss());
            if ((ys > 0) != (ub[k] == 1)) raw++;
          end
          in_valid = 1'b1;
          @(posedge clk);
          s = nxt(s, ub[k]);
          k++;
          #1;
        end
        in_valid = 1'b0;
        while (!in_ready) begin
          a = int'(dut.u_mem.raddr);
          ml = flips(cfg_pl[c]);
          mm = flips(cfg_pm[c]);
          mh = flips(0.0);
          n_inj += $countones(ml) + $countones(mm) + $countones(mh);
          dut.u_mem.bank_l[a] = dut.u_mem.bank_l[a] ^ ml;
          dut.u_mem.bank_m[a] = dut.u_mem.bank_m[a] ^ mm;
          dut.u_mem.bank_h[a] = dut.u_mem.bank_h[a] ^ mh;
          #1;
          if (llr_valid) begin
            if ((llr > 0) != (ub[llr_idx] == 1)) errs++;
            nbits++;
          end
          dut.u_mem.bank_l[a] = dut.u_mem.bank_l[a] ^ ml;
          dut.u_mem.bank_m[a] = dut.u_mem.bank_m[a] ^ mm;
          dut.u_mem.bank_h[a] = dut.u_mem.bank_h[a] ^ mh;
          @(posedge clk);
          #1;
        end
      end
      ber = real'(errs) / real'(nbits);
      $display("Eb/N0 = %0.1f dB, Pe^L = %0.3f, Pe^M = %0.4f, Pe^H = 0: %0d errors in %0d bits, BER = %e (channel hard decisions %e), %0d bit flips injected",
               cfg_ebn0[c], cfg_pl[c], cfg_pm[c], errs, nbits, ber, real'(raw) / real'(nbits), n_inj);
      checks++;
      if (ber > 2.5e-1) begin failures++; $display("FAIL BER too high"); end
      if (c == 0) begin
        checks++;
        if (ber > 0.8 * real'(raw) / real'(nbits)) begin
          failures++;
          $display("FAIL error-free decoding at 2 dB no better than the channel");
        end
      end
      checks++;
      if ((cfg_pl[c] > 0.0 || cfg_pm[c] > 0.0) != (n_inj > 0)) begin
        failures++;
        $display("FAIL injection count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
