// tb_vit_ber_vos: bit-error-rate workload of the Viterbi decoder under AWGN
// with voltage-overscaling-induced read errors in the survivor memory.
//
// Random bits are encoded (constraint length 8, generators 247/371 octal),
// sent as BPSK (+1 for '1') over an AWGN channel at the chosen Eb/N0
// (rate 1/2, so noise sigma = sqrt(1 / (2 * 0.5 * Eb/N0))), and quantized to
// 2-bit soft values with thresholds -0.5, 0, +0.5. Gaussian samples come from
// the Box-Muller transform of $urandom values.
//
// Memory errors follow the dynamic VOS rule: the pointer in the first half
// of a trace-back reads a bank at Kv^L and sees each bit it reads flipped
// with probability Pe^L; the pointer in the second half reads a bank at Kv^H
// with error probability Pe^H; write and decode are error-free. An error is
// made by flipping the stored bit just before the read clock edge and
// restoring it right after, so it behaves as a transient read error.
//
// For each (Eb/N0, Pe^L, Pe^H) setting the testbench prints the measured
// BER. It checks that the error-free setting at 4 dB decodes with BER below
// 1e-3, that every setting stays below 2e-2, and that errors were really
// injected in the settings that ask for them.
module tb_vit_ber_vos;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       rst, in_valid, out_valid, out_bit;
  logic [1:0] r0, r1;
  vos_level_e lvl [6];

  vit_decoder dut (.clk(clk), .rst(rst), .in_valid(in_valid), .r0(r0), .r1(r1),
                   .out_valid(out_valid), .out_bit(out_bit), .mem_lvl(lvl));

  localparam int NBITS = 30000;
  localparam int NCFG  = 6;
  real cfg_ebn0 [NCFG] = '{4.0, 4.0, 4.0, 4.0, 4.0, 3.0};
  real cfg_pl   [NCFG] = '{0.0, 0.005, 0.01, 0.05, 0.0, 0.0};
  real cfg_ph   [NCFG] = '{0.0, 0.0, 0.0, 0.0, 0.001, 0.0};

  bit u [NBITS + 200];

  function automatic int code_word(int s, int uu);
    int r;
    r = uu << 7;
    for (int i = 0; i < 7; i++) if ((s >> i) & 1) r |= 1 << (6 - i);
    return ($countones(r & 'o371) & 1) * 2 + ($countones(r & 'o247) & 1);
  endfunction

  function automatic real urand01();
    return (real'($urandom) + 1.0) / 4294967297.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(6.283185307179586 * urand01());
  endfunction

  function automatic logic [1:0] quant(real y);
    if (y < -0.5) return 2'd0;
    if (y < 0.0)  return 2'd1;
    if (y < 0.5)  return 2'd2;
    return 2'd3;
  endfunction

  function automatic bit chance(real p);
    return urand01() < p;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, w, n_in, n_out, errs, n_inj, total;
    real sigma, ber;
    bit fa, fb;
    logic [2:0] ba_s, bb_s;
    logic [4:0] rc_s;
    logic [6:0] sa_s, sb_s;
    total = NBITS + 200;
    rst = 1'b1; in_valid = 1'b0; r0 = '0; r1 = '0;
    for (int c = 0; c < NCFG; c++) begin
      sigma = $sqrt(1.0 / (2.0 * 0.5 * (10.0 ** (cfg_ebn0[c] / 10.0))));
      for (int i = 0; i < total; i++) u[i] = 1'($urandom);
      rst = 1'b1;
      repeat (2) @(posedge clk);
      #1 rst = 1'b0;
      s = 0; n_in = 0; n_out = 0; errs = 0; n_inj = 0;
      while (n_in < total) begin
        in_valid = 1'b1;
        w  = code_word(s, int'(u[n_in]));
        r0 = quant(((w & 1) ? 1.0 : -1.0) + sigma * gauss());
        r1 = quant(((w & 2) ? 1.0 : -1.0) + sigma * gauss());
        #1;
        if (out_valid) begin
          if (out_bit != u[n_in - 169]) errs++;
          n_out++;
        end
        // transient read errors in the two trace-back pointers
        ba_s = dut.u_mem.ba; bb_s = dut.u_mem.bb; rc_s = dut.u_mem.rc;
        sa_s = dut.u_mem.st_a; sb_s = dut.u_mem.st_b;
        fa = chance(cfg_pl[c]);
        fb = chance(cfg_ph[c]);
        if (fa) dut.u_mem.mem[ba_s][rc_s][sa_s] = ~dut.u_mem.mem[ba_s][rc_s][sa_s];
        if (fb) dut.u_mem.mem[bb_s][rc_s][sb_s] = ~dut.u_mem.mem[bb_s][rc_s][sb_s];
        n_inj += int'(fa) + int'(fb);
        @(posedge clk);
        #1;
        if (fa) dut.u_mem.mem[ba_s][rc_s][sa_s] = ~dut.u_mem.mem[ba_s][rc_s][sa_s];
        if (fb) dut.u_mem.mem[bb_s][rc_s][sb_s] = ~dut.u_mem.mem[bb_s][rc_s][sb_s];
        s = ((s << 1) | int'(u[n_in])) & 127;
        n_in++;
      end
      ber = real'(errs) / real'(n_out);
      $display("Eb/N0 = %0.1f dB, Pe^L = %0.3f, Pe^H = %0.4f: %0d errors in %0d bits, BER = %e, %0d read errors injected",
               cfg_ebn0[c], cfg_pl[c], cfg_ph[c], errs, n_out, ber, n_inj);
      checks++;
      if (ber > 2e-2) begin failures++; $display("FAIL BER too high"); end
      if (c == 0) begin
        checks++;
        if (ber > 1e-3) begin failures++; $display("FAIL error-free BER at 4 dB"); end
      end
      checks++;
      if ((cfg_pl[c] > 0.0 || cfg_ph[c] > 0.0) != (n_inj > 0)) begin
        failures++;
        $display("FAIL injection count");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
