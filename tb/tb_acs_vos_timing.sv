// tb_acs_vos_timing: gate-level timing experiment on arrays of ACS units
// under voltage overscaling, with and without the clock skew schedule, for
// both decoders: Viterbi units (8-bit metrics, 3-bit branch metrics, decision
// flip-flop) and Max-Log-MAP forward-recursion units (9-bit metrics, 6-bit
// gamma, no decision flip-flop).
//
// The ACS units are rebuilt here from timed cells (acs_timed_unit below): the same ripple-carry adders, carry-only comparator
// chain, multiplexer and flip-flops as acs_unit, but every gate output follows
// its inputs after its own transport delay. Delays are drawn once per gate
// from the normalized model N(1, s) for half-adder outputs, full-adder carries,
// carry-only cells and multiplexers, N(2, sqrt(2) s) for full-adder sums and
// flip-flop clock-to-Q, with s = 0.05, one half-adder delay being 100 time
// units; setup and hold times are zero. Each flip-flop position i gets its
// clock through clk_skew_buf with code VIT_SKEW_S05[i] or MAP_SKEW_S05[i]
// (skew on) or 0 (skew off); the clock network is not overscaled. To keep
// event-driven simulation short the Viterbi units are connected as the
// trellis of a 32-state code (constraint length 6, generators 53/75 octal)
// rather than the decoder's 128 states; the units, their widths and their
// timing are those of the decoder. The eight Max-Log-MAP units form the
// forward recursion of the decoder's 8-state code, with gamma values formed
// as map_bmu forms them from random channel values.
//
// Overscaling by Kv multiplies every gate delay by
// g(Kv*V)/g(V), g(v) = v / (v - Vt)^1.2, with Vt = 0.3 V (this experiment's
// choice). The clock period T_CP = 1650 is held fixed: 14 unit delays, the
// longer of the two nominal longest paths (Max-Log-MAP; Viterbi has 13), plus
// a margin of about three standard deviations. Kv = 0.71 is used for the
// overscaled runs.
//
// Every cycle the registered metrics and decisions are compared with an
// ideal ACS step computed from the metrics the array held the cycle before,
// so each count is a per-step timing error, not an accumulated one.
// Checks, for each array: no timing error at Kv = 1 with either clock;
// errors do appear at the overscaled supply without skew; with the schedule
// the three most significant metric bits see fewer errors than without it.
module acs_timed_unit #(
  parameter int unsigned SM_W = 8,
  parameter int unsigned BM_W = 3,
  parameter int unsigned SEED = 1
) (
  input  logic [SM_W:0]   ffclk,        // clock of metric bits 0..SM_W-1 and decision
  input  int              scale_milli,  // delay multiplier x 1000
  input  logic            init,
  input  logic [SM_W-1:0] init_val,
  input  logic [SM_W-1:0] sm0,
  input  logic [BM_W-1:0] bm0,
  input  logic [SM_W-1:0] sm1,
  input  logic [BM_W-1:0] bm1,
  output logic [SM_W-1:0] sm_q,
  output logic            dec_q
);
  localparam int W  = SM_W;
  localparam int BW = BM_W;
  localparam real SIG = 0.05;

  int d_s0 [W], d_c0 [W], d_s1 [W], d_c1 [W];   // adder sum / carry delays
  int d_ca [W], d_ms, d_mx [W], d_ff [W+1];

  logic p0 [W], p1 [W], c0 [W+1], c1 [W+1], cc [W], mx [W], q [W+1];
  logic sign = 1'b0;

  function automatic int dl(input int base);
    return base * scale_milli / 1000;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic int draw(input real mean, input real sd);
    real d;
    d = 100.0 * (mean + sd * gauss());
    return (d < 10.0) ? 10 : int'(d);
  endfunction

  initial begin
    void'($urandom(SEED));
    for (int i = 0; i < W; i++) begin
      d_s0[i] = (i < BW) ? draw(2.0, 1.41421 * SIG) : draw(1.0, SIG);
      d_s1[i] = (i < BW) ? draw(2.0, 1.41421 * SIG) : draw(1.0, SIG);
      d_c0[i] = draw(1.0, SIG);
      d_c1[i] = draw(1.0, SIG);
      d_ca[i] = draw(1.0, SIG);
      d_mx[i] = draw(1.0, SIG);
    end
    d_ms = draw(2.0, 1.41421 * SIG);
    for (int i = 0; i <= W; i++) d_ff[i] = draw(2.0, 1.41421 * SIG);
    // consistent all-zero starting point: metrics 0, comparator carries 1
    for (int i = 0; i < W; i++) begin
      p0[i] = 1'b0; p1[i] = 1'b0; mx[i] = 1'b0; cc[i] = 1'b1;
    end
    for (int i = 0; i <= W; i++) begin
      c0[i] = 1'b0; c1[i] = 1'b0; q[i] = 1'b0;
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_bit
    if (i < BW) begin : g_fa
      always @(sm0[i], bm0[i], c0[i]) begin
        p0[i]   <= #(dl(d_s0[i])) sm0[i] ^ bm0[i] ^ c0[i];
        c0[i+1] <= #(dl(d_c0[i])) (sm0[i] & bm0[i]) | (sm0[i] & c0[i]) | (bm0[i] & c0[i]);
      end
      always @(sm1[i], bm1[i], c1[i]) begin
        p1[i]   <= #(dl(d_s1[i])) sm1[i] ^ bm1[i] ^ c1[i];
        c1[i+1] <= #(dl(d_c1[i])) (sm1[i] & bm1[i]) | (sm1[i] & c1[i]) | (bm1[i] & c1[i]);
      end
    end else begin : g_ha
      always @(sm0[i], c0[i]) begin
        p0[i]   <= #(dl(d_s0[i])) sm0[i] ^ c0[i];
        c0[i+1] <= #(dl(d_c0[i])) sm0[i] & c0[i];
      end
      always @(sm1[i], c1[i]) begin
        p1[i]   <= #(dl(d_s1[i])) sm1[i] ^ c1[i];
        c1[i+1] <= #(dl(d_c1[i])) sm1[i] & c1[i];
      end
    end
    if (i < W - 1) begin : g_ca
      always @(p0[i], p1[i], cc[i]) begin
        cc[i+1] <= #(dl(d_ca[i])) (p0[i] & ~p1[i]) | (p0[i] & cc[i]) | (~p1[i] & cc[i]);
      end
    end
    always @(p0[i], p1[i], sign) begin
      mx[i] <= #(dl(d_mx[i])) sign ? p1[i] : p0[i];
    end
    always @(posedge ffclk[i]) begin
      q[i] <= #(dl(d_ff[i])) init ? init_val[i] : mx[i];
    end
    assign sm_q[i] = q[i];
  end

  always @(p0[W-1], p1[W-1], cc[W-1]) begin
    sign <= #(dl(d_ms)) p0[W-1] ^ ~p1[W-1] ^ cc[W-1];
  end
  always @(posedge ffclk[W]) begin
    q[W] <= #(dl(d_ff[W])) init ? 1'b0 : sign;
  end
  assign dec_q = q[W];
endmodule

module tb_acs_vos_timing;
  import vos_pkg::*;

  localparam int T_CP   = 1650;
  localparam int NCYC   = 400;
  localparam int TM     = 5;             // state bits of the Viterbi experiment's trellis
  localparam int S      = 1 << TM;
  localparam logic [TM:0] G0 = 6'o53;
  localparam logic [TM:0] G1 = 6'o75;
  localparam int MW     = MAP_SM_W;
  localparam int MS     = MAP_STATES;
  localparam int SAMPLE = 900;          // all flip-flop outputs settled by then
  localparam real KV_LOW = 0.71;

  logic                clk = 1'b0;
  int                  scale_milli = 1000;
  logic                init = 1'b1;
  // Viterbi array
  logic [2:0]          code [9];
  logic [8:0]          ffclk;
  logic [VIT_BM_W-1:0] bm [4] = '{default: '0};   // zero, like the gate nodes at start
  logic [VIT_SM_W-1:0] sm [S];
  logic                dec [S];
  // Max-Log-MAP array
  logic [2:0]          mcode [9];
  logic [MW:0]         mclk;
  logic [MAP_BM_W-1:0] gam [4] = '{default: '0};
  logic [MW-1:0]       msm [MS];
  logic                mdec [MS];

  int checks = 0, failures = 0;
  int errs [9];     // Viterbi: metric bits 0..7, decision
  int merrs [9];    // Max-Log-MAP: metric bits 0..8

  for (genvar k = 0; k < 9; k++) begin : g_clk
    clk_skew_buf u_skew  (.clk_in(clk), .code(code[k]),  .clk_out(ffclk[k]));
    clk_skew_buf u_mskew (.clk_in(clk), .code(mcode[k]), .clk_out(mclk[k]));
  end
  assign mclk[MW] = clk;   // decision flip-flop, not kept by Max-Log-MAP

  // code word {c1, c0} when input u enters state st (newest bit in st[0])
  function automatic logic [1:0] code_of(input logic [TM-1:0] st, input logic u);
    logic [TM:0] r;
    for (int i = 0; i < TM; i++) r[TM-1-i] = st[i];
    r[TM] = u;
    return {^(r & G1), ^(r & G0)};
  endfunction

  // Max-Log-MAP forward trellis: predecessor j of state ns is {j, ns[2:1]};
  // the branch index is {u, p}.
  function automatic logic [2:0] mpred(input logic [2:0] ns, input logic j);
    return {j, ns[2:1]};
  endfunction

  function automatic logic [1:0] mbranch(input logic [2:0] ns, input logic j);
    logic [2:0] ps;
    logic       u;
    ps = mpred(ns, j);
    u  = ns[0] ^ ps[1] ^ ps[2];
    return {u, rsc_par(ps, u)};
  endfunction

  for (genvar s = 0; s < S; s++) begin : g_acs
    localparam logic [TM-1:0] NS = TM'(s);
    localparam logic [TM-1:0] P0 = {1'b0, NS[TM-1:1]};
    localparam logic [TM-1:0] P1 = {1'b1, NS[TM-1:1]};
    localparam logic [1:0]    W0 = code_of(P0, NS[0]);
    localparam logic [1:0]    W1 = code_of(P1, NS[0]);
    acs_timed_unit #(.SM_W(VIT_SM_W), .BM_W(VIT_BM_W), .SEED(7 * s + 3)) u_acs (
      .ffclk       (ffclk),
      .scale_milli (scale_milli),
      .init        (init),
      .init_val    ((s == 0) ? VIT_SM_W'(0) : VIT_SM_W'(-32)),
      .sm0         (sm[P0]),
      .bm0         (bm[W0]),
      .sm1         (sm[P1]),
      .bm1         (bm[W1]),
      .sm_q        (sm[s]),
      .dec_q       (dec[s])
    );
  end

  for (genvar s = 0; s < MS; s++) begin : g_macs
    localparam logic [2:0] NS = 3'(s);
    acs_timed_unit #(.SM_W(MW), .BM_W(MAP_BM_W), .SEED(11 * s + 500)) u_acs (
      .ffclk       (mclk),
      .scale_milli (scale_milli),
      .init        (init),
      .init_val    ((s == 0) ? MW'(0) : MW'(-64)),
      .sm0         (msm[mpred(NS, 1'b0)]),
      .bm0         (gam[mbranch(NS, 1'b0)]),
      .sm1         (msm[mpred(NS, 1'b1)]),
      .bm1         (gam[mbranch(NS, 1'b1)]),
      .sm_q        (msm[s]),
      .dec_q       (mdec[s])
    );
  end

  initial begin
    #(T_CP * 8 * NCYC);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gdel(input real v);
    return v / ((v - 0.3) ** 1.2);
  endfunction

  // Runs NCYC cycles at the given delay scale and clock schedule, counting
  // per-position errors against the ideal ACS step.
  task automatic run(input int scale, input bit skew_on);
    logic [VIT_SM_W-1:0] snap [S];
    logic [VIT_SM_W-1:0] exp_sm [S];
    logic                exp_dec [S];
    logic [MW-1:0]       msnap [MS];
    logic [MW-1:0]       mexp [MS];
    int                  r0, r1, ys, yp;
    scale_milli = scale;
    for (int k = 0; k < 9; k++) begin
      code[k]  = skew_on ? VIT_SKEW_S05[k] : 3'd0;
      mcode[k] = skew_on ? MAP_SKEW_S05[k] : 3'd0;
      errs[k]  = 0;
      merrs[k] = 0;
    end
    for (int w = 0; w < 4; w++) begin
      bm[w]  = '0;
      gam[w] = MAP_BM_W'(16);
    end
    init = 1'b1;
    #(T_CP);
    for (int n = 0; n < NCYC + 3; n++) begin
      clk = 1'b1;
      #(200 * scale / 1000);
      // branch metrics of this step, as vit_bmu and map_bmu form them from
      // random soft values (2-bit unsigned for Viterbi, 3-bit signed for MAP)
      r0 = int'($urandom % 4);
      r1 = int'($urandom % 4);
      for (int w = 0; w < 4; w++)
        bm[w] = VIT_BM_W'((w[0] ? r0 : 3 - r0) + (w[1] ? r1 : 3 - r1));
      ys = int'($urandom % 8) - 4;
      yp = int'($urandom % 8) - 4;
      for (int w = 0; w < 4; w++)
        gam[w] = MAP_BM_W'((w[1] ? ys : -ys) + (w[0] ? yp : -yp) + 16);
      #(T_CP / 2 - 200 * scale / 1000);
      clk = 1'b0;
      #(SAMPLE - T_CP / 2);
      if (n >= 3) begin
        for (int s = 0; s < S; s++) begin
          for (int i = 0; i < VIT_SM_W; i++) if (sm[s][i] != exp_sm[s][i]) errs[i]++;
          if (dec[s] != exp_dec[s]) errs[8]++;
        end
        for (int s = 0; s < MS; s++)
          for (int i = 0; i < MW; i++) if (msm[s][i] != mexp[s][i]) merrs[i]++;
      end
      if (n >= 2) init = 1'b0;
      for (int s = 0; s < S; s++) snap[s] = sm[s];
      for (int s = 0; s < MS; s++) msnap[s] = msm[s];
      for (int s = 0; s < S; s++) begin
        logic [TM-1:0] ns, p0s, p1s;
        logic [VIT_SM_W-1:0] a0, a1, df;
        ns  = TM'(s);
        p0s = {1'b0, ns[TM-1:1]};
        p1s = {1'b1, ns[TM-1:1]};
        a0  = snap[p0s] + VIT_SM_W'(bm[code_of(p0s, ns[0])]);
        a1  = snap[p1s] + VIT_SM_W'(bm[code_of(p1s, ns[0])]);
        df  = a0 - a1;
        exp_dec[s] = init ? 1'b0 : df[VIT_SM_W-1];
        exp_sm[s]  = init ? ((s == 0) ? '0 : VIT_SM_W'(-32)) : (df[VIT_SM_W-1] ? a1 : a0);
      end
      for (int s = 0; s < MS; s++) begin
        logic [MW-1:0] a0, a1, df;
        a0 = msnap[mpred(3'(s), 1'b0)] + MW'(gam[mbranch(3'(s), 1'b0)]);
        a1 = msnap[mpred(3'(s), 1'b1)] + MW'(gam[mbranch(3'(s), 1'b1)]);
        df = a0 - a1;
        mexp[s] = init ? ((s == 0) ? '0 : MW'(-64)) : (df[MW-1] ? a1 : a0);
      end
      #(T_CP - SAMPLE);
    end
  endtask

  function automatic int total(input int e [9]);
    int t = 0;
    for (int k = 0; k < 9; k++) t += e[k];
    return t;
  endfunction

  task automatic report(input string tag);
    $display("%s Viterbi: errors per bit 0..7 = %0d %0d %0d %0d %0d %0d %0d %0d, decision %0d (of %0d each)",
             tag, errs[0], errs[1], errs[2], errs[3], errs[4], errs[5], errs[6], errs[7],
             errs[8], NCYC * S);
    $display("%s Max-Log-MAP: errors per bit 0..8 = %0d %0d %0d %0d %0d %0d %0d %0d %0d (of %0d each)",
             tag, merrs[0], merrs[1], merrs[2], merrs[3], merrs[4], merrs[5], merrs[6],
             merrs[7], merrs[8], NCYC * MS);
  endtask

  task automatic expect_none(input string what);
    checks += 2;
    if (total(errs) != 0)  begin failures++; $display("FAIL Viterbi timing errors %s", what); end
    if (total(merrs) != 0) begin failures++; $display("FAIL Max-Log-MAP timing errors %s", what); end
  endtask

  initial begin
    int low, v_msb, m_msb;
    #(T_CP);   // let every gate process start waiting before inputs move
    low = int'(1000.0 * gdel(KV_LOW) / gdel(1.0));
    $display("Kv = %0.2f: gate delays x %0.3f, ACS energy saving about %0.0f %%",
             KV_LOW, real'(low) / 1000.0, 100.0 * (1.0 - KV_LOW * KV_LOW));

    run(1000, 1'b1);
    report("Kv = 1,    skew on ");
    expect_none("at Kv = 1 with skew");

    run(1000, 1'b0);
    report("Kv = 1,    skew off");
    expect_none("at Kv = 1 without skew");

    run(low, 1'b0);
    report("Kv = 0.71, skew off");
    v_msb = errs[5] + errs[6] + errs[7];
    m_msb = merrs[6] + merrs[7] + merrs[8];
    checks += 2;
    if (v_msb == 0) begin failures++; $display("FAIL Viterbi: overscaling caused no MSB error"); end
    if (m_msb == 0) begin failures++; $display("FAIL Max-Log-MAP: overscaling caused no MSB error"); end

    run(low, 1'b1);
    report("Kv = 0.71, skew on ");
    checks += 2;
    if (errs[5] + errs[6] + errs[7] >= v_msb) begin
      failures++;
      $display("FAIL Viterbi: skew schedule did not reduce MSB errors");
    end
    if (merrs[6] + merrs[7] + merrs[8] >= m_msb) begin
      failures++;
      $display("FAIL Max-Log-MAP: skew schedule did not reduce MSB errors");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
