// tb_trellis_vos_top: end-to-end test of the whole design at its default
// parameters (128-state Viterbi decoder, trace-back length 56; Max-Log-MAP
// decoder with 64-symbol blocks; skew schedule for sigma = 0.05).
// Both decoders run at the same time:
//   * Viterbi: 2500 random bits are encoded here (constraint length 8,
//     generators 247/371 octal), sent as 2-bit soft values with weakened
//     values, isolated hard errors and random input stalls; every decoded bit
//     must equal the information bit, 169 accepted symbols later. The
//     per-bank supply levels must show each bank going through write,
//     trace-back (first and second half) and decode levels.
//   * Max-Log-MAP: three blocks of an 8-state RSC code are sent, with random
//     gaps and with symbols offered while the decoder is busy (back-pressure);
//     the LLR signs of the noise-free blocks must reproduce the information
//     bits, indices 63..0, and each block must finish 64 cycles after its
//     last symbol.
//   * The skewed ACS clocks must trail the clock by the scheduled delays.
// Each mechanism is counted and a failure is recorded for one that never
// happened.
module tb_trellis_vos_top;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #500 clk = ~clk;
  int checks = 0, failures = 0;

  logic              rst;
  logic              vit_in_valid, vit_out_valid, vit_out_bit;
  logic [1:0]        vit_r0, vit_r1;
  vos_level_e        vit_mem_lvl [6];
  logic [8:0]        vit_acs_clk, map_acs_clk;
  logic              map_in_valid, map_in_ready, map_llr_valid;
  logic signed [2:0] map_ys, map_yp;
  logic signed [3:0] map_la;
  logic [5:0]        map_llr_idx;
  logic signed [8:0] map_llr;
  vos_level_e        map_mem_lvl [3];

  trellis_vos_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- reference encoders ----------------
  function automatic int cc_word(int s, int u);
    int r;
    r = u << 7;
    for (int i = 0; i < 7; i++) if ((s >> i) & 1) r |= 1 << (6 - i);
    return ($countones(r & 'o371) & 1) * 2 + ($countones(r & 'o247) & 1);
  endfunction
  function automatic int rsc_nxt(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return ((s << 1) & 6) | a;
  endfunction
  function automatic int rsc_p(int s, int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ ((s >> 2) & 1);
    return a ^ (s & 1) ^ ((s >> 2) & 1);
  endfunction

  // mechanism counters
  int n_vit_stall = 0, n_vit_flip = 0, n_vit_out = 0;
  int n_lvl_nom = 0, n_lvl_h = 0, n_lvl_l = 0;
  int n_map_gap = 0, n_map_backpressure = 0, n_map_blocks = 0, n_map_llr = 0;
  int n_skew = 0;
  bit vit_done = 0, map_done = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NV = 2500;
  bit vu [NV];

  // ---------------- Viterbi stream ----------------
  initial begin
    int s, w, n_in, last_flip;
    s = 0; n_in = 0; last_flip = -100;
    vit_in_valid = 1'b0; vit_r0 = '0; vit_r1 = '0;
    for (int i = 0; i < NV; i++) vu[i] = 1'($urandom);
    wait (rst == 1'b0);
    @(posedge clk); #1;
    while (n_in < NV) begin
      vit_in_valid = ($urandom_range(0, 9) != 0);
      if (!vit_in_valid) n_vit_stall++;
      w = cc_word(s, int'(vu[n_in]));
      vit_r0 = (w & 1) ? 2'd3 : 2'd0;
      vit_r1 = (w & 2) ? 2'd3 : 2'd0;
      if ($urandom_range(0, 7) == 0) vit_r1 = (w & 2) ? 2'd2 : 2'd1;
      if (vit_in_valid && n_in - last_flip > 40 && $urandom_range(0, 19) == 0) begin
        vit_r0 = ~vit_r0;
        last_flip = n_in;
        n_vit_flip++;
      end
      #1;
      if (vit_out_valid) begin
        chk(n_in >= 169 && vit_out_bit == vu[n_in - 169], $sformatf("viterbi bit at %0d", n_in));
        n_vit_out++;
      end
      if (vit_in_valid) begin
        // levels: exactly one bank H, two banks NOM (write, decode) once running
        int nh, nn;
        nh = 0; nn = 0;
        for (int k = 0; k < 6; k++) begin
          if (vit_mem_lvl[k] == VOS_H) begin nh++; n_lvl_h++; end
          if (vit_mem_lvl[k] == VOS_NOM) begin nn++; n_lvl_nom++; end
          if (vit_mem_lvl[k] == VOS_L) n_lvl_l++;
        end
        chk(nh == 1 && nn == 2, "viterbi bank levels");
      end
      @(posedge clk);
      if (vit_in_valid) begin
        s = ((s << 1) | int'(vu[n_in])) & 127;
        n_in++;
      end
      #1;
    end
    vit_in_valid = 1'b0;
    chk(n_vit_out == NV - 169, $sformatf("viterbi output count %0d", n_vit_out));
    vit_done = 1;
  end

  // ---------------- Max-Log-MAP blocks ----------------
  localparam int N = 64;
  initial begin
    int s, ub [N], vs [N], vp [N], cyc, idx;
    map_in_valid = 1'b0; map_ys = '0; map_yp = '0; map_la = '0;
    wait (rst == 1'b0);
    @(posedge clk); #1;
    for (int blk = 0; blk < 3; blk++) begin
      s = 0;
      for (int k = 0; k < N; k++) begin
        ub[k] = $urandom_range(0, 1);
        vs[k] = ub[k] ? 3 : -4;
        vp[k] = rsc_p(s, ub[k]) ? 3 : -4;
        s = rsc_nxt(s, ub[k]);
      end
      for (int k = 0; k < N; ) begin
        map_in_valid = ($urandom_range(0, 5) != 0);
        if (!map_in_valid) n_map_gap++;
        map_ys = 3'(vs[k]); map_yp = 3'(vp[k]); map_la = '0;
        #1;
        chk(map_in_ready, "map ready while loading");
        @(posedge clk);
        if (map_in_valid) k++;
        #1;
      end
      // keep offering the next block's first symbol: it must not be taken
      map_in_valid = 1'b1;
      idx = N - 1; cyc = 0;
      while (!map_in_ready && cyc < 3 * N) begin
        #1;
        n_map_backpressure++;
        if (map_llr_valid) begin
          chk(int'(map_llr_idx) == idx && ((map_llr > 0) == (ub[idx] == 1)),
              $sformatf("map llr blk %0d idx %0d", blk, idx));
          n_map_llr++;
          idx--;
        end
        @(posedge clk);
        cyc++;
        #1;
      end
      map_in_valid = 1'b0;
      chk(cyc == N && idx == -1, $sformatf("map block %0d took %0d cycles", blk, cyc));
      chk(map_mem_lvl[0] == VOS_NOM && map_mem_lvl[1] == VOS_H && map_mem_lvl[2] == VOS_L,
          "map bank levels");
      n_map_blocks++;
    end
    map_done = 1;
  end

  // ---------------- skewed ACS clocks ----------------
  initial begin
    wait (rst == 1'b0);
    repeat (3) @(posedge clk);
    for (int i = 0; i < 9; i++) begin
      check_skew(int'(VIT_SKEW_S05[i]) * 50, 1'b0, i);
      check_skew(int'(MAP_SKEW_S05[i]) * 50, 1'b1, i);
    end
  end

  // the skewed clock must still be low just before clk + d and high just after
  task automatic check_skew(input int d, input bit is_map, input int i);
    @(posedge clk);
    if (d > 0) begin
      #(d - 1);
      chk((is_map ? map_acs_clk[i] : vit_acs_clk[i]) == 1'b0, $sformatf("skew %0d/%0d early", is_map, i));
      #2;
    end else begin
      #1;
    end
    chk((is_map ? map_acs_clk[i] : vit_acs_clk[i]) == 1'b1, $sformatf("skew %0d/%0d late", is_map, i));
    n_skew++;
  endtask

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (vit_done && map_done);
    $display("viterbi: %0d bits, %0d stalls, %0d channel flips; levels nom/h/l %0d/%0d/%0d",
             n_vit_out, n_vit_stall, n_vit_flip, n_lvl_nom, n_lvl_h, n_lvl_l);
    $display("max-log-map: %0d blocks, %0d llrs, %0d gaps, %0d back-pressure cycles; %0d skew checks",
             n_map_blocks, n_map_llr, n_map_gap, n_map_backpressure, n_skew);
    chk(n_vit_stall > 0, "no viterbi stall");
    chk(n_vit_flip > 0, "no channel error corrected");
    chk(n_lvl_nom > 0 && n_lvl_h > 0 && n_lvl_l > 0, "a supply level never used");
    chk(n_map_gap > 0, "no map input gap");
    chk(n_map_backpressure > 0, "no map back-pressure");
    chk(n_map_blocks == 3, "map blocks");
    chk(n_skew == 18, "skew clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
