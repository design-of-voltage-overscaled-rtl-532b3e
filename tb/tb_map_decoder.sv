// tb_map_decoder: end-to-end test of the Max-Log-MAP decoder (block length
// 64). Random information bits are encoded here with the 8-state recursive
// systematic code; the systematic and parity bits become 3-bit soft values
// (+3 / -4), with noise added in later blocks, and random a-priori values are
// applied. A Max-Log-MAP reference written here with plain integers (forward
// and backward recursions over the whole block, doubled branch metric)
// gives the expected LLR of every step; the decoder must match it exactly,
// deliver the indices 63..0 in order, one per cycle, and be ready for the
// next block exactly 64 cycles after the last symbol. On the noise-free
// block the LLR signs must also reproduce the information bits.
module tb_map_decoder;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 64;
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
  function automatic int clip(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  int vs [N], vp [N], vl [N], ub [N], expl [N];

  // integer Max-Log-MAP with the decoder's doubled branch metric
  task automatic reference();
    int al [N+1][8], be [N+1][8], g, m [2], tot;
    for (int s = 0; s < 8; s++) begin
      al[0][s] = (s == 0) ? 0 : -64;
      be[N][s] = 0;
    end
    for (int k = 0; k < N; k++) begin
      for (int s = 0; s < 8; s++) al[k+1][s] = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          g = (u ? 1 : -1) * (vs[k] + vl[k]) + (par(s, u) ? 1 : -1) * vp[k];
          if (al[k][s] + g > al[k+1][nxt(s, u)]) al[k+1][nxt(s, u)] = al[k][s] + g;
        end
    end
    for (int k = N - 1; k >= 0; k--)
      for (int s = 0; s < 8; s++) begin
        be[k][s] = -100000;
        for (int u = 0; u < 2; u++) begin
          g = (u ? 1 : -1) * (vs[k] + vl[k]) + (par(s, u) ? 1 : -1) * vp[k];
          if (be[k+1][nxt(s, u)] + g > be[k][s]) be[k][s] = be[k+1][nxt(s, u)] + g;
        end
      end
    for (int k = 0; k < N; k++) begin
      m[0] = -100000; m[1] = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          g = (u ? 1 : -1) * (vs[k] + vl[k]) + (par(s, u) ? 1 : -1) * vp[k];
          tot = al[k][s] + g + be[k+1][nxt(s, u)];
          if (tot > m[u]) m[u] = tot;
        end
      expl[k] = m[1] - m[0];
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, noise, cyc, expect_idx, n_gaps;
    rst = 1'b1; in_valid = 1'b0; ys = '0; yp = '0; la = '0;
    n_gaps = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int blk = 0; blk < 4; blk++) begin
      noise = (blk == 0) ? 0 : blk + 1;
      s = 0;
      for (int k = 0; k < N; k++) begin
        int p;
        ub[k] = $urandom_range(0, 1);
        p = par(s, ub[k]);
        s = nxt(s, ub[k]);
        vs[k] = clip((ub[k] ? 3 : -4) + $urandom_range(0, 2 * noise) - noise, -4, 3);
        vp[k] = clip((p ? 3 : -4) + $urandom_range(0, 2 * noise) - noise, -4, 3);
        vl[k] = (blk < 2) ? 0 : $urandom_range(0, 15) - 8;
      end
      reference();
      // load phase, with random gaps
      for (int k = 0; k < N; ) begin
        in_valid = ($urandom_range(0, 4) != 0);
        if (!in_valid) n_gaps++;
        ys = 3'(vs[k]); yp = 3'(vp[k]); la = 4'(vl[k]);
        #1;
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready in load"); end
        @(posedge clk);
        if (in_valid) k++;
        #1;
      end
      in_valid = 1'b0;
      // backward phase: N LLRs, indices N-1 .. 0, one per cycle
      expect_idx = N - 1;
      cyc = 0;
      while (!in_ready && cyc < 3 * N) begin
        #1;
        if (llr_valid) begin
          checks++;
          if (int'(llr_idx) != expect_idx || int'(llr) != expl[expect_idx]) begin
            failures++;
            if (failures < 10) $display("FAIL blk %0d idx %0d got %0d exp %0d (idx exp %0d)",
                                        blk, llr_idx, llr, expl[expect_idx], expect_idx);
          end
          if (blk == 0) begin
            checks++;
            if ((llr > 0) != (ub[expect_idx] == 1)) begin
              failures++;
              $display("FAIL hard decision blk 0 idx %0d", expect_idx);
            end
          end
          expect_idx--;
        end
        @(posedge clk);
        cyc++;
        #1;
      end
      checks++;
      if (cyc != N || expect_idx != -1) begin
        failures++;
        $display("FAIL block %0d took %0d cycles, %0d LLRs missing", blk, cyc, expect_idx + 1);
      end
    end
    checks++;
    if (n_gaps == 0) begin failures++; $display("FAIL no input gaps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
