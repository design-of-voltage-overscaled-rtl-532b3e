// tb_acs_unit: self-checking test of the gate-level ACS unit at the Viterbi
// widths (8-bit metric, 3-bit branch metric) and at the Max-Log-MAP widths
// (9-bit metric, 6-bit branch metric, no decision flip-flop). Random operands
// are compared with a modulo add / sign-of-difference reference; init and the
// clock enable are checked too. One ACS step per clock, result the cycle after.
module tb_acs_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, init;
  logic [7:0] v_init, v_sm0, v_sm1, v_smq, v_smd;
  logic [2:0] v_bm0, v_bm1;
  logic       v_dq, v_dd;
  logic [8:0] m_init, m_sm0, m_sm1, m_smq, m_smd;
  logic [5:0] m_bm0, m_bm1;
  logic       m_dq, m_dd;

  acs_unit #(.SM_W(8), .BM_W(3), .STORE_DEC(1'b1)) dut_v (
    .clk(clk), .en(en), .init(init), .init_val(v_init),
    .sm0(v_sm0), .bm0(v_bm0), .sm1(v_sm1), .bm1(v_bm1),
    .sm_d(v_smd), .dec_d(v_dd), .sm_q(v_smq), .dec_q(v_dq));

  acs_unit #(.SM_W(9), .BM_W(6), .STORE_DEC(1'b0)) dut_m (
    .clk(clk), .en(en), .init(init), .init_val(m_init),
    .sm0(m_sm0), .bm0(m_bm0), .sm1(m_sm1), .bm1(m_bm1),
    .sm_d(m_smd), .dec_d(m_dd), .sm_q(m_smq), .dec_q(m_dq));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // reference ACS: keep the larger candidate in modulo-2^w arithmetic
  function automatic int ref_sm(int w, int a, int ba, int b, int bb, output bit dec);
    int m, p0, p1, d;
    m  = 1 << w;
    p0 = (a + ba) % m;
    p1 = (b + bb) % m;
    d  = (p0 - p1 + m) % m;
    dec = (d >= m / 2);
    return dec ? p1 : p0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ev, em, hold_v, hold_m;
    bit dv, dm;
    en = 1'b0; init = 1'b1;
    v_init = 8'd77; m_init = 9'd300;
    {v_sm0, v_sm1, v_bm0, v_bm1, m_sm0, m_sm1, m_bm0, m_bm1} = '0;
    @(posedge clk); #1;
    chk(v_smq == 8'd77 && v_dq == 1'b0, "viterbi init");
    chk(m_smq == 9'd300 && m_dq == 1'b0, "map init");
    init = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom_range(0, 7) != 0);
      v_sm0 = 8'($urandom); v_sm1 = 8'($urandom);
      v_bm0 = 3'($urandom); v_bm1 = 3'($urandom);
      m_sm0 = 9'($urandom); m_sm1 = 9'($urandom);
      m_bm0 = 6'($urandom); m_bm1 = 6'($urandom);
      if (t % 5 == 0) begin  // ties and near-ties
        v_sm1 = v_sm0 + 8'(v_bm0) - 8'(v_bm1) + 8'($urandom_range(0, 2)) - 8'd1;
        m_sm1 = m_sm0 + 9'(m_bm0) - 9'(m_bm1) + 9'($urandom_range(0, 2)) - 9'd1;
      end
      hold_v = int'(v_smq);
      hold_m = int'(m_smq);
      ev = ref_sm(8, int'(v_sm0), int'(v_bm0), int'(v_sm1), int'(v_bm1), dv);
      em = ref_sm(9, int'(m_sm0), int'(m_bm0), int'(m_sm1), int'(m_bm1), dm);
      #1;
      chk(int'(v_smd) == ev && v_dd == dv, "viterbi combinational");
      chk(int'(m_smd) == em && m_dd == dm, "map combinational");
      @(posedge clk); #1;
      if (en) begin
        chk(int'(v_smq) == ev && v_dq == dv, $sformatf("viterbi reg t=%0d", t));
        chk(int'(m_smq) == em && m_dq == 1'b0, $sformatf("map reg t=%0d", t));
      end else begin
        chk(int'(v_smq) == hold_v, "viterbi hold");
        chk(int'(m_smq) == hold_m, "map hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
