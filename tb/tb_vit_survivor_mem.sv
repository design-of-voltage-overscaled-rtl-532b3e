// tb_vit_survivor_mem: drives the trace-back memory with decision columns
// that describe a known state path (every entry of column n holds the bit that
// left the encoder register at step n, so any trace-back merges onto the path
// within seven steps) and checks that
//   * the decoded bits equal the path's input bits, in order,
//   * each bit leaves exactly 6*28 = 168 enabled cycles after its column,
//   * the per-bank supply levels follow the write / trace-back / decode
//     schedule, recomputed here from the bank rotation,
// with random stalls on wr_en.
module tb_vit_survivor_mem;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         rst, wr_en, out_valid, out_bit;
  logic [127:0] wr_dec;
  vos_level_e   lvl [6];

  vit_survivor_mem dut (.clk(clk), .rst(rst), .wr_en(wr_en), .wr_dec(wr_dec),
                        .out_valid(out_valid), .out_bit(out_bit), .bank_lvl(lvl));

  localparam int NCOL = 2000;
  bit u [NCOL];
  int n_out = 0, n_wr = 0, n_stall = 0;
  int seen_h = 0, seen_l = 0, seen_nom = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;            // encoder state, newest bit in bit 0
    int wb, exp_lvl;
    bit ok;
    rst = 1'b1; wr_en = 1'b0; wr_dec = '0;
    s = 0;
    for (int i = 0; i < NCOL; i++) u[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    while (n_wr < NCOL) begin
      wr_en = ($urandom_range(0, 5) != 0);
      if (wr_en) begin
        // column n: state s -> {s[5:0], u}; predecessor bit is s[6]
        wr_dec = {128{1'b0 ^ ((s >> 6) & 1) != 0}};
      end else begin
        n_stall++;
        wr_dec = 128'($urandom);
      end
      #1;
      // bank levels: write bank = n_wr/28 mod 6
      wb = (n_wr / 28) % 6;
      ok = 1'b1;
      for (int k = 0; k < 6; k++) begin
        int age;
        age = (wb - k + 6) % 6;
        exp_lvl = (age == 0 || age == 5) ? int'(VOS_NOM) : (age == 3) ? int'(VOS_H) : int'(VOS_L);
        if (int'(lvl[k]) != exp_lvl) ok = 1'b0;
        if (lvl[k] == VOS_H) seen_h++;
        if (lvl[k] == VOS_L) seen_l++;
        if (lvl[k] == VOS_NOM) seen_nom++;
      end
      checks++;
      if (!ok) begin failures++; $display("FAIL levels at column %0d", n_wr); end
      // output check: bit of column n_wr - 168 when valid
      if (out_valid) begin
        checks++;
        if (n_wr < 168 || out_bit != u[n_wr - 168]) begin
          failures++;
          $display("FAIL out at column %0d", n_wr);
        end
        n_out++;
      end
      @(posedge clk);
      if (wr_en) begin
        s = ((s << 1) | int'(u[n_wr])) & 127;
        n_wr++;
      end
      #1;
    end
    checks++;
    if (n_out != NCOL - 168) begin
      failures++;
      $display("FAIL output count %0d", n_out);
    end
    checks++;
    if (n_stall == 0 || seen_h == 0 || seen_l == 0 || seen_nom == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
