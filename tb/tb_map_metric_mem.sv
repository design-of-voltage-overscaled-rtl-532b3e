// tb_map_metric_mem: writes random 8x9-bit metric vectors to every address of
// the partitioned state metric memory, reads them back in random order and
// checks the data and the three bank supply levels (MSB bank nominal, middle
// bank Kv^H, LSB bank Kv^L).
module tb_map_metric_mem;
  import vos_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 64;
  logic       we;
  logic [5:0] waddr, raddr;
  logic [8:0] wdata [8], rdata [8];
  vos_level_e lh, lm, ll;
  logic [8:0] shadow [DEPTH][8];

  map_metric_mem #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(rdata), .lvl_h(lh), .lvl_m(lm), .lvl_l(ll));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    we = 1'b0; waddr = '0; raddr = '0;
    for (int s = 0; s < 8; s++) wdata[s] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = 6'(a);
      for (int s = 0; s < 8; s++) begin
        wdata[s] = 9'($urandom);
        shadow[a][s] = wdata[s];
      end
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int t = 0; t < 300; t++) begin
      raddr = 6'($urandom_range(0, DEPTH - 1));
      #1;
      ok = 1'b1;
      for (int s = 0; s < 8; s++) if (rdata[s] != shadow[raddr][s]) ok = 1'b0;
      checks++;
      if (!ok) begin failures++; if (failures < 10) $display("FAIL read %0d", raddr); end
    end
    checks++;
    if (lh != VOS_NOM || lm != VOS_H || ll != VOS_L) begin
      failures++;
      $display("FAIL levels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
