// map_metric_mem: state metric memory of the Max-Log-MAP decoder, partitioned
// for unequal voltage overscaling.
//
// Each entry holds the eight 9-bit forward metrics of one trellis step. Since
// the bits of a metric differ in importance, every metric is cut into three
// 3-bit groups stored in three separate banks: bank H holds bits 8..6 (the
// MSBs), bank M bits 5..3, bank L bits 2..0 (the LSBs). Each bank has its own
// supply level, output on lvl_h/lvl_m/lvl_l for the supply circuitry: the
// MSB bank is the least tolerant of errors and is overscaled least.
// The three-way 3-bit split follows the design description; the default
// levels (nominal for H, Kv^H for M, Kv^L for L) and the depth are this
// design's choice.
//
// Interface: one synchronous write (we, waddr, wdata) and one asynchronous
// read (raddr -> rdata) per cycle.
module map_metric_mem
  import vos_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  parameter vos_level_e  LVL_H = VOS_NOM,
  parameter vos_level_e  LVL_M = VOS_H,
  parameter vos_level_e  LVL_L = VOS_L
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [MAP_SM_W-1:0]      wdata [MAP_STATES],
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [MAP_SM_W-1:0]      rdata [MAP_STATES],
  output vos_level_e               lvl_h,
  output vos_level_e               lvl_m,
  output vos_level_e               lvl_l
);
  localparam int unsigned GW = MAP_GROUP_W;
  typedef logic [MAP_STATES*GW-1:0] word_t;

  word_t bank_h [DEPTH];
  word_t bank_m [DEPTH];
  word_t bank_l [DEPTH];

  word_t wh, wm, wl, rh, rm, rl;

  always_comb begin
    for (int s = 0; s < MAP_STATES; s++) begin
      wh[s*GW +: GW] = wdata[s][3*GW-1:2*GW];
      wm[s*GW +: GW] = wdata[s][2*GW-1:GW];
      wl[s*GW +: GW] = wdata[s][GW-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      bank_h[waddr] <= wh;
      bank_m[waddr] <= wm;
      bank_l[waddr] <= wl;
    end
  end

  assign rh = bank_h[raddr];
  assign rm = bank_m[raddr];
  assign rl = bank_l[raddr];

  always_comb begin
    for (int s = 0; s < MAP_STATES; s++) begin
      rdata[s] = {rh[s*GW +: GW], rm[s*GW +: GW], rl[s*GW +: GW]};
    end
  end

  assign lvl_h = LVL_H;
  assign lvl_m = LVL_M;
  assign lvl_l = LVL_L;
endmodule
