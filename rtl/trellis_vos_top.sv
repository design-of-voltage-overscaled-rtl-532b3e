// trellis_vos_top: the two voltage-overscalable trellis decoders side by side.
//
//   * vit_decoder: hard-output Viterbi decoder, rate-1/2 code, 128 states,
//     gate-level 8-bit ACS array, 3-pointer even trace-back memory whose six
//     banks get a per-bank supply level (dynamic VOS).
//   * map_decoder: Max-Log-MAP soft-output decoder for the 8-state
//     constituent code of a rate-1/3 Turbo code, 9-bit ACS recursions, state
//     metric memory split into three 3-bit banks with their own supply levels.
//   * eighteen clk_skew_buf delay elements produce the scheduled clock of
//     each ACS flip-flop position: Viterbi state metric bits 0..7 and the
//     decision bit, Max-Log-MAP state metric bits 0..8, for the
//     process-variation level chosen by SKEW_SIGMA (0: sigma = 0.05,
//     1: 0.10, 2: 0.15). These are behavioural models; the synthesizable
//     decoders themselves run on the common clk, and the skewed clocks are
//     brought out as vit_acs_clk / map_acs_clk for a clock-tree
//     implementation to follow (every ACS unit of an array uses the same
//     per-bit schedule).
//
// The two decoders share clk and rst and are otherwise independent; each has
// the ports of its own module (see those for timing). Supply levels
// (vos_pkg::vos_level_e) are outputs for the supply circuitry, which is
// outside this RTL. The Turbo iteration around the Max-Log-MAP decoder
// (interleaver, extrinsic exchange) is not part of this design: the a-priori
// input map_la and the LLR output are brought out instead.
module trellis_vos_top
  import vos_pkg::*;
#(
  parameter int unsigned MAP_N      = 64,
  parameter int unsigned SKEW_SIGMA = 0
) (
  input  logic                        clk,
  input  logic                        rst,
  // Viterbi decoder
  input  logic                        vit_in_valid,
  input  logic [VIT_SOFT_W-1:0]       vit_r0,
  input  logic [VIT_SOFT_W-1:0]       vit_r1,
  output logic                        vit_out_valid,
  output logic                        vit_out_bit,
  output vos_level_e                  vit_mem_lvl [6],
  output logic [8:0]                  vit_acs_clk,
  // Max-Log-MAP decoder
  input  logic                        map_in_valid,
  output logic                        map_in_ready,
  input  logic signed [MAP_Y_W-1:0]   map_ys,
  input  logic signed [MAP_Y_W-1:0]   map_yp,
  input  logic signed [MAP_LA_W-1:0]  map_la,
  output logic                        map_llr_valid,
  output logic [$clog2(MAP_N)-1:0]    map_llr_idx,
  output logic signed [MAP_SM_W-1:0]  map_llr,
  output vos_level_e                  map_mem_lvl [3],
  output logic [8:0]                  map_acs_clk
);

  localparam skew_tab_t SKEW_V = (SKEW_SIGMA == 0) ? VIT_SKEW_S05 :
                                 (SKEW_SIGMA == 1) ? VIT_SKEW_S10 : VIT_SKEW_S15;
  localparam skew_tab_t SKEW_M = (SKEW_SIGMA == 0) ? MAP_SKEW_S05 :
                                 (SKEW_SIGMA == 1) ? MAP_SKEW_S10 : MAP_SKEW_S15;

  vit_decoder u_vit (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (vit_in_valid),
    .r0        (vit_r0),
    .r1        (vit_r1),
    .out_valid (vit_out_valid),
    .out_bit   (vit_out_bit),
    .mem_lvl   (vit_mem_lvl)
  );

  for (genvar i = 0; i < 9; i++) begin : g_skew
    clk_skew_buf u_skew_v (.clk_in(clk), .code(SKEW_V[i]), .clk_out(vit_acs_clk[i]));
    clk_skew_buf u_skew_m (.clk_in(clk), .code(SKEW_M[i]), .clk_out(map_acs_clk[i]));
  end

  map_decoder #(.N(MAP_N)) u_map (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (map_in_valid),
    .in_ready  (map_in_ready),
    .ys        (map_ys),
    .yp        (map_yp),
    .la        (map_la),
    .llr_valid (map_llr_valid),
    .llr_idx   (map_llr_idx),
    .llr       (map_llr),
    .mem_lvl   (map_mem_lvl)
  );

endmodule
