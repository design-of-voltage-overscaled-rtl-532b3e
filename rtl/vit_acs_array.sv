// vit_acs_array: the 128 ACS units of the Viterbi decoder, wired as the
// trellis of the rate-1/2, 128-state convolutional code.
//
// For next state s' = {s[5:0], u} the two predecessors are p_j = {j, s'[6:1]},
// j = 0, 1, and the branch from p_j carries code word vos_pkg::vit_code(p_j,
// s'[0]); the matching branch metric is picked from the four supplied by the
// branch metric unit. ACS unit s' stores the survivor metric and the decision
// bit j of the surviving predecessor. One trellis step per enabled clock.
// The ACS array and its 8-bit metrics follow the design description; the code
// polynomials, the state numbering and the start metrics (0 for state 0,
// INIT_OTHER for every other state, since the encoder starts in state 0) are
// this design's choices.
//
// Interface: init loads the start metrics; en advances one step using bm.
// dec/sm are the registered decisions and metrics of the step just taken,
// valid the cycle after en.
module vit_acs_array
  import vos_pkg::*;
#(
  parameter logic [VIT_SM_W-1:0] INIT_OTHER = VIT_SM_W'(-32)
) (
  input  logic                clk,
  input  logic                en,
  input  logic                init,
  input  logic [VIT_BM_W-1:0] bm  [4],
  output logic [VIT_STATES-1:0] dec,
  output logic [VIT_SM_W-1:0] sm  [VIT_STATES]
);

  for (genvar s = 0; s < VIT_STATES; s++) begin : g_acs
    localparam logic [VIT_M-1:0] NS = VIT_M'(s);
    localparam logic [VIT_M-1:0] P0 = {1'b0, NS[VIT_M-1:1]};
    localparam logic [VIT_M-1:0] P1 = {1'b1, NS[VIT_M-1:1]};
    localparam logic [1:0]       W0 = vit_code(P0, NS[0]);
    localparam logic [1:0]       W1 = vit_code(P1, NS[0]);

    acs_unit #(.SM_W(VIT_SM_W), .BM_W(VIT_BM_W), .STORE_DEC(1'b1)) u_acs (
      .clk      (clk),
      .en       (en),
      .init     (init),
      .init_val ((s == 0) ? '0 : INIT_OTHER),
      .sm0      (sm[P0]),
      .bm0      (bm[W0]),
      .sm1      (sm[P1]),
      .bm1      (bm[W1]),
      .sm_d     (),
      .dec_d    (),
      .sm_q     (sm[s]),
      .dec_q    (dec[s])
    );
  end

endmodule
