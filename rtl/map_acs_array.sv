// map_acs_array: the eight 9-bit ACS units of the Max-Log-MAP decoder, wired
// for the forward (alpha) or, with BACKWARD = 1, the backward (beta) state
// metric recursion of the 8-state recursive systematic code.
//
// Max-Log-MAP reduces both recursions to add-compare-select, so the same
// gate-level ACS unit as in the Viterbi decoder is used, widened to 9-bit
// metrics and without the decision flip-flop; it keeps the larger candidate.
//   forward : alpha_{k+1}(s') = max over the two predecessors s of
//             alpha_k(s) + gamma_k(u, p) on branch s -> s'
//   backward: beta_k(s) = max over u of beta_{k+1}(next(s,u)) + gamma_k(u, p)
// Start metrics: forward 0 for state 0 and -64 (mod 512) for the rest (the
// encoder starts in state 0); backward 0 for every state (an unterminated
// block). Metrics wrap modulo 512.
//
// The ACS structure and the 9-bit width follow the design description; the
// code, start metrics and the clock-enable/init interface are this design's.
// Timing: init loads the start metrics, en takes one trellis step; sm holds
// the registered metrics, valid the cycle after.
module map_acs_array
  import vos_pkg::*;
#(
  parameter bit BACKWARD = 1'b0
) (
  input  logic                clk,
  input  logic                en,
  input  logic                init,
  input  logic [MAP_BM_W-1:0] gamma [4],   // indexed by {u, p}
  output logic [MAP_SM_W-1:0] sm    [MAP_STATES]
);

  localparam logic [MAP_SM_W-1:0] FWD_OTHER = MAP_SM_W'(-64);

  for (genvar s = 0; s < MAP_STATES; s++) begin : g_acs
    localparam logic [MAP_M-1:0] S = MAP_M'(s);
    // forward: predecessor j = {j, s[2:1]}, input u = s[0] ^ s[2] ^ j
    localparam logic [MAP_M-1:0] FP0 = {1'b0, S[2:1]};
    localparam logic [MAP_M-1:0] FP1 = {1'b1, S[2:1]};
    localparam logic             FU0 = S[0] ^ S[2];
    localparam logic             FU1 = S[0] ^ S[2] ^ 1'b1;
    // backward: successor under input u
    localparam logic [MAP_M-1:0] BN0 = rsc_next(S, 1'b0);
    localparam logic [MAP_M-1:0] BN1 = rsc_next(S, 1'b1);

    localparam logic [MAP_M-1:0] I0  = BACKWARD ? BN0 : FP0;
    localparam logic [MAP_M-1:0] I1  = BACKWARD ? BN1 : FP1;
    localparam logic [1:0]       W0  = BACKWARD ? {1'b0, rsc_par(S, 1'b0)} : {FU0, rsc_par(FP0, FU0)};
    localparam logic [1:0]       W1  = BACKWARD ? {1'b1, rsc_par(S, 1'b1)} : {FU1, rsc_par(FP1, FU1)};
    localparam logic [MAP_SM_W-1:0] IV = (BACKWARD || s == 0) ? '0 : FWD_OTHER;

    acs_unit #(.SM_W(MAP_SM_W), .BM_W(MAP_BM_W), .STORE_DEC(1'b0)) u_acs (
      .clk      (clk),
      .en       (en),
      .init     (init),
      .init_val (IV),
      .sm0      (sm[I0]),
      .bm0      (gamma[W0]),
      .sm1      (sm[I1]),
      .bm1      (gamma[W1]),
      .sm_d     (),
      .dec_d    (),
      .sm_q     (sm[s]),
      .dec_q    ()
    );
  end

endmodule
