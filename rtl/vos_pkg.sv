// vos_pkg: shared constants, types and trellis functions of the two
// voltage-overscaled trellis decoders.
//
// Viterbi decoder: rate-1/2 convolutional code with a 128-state trellis
// (constraint length 8), 8-bit state metrics and 3-bit branch metrics, as in
// the design description. The generator polynomials (247, 371 octal, the usual
// best-distance pair for constraint length 8) are this
// design's choice; the description gives only the rate and the state count.
// State convention: the state is the last seven input bits, newest in bit 0,
// so the successor of state s under input u is {s[5:0], u}; old bit s[6] drops out.
//
// Max-Log-MAP decoder: 8-state recursive systematic convolutional code of a
// rate-1/3 Turbo code, 9-bit state metrics. The feedback/forward polynomials
// (13, 15 octal, the widely used 3GPP constituent code) are this design's
// choice. State bits r[0] = D, r[1] = D^2, r[2] = D^3.
//
// Supply levels: every overscalable block is told which of the levels
// below to run at. VOS_NOM means Kv = 1, VOS_H the mild overscaling Kv^H and
// VOS_L the deeper overscaling Kv^L (1 > Kv^H > Kv^L), following the dynamic
// VOS description of the survivor memory.
//
// Clock skew schedule: the per-flip-flop clock delays of the ACS unit,
// obtained by linear programming on the variation-aware soft clock skew
// formulation, quantized to 3 bits (2 integer, 1 fraction bit, in units of
// one half-adder delay). Entry [i] is ACS output bit i; for the Viterbi ACS
// bit 8 is the decision bit. The rounding to the nearest half unit is this
// design's choice.
package vos_pkg;

  // ---------------- Viterbi decoder constants ----------------
  localparam int unsigned VIT_K      = 8;             // constraint length
  localparam int unsigned VIT_M      = VIT_K - 1;     // memory (state bits)
  localparam int unsigned VIT_STATES = 1 << VIT_M;    // 128
  localparam int unsigned VIT_SM_W   = 8;             // state metric width
  localparam int unsigned VIT_BM_W   = 3;             // branch metric width
  localparam int unsigned VIT_SOFT_W = 2;             // soft input per code bit
  localparam int unsigned VIT_TB_LEN = 56;            // trace-back length L
  localparam logic [VIT_K-1:0] VIT_G0 = 8'o247;
  localparam logic [VIT_K-1:0] VIT_G1 = 8'o371;

  // Two code bits {c1, c0} emitted when input u enters state s.
  // Tap vector: bit 7 = u (current input), bit 6 = s[0], ..., bit 0 = s[6].
  function automatic logic [1:0] vit_code(input logic [VIT_M-1:0] s, input logic u);
    logic [VIT_K-1:0] r;
    for (int i = 0; i < VIT_M; i++) r[VIT_M-1-i] = s[i];
    r[VIT_K-1] = u;
    return {^(r & VIT_G1), ^(r & VIT_G0)};
  endfunction

  // ---------------- Max-Log-MAP decoder constants ----------------
  localparam int unsigned MAP_M      = 3;
  localparam int unsigned MAP_STATES = 1 << MAP_M;    // 8
  localparam int unsigned MAP_SM_W   = 9;             // state metric width
  localparam int unsigned MAP_BM_W   = 6;             // gamma width
  localparam int unsigned MAP_Y_W    = 3;             // channel soft value (signed)
  localparam int unsigned MAP_LA_W   = 4;             // a-priori LLR (signed)
  localparam int unsigned MAP_GROUP_W = 3;            // bits per metric memory bank

  // Feedback bit a = u ^ D^2 ^ D^3 (13 octal), parity p = a ^ D ^ D^3 (15 octal).
  function automatic logic [MAP_M-1:0] rsc_next(input logic [MAP_M-1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[2];
    return {s[1], s[0], a};
  endfunction

  function automatic logic rsc_par(input logic [MAP_M-1:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[2];
    return a ^ s[0] ^ s[2];
  endfunction

  // ---------------- supply levels ----------------
  typedef enum logic [1:0] {
    VOS_NOM = 2'd0,   // Kv = 1, no overscaling
    VOS_H   = 2'd1,   // Kv = Kv^H
    VOS_L   = 2'd2    // Kv = Kv^L
  } vos_level_e;

  // ---------------- clock skew schedule ----------------
  typedef logic [2:0] skew_code_t;   // delay = code * 0.5 half-adder delays
  typedef skew_code_t skew_tab_t [9];

  // Viterbi ACS, sigma = 0.05 / 0.10 / 0.15
  localparam skew_tab_t VIT_SKEW_S05 = '{3'd0, 3'd1, 3'd3, 3'd3, 3'd4, 3'd6, 3'd7, 3'd7, 3'd5};
  localparam skew_tab_t VIT_SKEW_S10 = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd2};
  localparam skew_tab_t VIT_SKEW_S15 = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd5, 3'd1};
  // Max-Log-MAP ACS, sigma = 0.05 / 0.10 / 0.15
  localparam skew_tab_t MAP_SKEW_S05 = '{3'd0, 3'd1, 3'd3, 3'd4, 3'd3, 3'd6, 3'd6, 3'd7, 3'd7};
  localparam skew_tab_t MAP_SKEW_S10 = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6, 3'd6};
  localparam skew_tab_t MAP_SKEW_S15 = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd2, 3'd3, 3'd4, 3'd4, 3'd5};

endpackage
