// vit_decoder: voltage-overscalable Viterbi decoder for the rate-1/2,
// 128-state convolutional code.
//
// Data path: the branch metric unit turns each received symbol (two 2-bit
// soft values) into four 3-bit branch metrics; the 128 gate-level ACS units
// update the 8-bit state metrics and emit one column of 128 decision bits per
// symbol; the survivor memory stores the decisions and traces back with the
// 3-pointer even scheme (trace-back length 56) to produce the decoded bits,
// while telling the supply circuitry which overscaling level each of its six
// banks may run at.
//
// Interface: in_valid/r0/r1 present one symbol per cycle; a cycle without
// in_valid stalls the whole decoder. rst clears the control state and loads
// the start metrics (the encoder is assumed to start in state 0).
// out_valid/out_bit deliver decoded bits in order.
// Timing: the bit of the symbol accepted at enabled cycle n leaves at enabled
// cycle n + 1 + 6*28 = n + 169 (one ACS register stage plus the survivor
// memory latency), counting only cycles with in_valid high.
// The block split follows the design description; the soft-input format,
// code polynomials, stall handshake and reset are this design's choices.
module vit_decoder
  import vos_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [VIT_SOFT_W-1:0] r0,
  input  logic [VIT_SOFT_W-1:0] r1,
  output logic                  out_valid,
  output logic                  out_bit,
  output vos_level_e            mem_lvl [6]
);

  logic [VIT_BM_W-1:0]   bm [4];
  logic [VIT_STATES-1:0] dec;
  logic [VIT_SM_W-1:0]   sm [VIT_STATES];
  logic                  dec_valid;

  vit_bmu u_bmu (.r0(r0), .r1(r1), .bm(bm));

  vit_acs_array u_acs (
    .clk  (clk),
    .en   (in_valid),
    .init (rst),
    .bm   (bm),
    .dec  (dec),
    .sm   (sm)
  );

  // The decision column of a step is written when the next symbol is accepted,
  // so a stall freezes ACS array and memory together.
  always_ff @(posedge clk) begin
    if (rst)           dec_valid <= 1'b0;
    else if (in_valid) dec_valid <= 1'b1;
  end

  vit_survivor_mem u_mem (
    .clk       (clk),
    .rst       (rst),
    .wr_en     (in_valid && dec_valid),
    .wr_dec    (dec),
    .out_valid (out_valid),
    .out_bit   (out_bit),
    .bank_lvl  (mem_lvl)
  );

endmodule
