// vit_bmu: branch metric unit of the Viterbi decoder.
//
// Each received symbol carries two soft values, one per code bit, quantized to
// SOFT_W = 2 bits: 0 means a confident '0', 3 a confident '1'. For each of the
// four possible code words {c1, c0} the unit outputs the correlation metric
// sum_i (c_i ? r_i : 3 - r_i), range 0..6, which fits the 3-bit branch metric
// of the ACS units. A larger metric means a better match, which is why the
// ACS units keep the larger path metric. The description fixes only the 3-bit
// branch metric width; the soft-input format and the correlation metric are
// this design's choice. Purely combinational: bm[w] is the metric of code word w.
module vit_bmu
  import vos_pkg::*;
(
  input  logic [VIT_SOFT_W-1:0] r0,          // soft value of code bit c0
  input  logic [VIT_SOFT_W-1:0] r1,          // soft value of code bit c1
  output logic [VIT_BM_W-1:0]   bm [4]       // metric of code word {c1, c0}
);
  localparam logic [VIT_SOFT_W-1:0] RMAX = '1;

  always_comb begin
    for (int w = 0; w < 4; w++) begin
      bm[w] = VIT_BM_W'(w[0] ? r0 : RMAX - r0) + VIT_BM_W'(w[1] ? r1 : RMAX - r1);
    end
  end
endmodule
