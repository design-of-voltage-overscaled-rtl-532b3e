// map_bmu: branch metric (gamma) unit of the Max-Log-MAP decoder.
//
// Inputs are the soft values of the systematic bit ys and of the parity bit
// yp (3-bit two's complement, positive favours '1') and the a-priori LLR la
// of the information bit (4-bit two's complement). For each branch label
// {u, p} the unit outputs
//     gamma = (u ? +(ys + la) : -(ys + la)) + (p ? +yp : -yp) + 16,
// i.e. twice the usual Max-Log-MAP branch metric plus an offset that makes it
// non-negative (0..32, 6 bits), so that it can be added to the state metrics
// by the same unsigned ripple-carry adders as in the Viterbi ACS unit. The
// common offset does not change any decision or LLR. All widths and the metric
// form are this design's choice; the description gives only the 9-bit state
// metric. Purely combinational: gamma[{u,p}].
module map_bmu
  import vos_pkg::*;
(
  input  logic signed [MAP_Y_W-1:0]  ys,
  input  logic signed [MAP_Y_W-1:0]  yp,
  input  logic signed [MAP_LA_W-1:0] la,
  output logic        [MAP_BM_W-1:0] gamma [4]
);
  logic signed [7:0] su, sp;

  always_comb begin
    su = 8'(ys) + 8'(la);
    sp = 8'(yp);
    for (int w = 0; w < 4; w++) begin
      gamma[w] = MAP_BM_W'((w[1] ? su : -su) + (w[0] ? sp : -sp) + 8'sd16);
    end
  end
endmodule
