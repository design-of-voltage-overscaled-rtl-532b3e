// map_llr: soft-output unit of the Max-Log-MAP decoder.
//
// For trellis step k it forms, for each of the 16 branches (state s, input u),
// the total  alpha_k(s) + gamma_k(u, p(s,u)) + beta_{k+1}(next(s,u))  in
// 9-bit modulo arithmetic, takes the largest total among the u = 1 branches
// and among the u = 0 branches, and outputs their difference as a 9-bit
// two's-complement LLR (positive favours u = 1). With the doubled branch
// metric of map_bmu this is twice the usual Max-Log-MAP LLR. Comparisons use
// the sign of the modulo difference, exactly as the ACS comparator does,
// which is correct while all totals of one step lie within 256 of each other
// (the metric spread of this 8-state code with 0..32 branch metrics keeps
// them within 3*32 + 3*32 + 32). The description names the soft output only;
// the structure is the plain Max-Log-MAP formula. Purely combinational.
module map_llr
  import vos_pkg::*;
(
  input  logic        [MAP_SM_W-1:0] alpha [MAP_STATES],
  input  logic        [MAP_SM_W-1:0] beta  [MAP_STATES],   // beta_{k+1}
  input  logic        [MAP_BM_W-1:0] gamma [4],            // indexed by {u, p}
  output logic signed [MAP_SM_W-1:0] llr
);
  function automatic logic [MAP_SM_W-1:0] mod_max(input logic [MAP_SM_W-1:0] a,
                                                   input logic [MAP_SM_W-1:0] b);
    logic [MAP_SM_W-1:0] d;
    d = a - b;
    return d[MAP_SM_W-1] ? b : a;
  endfunction

  logic [MAP_SM_W-1:0] best [2];
  logic [MAP_SM_W-1:0] tot;
  logic [MAP_M-1:0]    ns;
  logic                p;

  always_comb begin
    best[0] = '0;
    best[1] = '0;
    tot     = '0;
    ns      = '0;
    p       = 1'b0;
    for (int u = 0; u < 2; u++) begin
      for (int s = 0; s < MAP_STATES; s++) begin
        ns  = rsc_next(MAP_M'(s), u[0]);
        p   = rsc_par(MAP_M'(s), u[0]);
        tot = alpha[s] + MAP_SM_W'(gamma[{u[0], p}]) + beta[ns];
        best[u] = (s == 0) ? tot : mod_max(best[u], tot);
      end
    end
    llr = signed'(best[1] - best[0]);
  end
endmodule
