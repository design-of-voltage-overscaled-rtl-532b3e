// map_decoder: Max-Log-MAP soft-in/soft-out decoder for one block of the
// 8-state recursive systematic constituent code of a rate-1/3 Turbo code.
//
// Schedule (one trellis step per cycle):
//   LOAD: the block's N symbols (ys, yp, la) arrive one per in_valid cycle.
//         Each is stored in a symbol buffer, the forward ACS array takes one
//         step, and the forward metrics alpha_k that the step started from
//         are written to the partitioned state metric memory at address k.
//   BWD : for k = N-1 down to 0 the symbol is read back, the backward ACS
//         array steps from beta_{k+1} to beta_k, and the soft-output unit
//         combines alpha_k (read from the metric memory), gamma_k and
//         beta_{k+1} into LLR_k. One LLR leaves per cycle, in reverse order,
//         tagged with its index.
// After the last LLR the decoder is ready for the next block. in_ready is
// high during LOAD; symbols offered in BWD are not taken.
//
// The decomposition (ACS-based forward and backward recursions, a state
// metric memory whose 9-bit entries are split into three 3-bit banks with
// their own supply levels, soft output from the stored metrics) follows the
// design description. Block length N, the whole-block (non-windowed)
// schedule, reverse-order output, soft-value widths and the handshake are
// this design's choices.
//
// Timing: a block takes N accepted symbols plus N cycles; LLR of index N-1
// appears in the first BWD cycle, index 0 in the N-th. The LLR is twice the
// usual Max-Log-MAP value (see map_bmu), 9-bit two's complement.
module map_decoder
  import vos_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [MAP_Y_W-1:0]   ys,
  input  logic signed [MAP_Y_W-1:0]   yp,
  input  logic signed [MAP_LA_W-1:0]  la,
  output logic                        llr_valid,
  output logic [$clog2(N)-1:0]        llr_idx,
  output logic signed [MAP_SM_W-1:0]  llr,
  output vos_level_e                  mem_lvl [3]   // H (MSBs), M, L (LSBs) bank levels
);
  localparam int unsigned AW = $clog2(N);
  localparam int unsigned YW = 2*MAP_Y_W + MAP_LA_W;

  typedef enum logic {S_LOAD, S_BWD} state_e;
  state_e st;

  logic [AW-1:0] k;
  logic [YW-1:0] symbuf [N];
  logic [YW-1:0] sym_rd;

  logic signed [MAP_Y_W-1:0]  b_ys, b_yp;
  logic signed [MAP_LA_W-1:0] b_la;
  logic [MAP_BM_W-1:0]        gamma [4];
  logic [MAP_SM_W-1:0]        alpha [MAP_STATES];
  logic [MAP_SM_W-1:0]        beta  [MAP_STATES];
  logic [MAP_SM_W-1:0]        alpha_rd [MAP_STATES];

  logic take, fwd_init, bwd_init, last;

  assign in_ready = (st == S_LOAD);
  assign take     = in_valid && in_ready;
  assign last     = (k == AW'(N - 1));
  assign sym_rd   = symbuf[k];

  // one branch metric unit, fed by the input while loading, by the buffer after
  always_comb begin
    if (st == S_LOAD) begin
      b_ys = ys; b_yp = yp; b_la = la;
    end else begin
      {b_ys, b_yp, b_la} = sym_rd;
    end
  end

  map_bmu u_bmu (.ys(b_ys), .yp(b_yp), .la(b_la), .gamma(gamma));

  assign fwd_init = rst || (st == S_BWD && k == '0);
  assign bwd_init = rst || (take && last);

  map_acs_array #(.BACKWARD(1'b0)) u_fwd (
    .clk(clk), .en(take), .init(fwd_init), .gamma(gamma), .sm(alpha));

  map_acs_array #(.BACKWARD(1'b1)) u_bwd (
    .clk(clk), .en(st == S_BWD), .init(bwd_init), .gamma(gamma), .sm(beta));

  map_metric_mem #(.DEPTH(N)) u_mem (
    .clk   (clk),
    .we    (take),
    .waddr (k),
    .wdata (alpha),
    .raddr (k),
    .rdata (alpha_rd),
    .lvl_h (mem_lvl[0]),
    .lvl_m (mem_lvl[1]),
    .lvl_l (mem_lvl[2])
  );

  map_llr u_llr (.alpha(alpha_rd), .beta(beta), .gamma(gamma), .llr(llr));

  assign llr_valid = (st == S_BWD);
  assign llr_idx   = k;

  always_ff @(posedge clk) begin
    if (take) symbuf[k] <= {ys, yp, la};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_LOAD;
      k  <= '0;
    end else if (st == S_LOAD) begin
      if (take) begin
        if (last) st <= S_BWD;
        else      k  <= k + AW'(1);
      end
    end else begin
      if (k == '0) st <= S_LOAD;
      else         k  <= k - AW'(1);
    end
  end

endmodule
