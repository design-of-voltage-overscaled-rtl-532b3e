// acs_unit: gate-level add-compare-select (ACS) unit of a trellis decoder.
//
// Two candidate path metrics are formed by adding a branch metric to each of
// two predecessor state metrics with ripple-carry adders: full adders for the
// low BM_W bits (the first one with carry-in 0) and half adders for the rest,
// the carry out of the top bit dropped, so metrics wrap modulo 2**SM_W. A
// chain of carry-only cells with carry-in "1" and a full adder at the top
// computes the sign bit of (path0 - path1) = path0 + ~path1 + 1. That sign bit
// is the decision: 1 means path1 is larger (in modulo arithmetic), and it
// drives the 2:1 multiplexer that selects the survivor, so the larger metric
// survives. Survivor and decision are registered.
//
// This cell arrangement, the widths (8-bit state metric, 3-bit branch metric
// for the Viterbi decoder; 9-bit metric for the Max-Log-MAP decoder) and the
// decision flip-flop that only the Viterbi decoder keeps follow the design
// description. Choosing the larger metric, where the inverters of path1 sit,
// the synchronous initial-value load and the clock enable are this design's
// own choices. Modulo compare is correct while the spread of all metrics of
// one trellis step stays below 2**(SM_W-1).
//
// Timing: one ACS step per enabled clock edge; sm_q and dec_q are valid the
// cycle after the inputs. init has priority over en and loads init_val.
// When STORE_DEC is 0 the decision flip-flop is absent and dec_q reads 0.
module acs_unit #(
  parameter int unsigned SM_W      = 8,
  parameter int unsigned BM_W      = 3,
  parameter bit          STORE_DEC = 1'b1
) (
  input  logic            clk,
  input  logic            en,
  input  logic            init,
  input  logic [SM_W-1:0] init_val,
  input  logic [SM_W-1:0] sm0,     // metric of predecessor 0
  input  logic [BM_W-1:0] bm0,     // branch metric from predecessor 0
  input  logic [SM_W-1:0] sm1,     // metric of predecessor 1
  input  logic [BM_W-1:0] bm1,     // branch metric from predecessor 1
  output logic [SM_W-1:0] sm_d,    // survivor metric before the register
  output logic            dec_d,   // decision before the register
  output logic [SM_W-1:0] sm_q,    // registered survivor metric
  output logic            dec_q    // registered decision bit
);

  logic [SM_W-1:0] p0, p1;         // candidate path metrics
  logic [SM_W:0]   c0, c1;         // adder carries
  logic [SM_W-1:0] cc;             // comparator carries, cc[i] into bit i
  logic            sign;
  logic            unused_top;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b0;

  for (genvar i = 0; i < SM_W; i++) begin : g_add
    if (i < BM_W) begin : g_fa
      gate_fa u_fa0 (.a(sm0[i]), .b(bm0[i]), .ci(c0[i]), .s(p0[i]), .co(c0[i+1]));
      gate_fa u_fa1 (.a(sm1[i]), .b(bm1[i]), .ci(c1[i]), .s(p1[i]), .co(c1[i+1]));
    end else begin : g_ha
      gate_ha u_ha0 (.a(sm0[i]), .b(c0[i]), .s(p0[i]), .co(c0[i+1]));
      gate_ha u_ha1 (.a(sm1[i]), .b(c1[i]), .s(p1[i]), .co(c1[i+1]));
    end
  end

  // Comparator: carry chain of path0 + ~path1 + 1, full adder on the MSB.
  assign cc[0] = 1'b1;
  for (genvar i = 0; i < SM_W - 1; i++) begin : g_cmp
    gate_ca u_ca (.a(p0[i]), .b(~p1[i]), .ci(cc[i]), .co(cc[i+1]));
  end
  gate_fa u_msb (.a(p0[SM_W-1]), .b(~p1[SM_W-1]), .ci(cc[SM_W-1]), .s(sign), .co(unused_top));

  assign dec_d = sign;
  assign sm_d  = sign ? p1 : p0;   // 2:1 multiplexer

  always_ff @(posedge clk) begin
    if (init)    sm_q <= init_val;
    else if (en) sm_q <= sm_d;
  end

  if (STORE_DEC) begin : g_dec
    always_ff @(posedge clk) begin
      if (init)    dec_q <= 1'b0;
      else if (en) dec_q <= dec_d;
    end
  end else begin : g_nodec
    assign dec_q = 1'b0;
  end

endmodule
