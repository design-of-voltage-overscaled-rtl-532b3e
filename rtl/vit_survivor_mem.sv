// vit_survivor_mem: decision-bit (survivor) memory of the Viterbi decoder,
// managed with the 3-pointer even trace-back scheme, plus the dynamic
// voltage-overscaling (VOS) level of each memory bank.
//
// Organisation: NB = 6 banks of D = L/2 columns, one column holding the
// STATES decision bits of one trellis step. One column is written per
// enabled cycle, so the write pointer fills one bank per "period" of D
// cycles. Three read pointers run one read per cycle each, in three roles
// that rotate at every period boundary. With b the bank being written:
//   * trace-back, first half : bank b-1, starting from state 0 at its newest
//     column (the start state is arbitrary);
//   * trace-back, second half: bank b-3 (the bank read in the previous period
//     by the first-half pointer was b-2 then, so this is the bank just
//     older than it), continuing that pointer's path, so
//     L = 2*D steps of trace-back precede any decoded bit;
//   * decode                 : bank b-5, continuing the same path and
//     emitting one decoded bit per column.
// Banks b-2 and b-4 are idle, waiting for their next reader. Each bank is
// read by at most one pointer per cycle (single-ported banks).
// A trace-back step at column c in state s outputs s[0] (the input bit of that
// trellis step) and moves to state {dec[c][s], s[6:1]}.
//
// Dynamic VOS: a bank being written or decoded runs at VOS_NOM (Kv = 1); a
// bank in the second half of trace-back runs at VOS_H; every other bank,
// idle ones included, at VOS_L. The levels are outputs for the supply
// circuitry.
//
// Decoded bits come out of the decode pointer newest first. A pair of D-bit
// buffers reverses them: the bits decoded in one period are output in
// order during the next one.
//
// What follows the design description: the three phases (write, trace back,
// decode), the 3-pointer even scheme, L = 56 and the three-level dynamic VOS
// rule. This design's choices: the bank count and size (2k banks of
// L/(k-1) columns with k = 3 pointers), starting each trace-back in state 0,
// the output reversal buffers, the handshake (a column is accepted whenever
// wr_en is high; everything else advances with it) and synchronous reset.
//
// Timing: the decision column written at cycle c of some period leaves as
// out_bit 6*D enabled cycles later. out_valid rises once six periods have
// been written after reset. Reads are asynchronous, writes synchronous.
module vit_survivor_mem
  import vos_pkg::*;
#(
  parameter int unsigned STATES = VIT_STATES,
  parameter int unsigned TB_LEN = VIT_TB_LEN
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wr_en,               // accept a decision column
  input  logic [STATES-1:0] wr_dec,              // decisions of one trellis step
  output logic              out_valid,
  output logic              out_bit,             // decoded bit, in trellis order
  output vos_level_e        bank_lvl [6]          // supply level of each bank
);

  localparam int unsigned NB  = 6;
  localparam int unsigned D   = TB_LEN / 2;
  localparam int unsigned SW  = $clog2(STATES);
  localparam int unsigned CW  = $clog2(D);

  logic [STATES-1:0] mem [NB][D];

  logic [2:0]    wb;                 // bank being written
  logic [CW-1:0] wc;                 // column being written
  logic [2:0]    nwrit;              // completed periods, saturates at 6
  logic [SW-1:0] st_a, st_b, st_c;   // trace states: first half, second half, decode
  logic [D-1:0]  rev_buf [2];
  logic          rbuf;               // buffer filled this period
  logic          buf_ok [2];         // buffer holds valid decoded bits

  function automatic logic [2:0] bank_minus(input logic [2:0] b, input int unsigned k);
    return 3'((int'(b) + NB - k) % NB);
  endfunction

  logic [2:0]    ba, bb, bc;
  logic [CW-1:0] rc;
  logic          da, db, dc;
  logic [SW-1:0] st_a_n, st_b_n, st_c_n;
  logic          last_col;

  assign ba = bank_minus(wb, 1);
  assign bb = bank_minus(wb, 3);
  assign bc = bank_minus(wb, 5);
  assign rc = CW'(D - 1) - wc;
  assign last_col = (wc == CW'(D - 1));

  assign da = mem[ba][rc][st_a];
  assign db = mem[bb][rc][st_b];
  assign dc = mem[bc][rc][st_c];
  assign st_a_n = {da, st_a[SW-1:1]};
  assign st_b_n = {db, st_b[SW-1:1]};
  assign st_c_n = {dc, st_c[SW-1:1]};

  always_ff @(posedge clk) begin
    if (wr_en) mem[wb][wc] <= wr_dec;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wb     <= '0;
      wc     <= '0;
      nwrit  <= '0;
      st_a   <= '0;
      st_b   <= '0;
      st_c   <= '0;
      rbuf   <= 1'b0;
      buf_ok <= '{1'b0, 1'b0};
    end else if (wr_en) begin
      rev_buf[rbuf][rc] <= st_c[0];
      if (last_col) begin
        wc     <= '0;
        wb     <= (wb == 3'(NB - 1)) ? '0 : wb + 3'd1;
        if (nwrit != 3'(NB)) nwrit <= nwrit + 3'd1;
        // roles rotate: a new trace-back starts, the others move on
        st_a   <= '0;
        st_b   <= st_a_n;
        st_c   <= st_b_n;
        buf_ok[rbuf] <= (nwrit >= 3'd5);
        rbuf   <= ~rbuf;
      end else begin
        wc     <= wc + CW'(1);
        st_a   <= st_a_n;
        st_b   <= st_b_n;
        st_c   <= st_c_n;
      end
    end
  end

  // The buffer filled in the previous period is read in trellis order.
  assign out_bit   = rev_buf[~rbuf][wc];
  assign out_valid = wr_en && buf_ok[~rbuf];

  always_comb begin
    for (int k = 0; k < NB; k++) bank_lvl[k] = VOS_L;
    bank_lvl[wb] = VOS_NOM;   // write
    bank_lvl[bc] = VOS_NOM;   // decode
    bank_lvl[bb] = VOS_H;     // second half of trace-back
    bank_lvl[ba] = VOS_L;     // first half of trace-back
  end

endmodule
