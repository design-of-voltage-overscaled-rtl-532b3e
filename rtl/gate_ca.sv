// gate_ca: one-bit carry-only adder cell of the ACS comparator. It produces
// only the carry-out of a + b + ci (majority function); the sum is never
// needed because only the sign of the difference is used. Combinational.
module gate_ca (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co
);
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
