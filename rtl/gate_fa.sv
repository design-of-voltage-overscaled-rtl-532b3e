// gate_fa: one-bit full adder cell, one of the five basic cells the ACS unit
// is built from. Purely combinational: sum = a ^ b ^ ci, co = majority(a, b, ci).
module gate_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
