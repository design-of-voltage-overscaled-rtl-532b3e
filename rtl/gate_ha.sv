// gate_ha: one-bit half adder cell of the ACS unit. Combinational:
// sum = a ^ b, carry = a & b.
module gate_ha (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  assign s  = a ^ b;
  assign co = a & b;
endmodule
