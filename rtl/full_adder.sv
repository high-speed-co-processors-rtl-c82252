// One-bit full adder: {co, s} = a + b + ci. Used as the [3:2] counter of the BSD adders
// and of the decimal carry-save adders.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);
endmodule
