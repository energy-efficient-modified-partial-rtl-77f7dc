// Full adder: adds three bits of the same weight.
// s is the sum bit (weight 1), c the carry bit (weight 2, the majority of the
// inputs). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic c
);
  assign s = a ^ b ^ ci;
  assign c = (a & b) | (a & ci) | (b & ci);
endmodule
