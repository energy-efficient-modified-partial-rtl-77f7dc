// Half adder: adds two bits of the same weight.
// s is the sum bit (weight 1), c the carry bit (weight 2). Combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
