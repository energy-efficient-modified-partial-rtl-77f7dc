// Exact 4-2 compressor.
//
// Adds four bits x1..x4 of weight 1 and a carry-in cin from the slice to its
// right: x1+x2+x3+x4+cin = sum + 2*(carry + cout).  It is built from two
// full adders: the first adds x1, x2, x3 and gives cout, which does not
// depend on cin, so a row of these slices has no rippling carry; the second
// adds the first sum, x4 and cin and gives sum and carry.  sum is the parity
// of all five inputs.  cout goes to the cin of the slice one column to the
// left, carry to the next reduction stage one column to the left.
// Combinational.  The full-adder structure follows the source; a
// gate-optimised version (XOR-XNOR gates and multiplexers) computes the same
// function and is not reproduced.
module exact_compressor42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),  .s(s1),  .c(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(cin), .s(sum), .c(carry));
endmodule
