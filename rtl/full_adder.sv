// One-bit full adder: the cell of the carry-save shift accumulator.
// The filter's accumulator is meant to be built from a 10-transistor full
// adder cell; at the logic level that cell is an ordinary full adder, which
// is what this module describes. s = a ^ b ^ cin, cout = majority(a, b, cin).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
