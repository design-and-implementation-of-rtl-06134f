// One-bit full adder: the cell from which the carry-save rows are built.
//
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The published design prefers a ten-transistor full adder circuit; that is
// a choice of cell below the level of this RTL, which gives the logic only.
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
