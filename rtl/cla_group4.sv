// Four-bit carry-lookahead group.
//
// From bit propagate p = a ^ b and generate g = a & b it forms every internal
// carry directly from cin (no ripple), the four sum bits, and the group
// propagate P and generate G that the next lookahead level uses.
// Combinational. Used by cla_adder.
module cla_group4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       gp,   // group propagate
  output logic       gg    // group generate
);
  logic [3:0] p, g;
  logic [3:0] c;

  assign p = a ^ b;
  assign g = a & b;

  assign c[0] = cin;
  assign c[1] = g[0] | (p[0] & cin);
  assign c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
              | (p[2] & p[1] & p[0] & cin);

  assign sum = p ^ c;
  assign gp  = &p;
  assign gg  = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
             | (p[3] & p[2] & p[1] & g[0]);
endmodule
