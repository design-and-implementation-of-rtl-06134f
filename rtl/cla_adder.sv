// Carry-lookahead adder, WIDTH bits.
//
// The word is cut into 4-bit cla_group4 groups. Each group resolves its own
// carries by lookahead and reports group propagate/generate; the carry into
// group k+1 is G[k] | P[k] & c[k], so a carry crosses a whole group through
// one AND-OR instead of four full adders. Combinational:
// sum = a + b + cin, cout = carry out of the top bit.
// The published design calls for a carry-lookahead adder as the fast
// accumulating adder; the 4-bit grouping is this implementation's choice.
// WIDTH must be a multiple of 4.
module cla_adder
  import hc_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NGRP = WIDTH / CLA_GROUP;

  if (WIDTH % CLA_GROUP != 0) begin : g_bad
    $error("cla_adder WIDTH must be a multiple of 4");
  end

  logic [NGRP:0]   gc;   // carry into each group
  logic [NGRP-1:0] gp, gg;

  assign gc[0] = cin;

  for (genvar k = 0; k < NGRP; k++) begin : g_grp
    cla_group4 u_grp (
      .a  (a[k*CLA_GROUP +: CLA_GROUP]),
      .b  (b[k*CLA_GROUP +: CLA_GROUP]),
      .cin(gc[k]),
      .sum(sum[k*CLA_GROUP +: CLA_GROUP]),
      .gp (gp[k]),
      .gg (gg[k])
    );
    assign gc[k+1] = gg[k] | (gp[k] & gc[k]);
  end

  assign cout = gc[NGRP];
endmodule
