// Carry-save (3:2) row: WIDTH full adders in parallel.
//
// Three words x, y, z become a sum word and a carry word with no carry
// propagation between bit positions, so the delay is one full adder whatever
// WIDTH is. The carry word is returned already aligned to its weight (shifted
// left by one, bit 0 = 0) and the carry out of the top bit is dropped, so
// sum + carry == x + y + z modulo 2**WIDTH. Combinational.
// Building carry-save adders from full-adder cells follows the published
// design; the in-row shift and the modulo result are this implementation's.
module csa_row #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  logic [WIDTH-1:0] c_raw;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (z[i]),
      .s   (sum[i]),
      .cout(c_raw[i])
    );
  end

  assign carry = {c_raw[WIDTH-2:0], 1'b0};

  // c_raw[WIDTH-1] has weight 2**WIDTH and is dropped on purpose.
  logic unused_top_carry;
  assign unused_top_carry = c_raw[WIDTH-1];
endmodule
