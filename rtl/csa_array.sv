// Carry-save adder array: reduces OPERANDS words to two.
//
// A linear chain of csa_row rows: the first row takes ops[0..2], every
// further row folds one more operand into the running (sum, carry) pair, so
// OPERANDS-2 rows are used and no carry travels along a word. The two
// outputs still have to be added by a carry-propagate adder; in this design
// that is the carry-lookahead adder of the stage. Combinational; results are
// modulo 2**WIDTH.
// Carry-save reduction follows the published design; the linear shape of
// the array is this implementation's choice.
module csa_array #(
  parameter int unsigned OPERANDS = 5,
  parameter int unsigned WIDTH    = 64
) (
  input  logic [OPERANDS-1:0][WIDTH-1:0] ops,
  output logic [WIDTH-1:0]               sum,
  output logic [WIDTH-1:0]               carry
);
  if (OPERANDS < 2) begin : g_bad
    $error("csa_array needs at least two operands");
  end else if (OPERANDS == 2) begin : g_pass
    assign sum   = ops[0];
    assign carry = ops[1];
  end else begin : g_rows
    localparam int unsigned ROWS = OPERANDS - 2;
    logic [ROWS:0][WIDTH-1:0] s_chain;
    logic [ROWS:0][WIDTH-1:0] c_chain;

    assign s_chain[0] = ops[0];
    assign c_chain[0] = ops[1];

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      csa_row #(.WIDTH(WIDTH)) u_row (
        .x    (s_chain[r]),
        .y    (c_chain[r]),
        .z    (ops[r+2]),
        .sum  (s_chain[r+1]),
        .carry(c_chain[r+1])
      );
    end

    assign sum   = s_chain[ROWS];
    assign carry = c_chain[ROWS];
  end
endmodule
