// Partial-product generator for one step of the multiplier.
//
// Row j is the multiplicand a if multiplier bit b_bits[j] is 1 and zero
// otherwise, shifted left by OFFSET + j so that it sits at the weight of
// that multiplier bit inside the P_WIDTH-bit product. Combinational.
// Generating plain (radix-2) partial products per step follows the
// published design; grouping BITS multiplier bits per step is this
// implementation's choice.
module pp_gen #(
  parameter int unsigned A_WIDTH = 32,
  parameter int unsigned P_WIDTH = 64,
  parameter int unsigned BITS    = 4,
  parameter int unsigned OFFSET  = 0
) (
  input  logic [A_WIDTH-1:0]            a,
  input  logic [BITS-1:0]               b_bits,
  output logic [BITS-1:0][P_WIDTH-1:0]  pp
);
  if (OFFSET + BITS - 1 + A_WIDTH > P_WIDTH) begin : g_bad
    $error("pp_gen: partial products do not fit in P_WIDTH");
  end

  for (genvar j = 0; j < BITS; j++) begin : g_row
    logic [P_WIDTH-1:0] a_ext;
    assign a_ext = P_WIDTH'(a);
    assign pp[j] = b_bits[j] ? (a_ext << (OFFSET + j)) : '0;
  end
endmodule
