// One stage of the pipelined hybrid carry multiplier.
//
// The stage forms BITS partial products from multiplier bits
// in_b[OFFSET +: BITS] (pp_gen), reduces them together with the incoming
// partial sum to a sum word and a carry word in a carry-save array
// (csa_array), and resolves that pair with one carry-lookahead addition
// (cla_adder). This mix of carry-save accumulation and one carry-lookahead
// add per stage is the "hybrid carry" of the design. The result, the
// operands and the valid bit are registered, so the stage adds one clock of
// latency and accepts new data every clock.
//
// Interface: in_* are sampled on the rising clock edge; out_* appear one
// clock later. out_cout is the carry out of the stage's adder; it stays 0
// while the partial sum fits in P_WIDTH bits, which it always does for
// unsigned operands. rst_n is synchronous and active low and clears every
// register.
// The per-step generate/add/shift scheme and the registers between stages
// follow the published design; BITS, the linear carry-save array and the
// valid bit are this implementation's choices.
module hc_stage #(
  parameter int unsigned A_WIDTH = 32,
  parameter int unsigned P_WIDTH = 64,
  parameter int unsigned BITS    = 4,
  parameter int unsigned OFFSET  = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [A_WIDTH-1:0] in_a,
  input  logic [A_WIDTH-1:0] in_b,
  input  logic [P_WIDTH-1:0] in_psum,
  output logic               out_valid,
  output logic [A_WIDTH-1:0] out_a,
  output logic [A_WIDTH-1:0] out_b,
  output logic [P_WIDTH-1:0] out_psum,
  output logic               out_cout
);
  logic [BITS-1:0][P_WIDTH-1:0] pp;
  logic [BITS:0][P_WIDTH-1:0]   ops;
  logic [P_WIDTH-1:0]           cs_sum, cs_carry;
  logic [P_WIDTH-1:0]           new_psum;
  logic                         new_cout;

  pp_gen #(
    .A_WIDTH(A_WIDTH),
    .P_WIDTH(P_WIDTH),
    .BITS   (BITS),
    .OFFSET (OFFSET)
  ) u_pp (
    .a     (in_a),
    .b_bits(in_b[OFFSET +: BITS]),
    .pp    (pp)
  );

  assign ops = {pp, in_psum};

  csa_array #(
    .OPERANDS(BITS + 1),
    .WIDTH   (P_WIDTH)
  ) u_csa (
    .ops  (ops),
    .sum  (cs_sum),
    .carry(cs_carry)
  );

  cla_adder #(.WIDTH(P_WIDTH)) u_cla (
    .a   (cs_sum),
    .b   (cs_carry),
    .cin (1'b0),
    .sum (new_psum),
    .cout(new_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_a     <= '0;
      out_b     <= '0;
      out_psum  <= '0;
      out_cout  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_a     <= in_a;
      out_b     <= in_b;
      out_psum  <= new_psum;
      out_cout  <= new_cout;
    end
  end
endmodule
