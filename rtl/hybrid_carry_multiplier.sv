// Hybrid carry multiplier, top level.
//
// Two forms of the same 32 x 32 -> 64-bit unsigned multiplier stand side by
// side, each with its own ports:
//  * the pipelined form (hc_pipe_mult): eight stages, each adding the
//    partial products of four multiplier bits to the previous stage's
//    partial sum with carry-save rows and one carry-lookahead adder. The
//    stage registers are brought out as s[0..7] (s1..s8). c follows a/b by
//    STAGES clocks, one product per clock.
//  * the iterative form (hc_seq_mult): one 32-bit carry-lookahead adder and
//    a shifting accumulator, one partial product per clock, 32 clocks per
//    product, with a start/busy/done handshake.
// Both forms are described by the published design; putting them under
// one top with separate ports is this implementation's choice.
// rst_n is synchronous and active low for both.
module hybrid_carry_multiplier
  import hc_pkg::*;
#(
  parameter int unsigned WIDTH  = HC_WIDTH,
  parameter int unsigned STAGES = HC_STAGES
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // pipelined form
  input  logic                           in_valid,
  input  logic [WIDTH-1:0]               a,
  input  logic [WIDTH-1:0]               b,
  output logic                           out_valid,
  output logic [2*WIDTH-1:0]             c,
  output logic                           cout,
  output logic [STAGES-1:0][2*WIDTH-1:0] s,
  // iterative form
  input  logic                           seq_start,
  input  logic [WIDTH-1:0]               seq_a,
  input  logic [WIDTH-1:0]               seq_b,
  output logic                           seq_busy,
  output logic                           seq_done,
  output logic [2*WIDTH-1:0]             seq_p
);
  hc_pipe_mult #(
    .WIDTH (WIDTH),
    .STAGES(STAGES)
  ) u_pipe (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .b        (b),
    .out_valid(out_valid),
    .c        (c),
    .cout     (cout),
    .psum     (s)
  );

  hc_seq_mult #(.WIDTH(WIDTH)) u_seq (
    .clk  (clk),
    .rst_n(rst_n),
    .start(seq_start),
    .a    (seq_a),
    .b    (seq_b),
    .busy (seq_busy),
    .done (seq_done),
    .p    (seq_p)
  );
endmodule
