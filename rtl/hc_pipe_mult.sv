// Pipelined hybrid carry multiplier.
//
// STAGES hc_stage instances are cascaded. Stage k (k = 1..STAGES) adds the
// partial products of multiplier bits [(k-1)*BITS +: BITS], BITS =
// WIDTH/STAGES, to the partial sum of stage k-1 and registers the result in
// psum[k-1] (the s1..s8 of the default configuration). The first stage
// starts from a zero partial sum; the last stage's register is the product.
//
// Interface and timing: a, b and in_valid are sampled on a rising edge;
// the product of that pair appears on c with out_valid exactly STAGES clocks
// later. A new pair may enter on every clock (throughput one product per
// clock); clocks with in_valid low travel through as bubbles. cout is the
// carry out of the last stage's adder and is 0 for every unsigned product.
// rst_n is synchronous and active low.
// Eight stages of 64-bit partial sums for 32-bit operands follow the
// published design; assigning four multiplier bits to each stage and the
// valid bit are this implementation's choices.
module hc_pipe_mult
  import hc_pkg::*;
#(
  parameter int unsigned WIDTH  = HC_WIDTH,
  parameter int unsigned STAGES = HC_STAGES
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic [WIDTH-1:0]                    a,
  input  logic [WIDTH-1:0]                    b,
  output logic                                out_valid,
  output logic [2*WIDTH-1:0]                  c,
  output logic                                cout,
  output logic [STAGES-1:0][2*WIDTH-1:0]      psum
);
  localparam int unsigned BITS = WIDTH / STAGES;

  if (WIDTH % STAGES != 0) begin : g_bad
    $error("hc_pipe_mult: WIDTH must be a multiple of STAGES");
  end

  logic [STAGES:0]                 v;
  logic [STAGES:0][WIDTH-1:0]      pa, pb;
  logic [STAGES:0][2*WIDTH-1:0]    ps;
  logic [STAGES-1:0]               pc;

  assign v[0]  = in_valid;
  assign pa[0] = a;
  assign pb[0] = b;
  assign ps[0] = '0;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    hc_stage #(
      .A_WIDTH(WIDTH),
      .P_WIDTH(2*WIDTH),
      .BITS   (BITS),
      .OFFSET (k*BITS)
    ) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[k]),
      .in_a     (pa[k]),
      .in_b     (pb[k]),
      .in_psum  (ps[k]),
      .out_valid(v[k+1]),
      .out_a    (pa[k+1]),
      .out_b    (pb[k+1]),
      .out_psum (ps[k+1]),
      .out_cout (pc[k])
    );
    assign psum[k] = ps[k+1];
  end

  assign out_valid = v[STAGES];
  assign c         = ps[STAGES];
  assign cout      = pc[STAGES-1];

  // The operands that leave the last stage are not needed any more.
  logic unused_tail;
  assign unused_tail = ^{pa[STAGES], pb[STAGES], pc};

  // Unsigned products never overflow 2*WIDTH bits.
  a_no_cout : assert property (@(posedge clk) disable iff (!rst_n) !cout);
endmodule
