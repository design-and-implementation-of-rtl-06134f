// Iterative hybrid carry multiplier: one WIDTH-bit adder cycled WIDTH times.
//
// This is the small-area form of the design. A 2*WIDTH-bit accumulator
// register holds the running partial sum in its upper half and the
// not-yet-used multiplier bits in its lower half. Every clock the
// carry-lookahead adder adds the multiplicand (if the lowest multiplier bit
// is 1, else zero) to the upper half, and the whole register, with the
// adder's carry out on top, shifts right by one so the sum lines up with the
// next partial product. After WIDTH such steps the register holds a*b.
//
// Interface and timing: start is sampled on a rising edge while busy is
// low; a and b are captured then. busy stays high for the WIDTH step clocks;
// done pulses for one clock, WIDTH clocks after the edge that took start,
// and p then holds the product until the next start. start is ignored while
// busy. rst_n is synchronous and active low.
// One partial product per step, a single n-bit adder, the shift after each
// step and a carry-lookahead adder for the accumulation follow the published
// design; the start/busy/done handshake is this implementation's choice.
module hc_seq_mult
  import hc_pkg::*;
#(
  parameter int unsigned WIDTH = HC_WIDTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [WIDTH-1:0]     a,
  input  logic [WIDTH-1:0]     b,
  output logic                 busy,
  output logic                 done,
  output logic [2*WIDTH-1:0]   p
);
  localparam int unsigned CW = $clog2(WIDTH);

  logic [WIDTH-1:0]   mcand;
  logic [2*WIDTH-1:0] acc;
  logic [CW-1:0]      step;
  logic [WIDTH-1:0]   addend;
  logic [WIDTH-1:0]   add_sum;
  logic               add_cout;

  assign addend = acc[0] ? mcand : '0;

  cla_adder #(.WIDTH(WIDTH)) u_cla (
    .a   (acc[2*WIDTH-1:WIDTH]),
    .b   (addend),
    .cin (1'b0),
    .sum (add_sum),
    .cout(add_cout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      mcand <= '0;
      acc   <= '0;
      step  <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        acc  <= {add_cout, add_sum, acc[WIDTH-1:1]};
        step <= step + 1'b1;
        if (step == CW'(WIDTH - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        mcand <= a;
        acc   <= {{WIDTH{1'b0}}, b};
        step  <= '0;
        busy  <= 1'b1;
      end
    end
  end

  assign p = acc;

  a_done_idle : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
