// Self-checking testbench for hc_pipe_mult at its default size (32-bit
// operands, eight stages). Operand pairs, with random bubbles, enter on
// every clock; each product must come out exactly STAGES clocks later with
// out_valid, equal to a*b, and cout must stay 0. The partial-sum register of
// each stage is checked against the product of the multiplier bits that
// stage and those before it have consumed.
module tb_hc_pipe_mult;
  localparam int unsigned W = 32, ST = 8, BITS = W / ST;
  logic clk = 0, rst_n;
  logic in_valid, out_valid, cout;
  logic [W-1:0] a, b;
  logic [2*W-1:0] c;
  logic [ST-1:0][2*W-1:0] psum;
  int checks = 0, failures = 0;
  int cycle = 0;

  hc_pipe_mult dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                    .out_valid(out_valid), .c(c), .cout(cout), .psum(psum));

  always #5 clk = ~clk;

  // Record what entered on every clock, indexed by cycle number.
  logic          hv [0:4095];
  logic [W-1:0]  ha [0:4095];
  logic [W-1:0]  hb [0:4095];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n_prod = 0;
    rst_n = 0; in_valid = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (cycle = 0; cycle < 3000; cycle++) begin
      // drive
      if (cycle < 2900) begin
        in_valid = ($urandom % 4) != 0;
        case (cycle)
          0: begin a = '1; b = '1; end
          1: begin a = 8; b = 2; end
          2: begin a = 0; b = '1; end
          default: begin a = $urandom; b = $urandom; end
        endcase
      end else begin
        in_valid = 0;
      end
      hv[cycle] = in_valid; ha[cycle] = a; hb[cycle] = b;
      @(posedge clk); #1;
      // check the stage registers against what entered k+1 clocks ago
      for (int k = 0; k < ST; k++) begin
        int src;
        src = cycle - k;
        if (src >= 0) begin
          logic [2*W-1:0] part;
          logic [W-1:0] mask;
          mask = W'((64'd1 << ((k + 1) * BITS)) - 1);
          part = (2*W)'(ha[src]) * (2*W)'(hb[src] & mask);
          checks++;
          if (psum[k] !== part) begin
            failures++;
            $display("FAIL cycle %0d s%0d=%h expected %h", cycle, k + 1, psum[k], part);
          end
        end
      end
      if (cycle >= ST - 1) begin
        int src;
        src = cycle - (ST - 1);
        checks++;
        if (out_valid !== hv[src] || cout !== 1'b0 ||
            (hv[src] && c !== (2*W)'(ha[src]) * (2*W)'(hb[src]))) begin
          failures++;
          $display("FAIL cycle %0d c=%h valid=%0d expected %h valid=%0d",
                   cycle, c, out_valid, (2*W)'(ha[src]) * (2*W)'(hb[src]), hv[src]);
        end
        if (out_valid) n_prod++;
      end else begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid before the pipeline filled (cycle %0d)", cycle);
        end
      end
    end
    checks++;
    if (n_prod < 1000) begin
      failures++;
      $display("FAIL only %0d products seen", n_prod);
    end
    $display("products %0d", n_prod);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
