// End-to-end testbench for hybrid_carry_multiplier at its default size
// (32-bit operands, eight pipeline stages), no parameter overrides.
//
// The pipelined form is fed a stream of operand pairs with random bubbles;
// every product must leave c exactly eight clocks after it entered. At the
// same time the iterative form computes its own products through the
// start/busy/done handshake and must finish each in 32 clocks. Both results
// are compared with a*b. The mechanisms of the design are counted and each
// must occur at least once:
//   back-to-back   products on consecutive clocks (full throughput)
//   bubble         a clock without a product between products
//   full pipe      eight products in flight at once
//   seq product    an iterative product finished
//   seq ignored    a start pulse while busy, ignored
//   both active    both forms working on the same clock
// The first pair is the 8 x 2 example of the published waveform.
module tb_hybrid_carry_multiplier;
  localparam int unsigned W = 32, ST = 8;
  logic clk = 0, rst_n;
  logic in_valid, out_valid, cout;
  logic [W-1:0] a, b;
  logic [2*W-1:0] c;
  logic [ST-1:0][2*W-1:0] s;
  logic seq_start, seq_busy, seq_done;
  logic [W-1:0] seq_a, seq_b;
  logic [2*W-1:0] seq_p;
  int checks = 0, failures = 0;

  hybrid_carry_multiplier dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .a(a), .b(b), .out_valid(out_valid), .c(c), .cout(cout), .s(s),
    .seq_start(seq_start), .seq_a(seq_a), .seq_b(seq_b),
    .seq_busy(seq_busy), .seq_done(seq_done), .seq_p(seq_p));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pipelined-form scoreboard: expected products in order, with entry cycle
  logic [2*W-1:0] q_prod [$];
  int             q_time [$];

  int n_b2b = 0, n_bubble = 0, n_full = 0, n_seq = 0, n_ignored = 0, n_both = 0, n_pipe = 0;
  int cyc = 0;
  int in_flight = 0;
  bit last_out = 0, gap_seen = 0;

  // iterative-form bookkeeping
  logic [2*W-1:0] seq_expect;
  int  seq_t0;
  bit  seq_pending = 0;

  initial begin
    rst_n = 0; in_valid = 0; a = 0; b = 0; seq_start = 0; seq_a = 0; seq_b = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 0; cyc < 4000; cyc++) begin
      // drive the pipelined form
      if (cyc < 3950) begin
        if (cyc < 40) in_valid = 1;                 // long burst: fills the pipe
        else in_valid = ($urandom % 3) != 0;
        if (cyc == 0) begin a = 8; b = 2; end
        else if (cyc == 1) begin a = '1; b = '1; end
        else begin a = $urandom; b = $urandom; end
      end else in_valid = 0;
      if (in_valid) begin
        q_prod.push_back((2*W)'(a) * (2*W)'(b));
        q_time.push_back(cyc);
      end
      // products in the pipe during the coming clock, the new one included
      if (q_prod.size() >= ST) n_full++;
      // drive the iterative form
      seq_start = 0;
      if (!seq_busy && !seq_pending && cyc < 3900) begin
        seq_start = 1;
        seq_a = (cyc == 0) ? 32'd8 : $urandom;
        seq_b = (cyc == 0) ? 32'd2 : $urandom;
        seq_expect = (2*W)'(seq_a) * (2*W)'(seq_b);
        seq_t0 = cyc;
        seq_pending = 1;
      end else if (seq_busy && ($urandom % 16) == 0) begin
        seq_start = 1;                               // must be ignored
        seq_a = $urandom; seq_b = $urandom;
        n_ignored++;
      end

      @(posedge clk); #1;

      if (seq_busy && in_flight > 0) n_both++;
      // pipelined-form outputs
      checks++;
      if (cout !== 1'b0) begin
        failures++; $display("FAIL cout set at cycle %0d", cyc);
      end
      if (out_valid) begin
        checks++;
        if (q_prod.size() == 0) begin
          failures++; $display("FAIL unexpected product at cycle %0d", cyc);
        end else begin
          logic [2*W-1:0] e;
          int t;
          e = q_prod.pop_front();
          t = q_time.pop_front();
          if (c !== e || cyc - t != ST - 1) begin
            failures++;
            $display("FAIL cycle %0d c=%h expected %h (entered cycle %0d)", cyc, c, e, t);
          end
        end
        n_pipe++;
        if (last_out) n_b2b++;
        if (gap_seen) n_bubble++;
        gap_seen = 0;
      end else if (n_pipe > 0) gap_seen = 1;
      last_out = out_valid;
      in_flight = q_prod.size();
      // iterative-form outputs
      if (seq_done) begin
        checks++;
        if (!seq_pending || seq_p !== seq_expect || cyc - seq_t0 != W) begin
          failures++;
          $display("FAIL iterative product %h expected %h after %0d clocks", seq_p, seq_expect, cyc - seq_t0);
        end
        seq_pending = 0;
        n_seq++;
      end
    end
    checks++;
    if (q_prod.size() != 0) begin
      failures++; $display("FAIL %0d products never came out", q_prod.size());
    end
    if (seq_pending) begin
      repeat (W + 2) @(posedge clk);
    end
    $display("pipelined products %0d, back-to-back %0d, after bubble %0d, pipe full %0d",
             n_pipe, n_b2b, n_bubble, n_full);
    $display("iterative products %0d, starts ignored while busy %0d, both active %0d",
             n_seq, n_ignored, n_both);
    checks += 6;
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back products"); end
    if (n_bubble == 0)  begin failures++; $display("FAIL no bubble"); end
    if (n_full == 0)    begin failures++; $display("FAIL pipeline never full"); end
    if (n_seq == 0)     begin failures++; $display("FAIL no iterative product"); end
    if (n_ignored == 0) begin failures++; $display("FAIL no start while busy"); end
    if (n_both == 0)    begin failures++; $display("FAIL forms never active together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
