// Self-checking testbench for hc_seq_mult at its default 32-bit width.
// Each product is started and timed: done must rise exactly WIDTH clocks
// after the edge that took start, busy must be high in between, p must equal
// a*b and hold until the next start. A start pulse while busy must be
// ignored.
module tb_hc_seq_mult;
  localparam int unsigned W = 32;
  logic clk = 0, rst_n;
  logic start, busy, done;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  hc_seq_mult dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                   .busy(busy), .done(done), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] ta, input logic [W-1:0] tb_, input bit poke);
    int lat;
    logic [2*W-1:0] expect_p;
    expect_p = (2*W)'(ta) * (2*W)'(tb_);
    a = ta; b = tb_; start = 1;
    @(posedge clk); #1;
    start = 0;
    lat = 0;
    while (!done && lat < 4 * W) begin
      checks++;
      if (!busy) begin
        failures++; $display("FAIL busy low while cycling");
      end
      if (poke && lat == 5) begin
        // a second start while busy must not disturb the product
        a = ~ta; b = ~tb_; start = 1;
      end
      @(posedge clk); #1;
      start = 0;
      lat++;
    end
    checks++;
    if (lat != W) begin
      failures++; $display("FAIL latency %0d clocks, expected %0d", lat, W);
    end
    checks++;
    if (p !== expect_p || busy) begin
      failures++; $display("FAIL %h*%h = %h expected %h", ta, tb_, p, expect_p);
    end
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (p !== expect_p || done) begin
      failures++; $display("FAIL product not held after done");
    end
  endtask

  initial begin
    rst_n = 0; start = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (busy || done) begin
      failures++; $display("FAIL reset state");
    end
    rst_n = 1;
    run('1, '1, 0);
    run(8, 2, 0);
    run(0, 32'h1234_5678, 0);
    run(32'h8000_0000, 32'h8000_0001, 1);
    for (int i = 0; i < 100; i++) run($urandom, $urandom, (i % 7) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
