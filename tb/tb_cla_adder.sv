// Self-checking testbench for cla_adder at its default 64 bits: carry
// chains across every group (all-ones + 1), carry-in, and random operands
// are compared with a 65-bit reference addition.
module tb_cla_adder;
  localparam int unsigned W = 64;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] expect_sum;
    #1;
    expect_sum = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
    checks++;
    if ({cout, sum} !== expect_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d -> %0d_%h expected %h", a, b, cin, cout, sum, expect_sum);
    end
  endtask

  initial begin
    a = '1; b = 1;  cin = 0; check();
    a = '1; b = 0;  cin = 1; check();
    a = '1; b = '1; cin = 1; check();
    a = 0;  b = 0;  cin = 0; check();
    for (int k = 0; k < W; k++) begin
      a = '1 >> k; b = 1; cin = 0; check();
    end
    for (int i = 0; i < 1000; i++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
