// Self-checking testbench for csa_array at its default five operands of
// 64 bits: random and all-ones operand sets; sum + carry must equal the
// sum of the operands modulo 2**64.
module tb_csa_array;
  localparam int unsigned N = 5;
  localparam int unsigned W = 64;
  logic [N-1:0][W-1:0] ops;
  logic [W-1:0] sum, carry;
  int checks = 0, failures = 0;

  csa_array dut (.ops(ops), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] ref_sum;
    #1;
    ref_sum = '0;
    for (int i = 0; i < N; i++) ref_sum += ops[i];
    checks++;
    if (W'(sum + carry) !== ref_sum) begin
      failures++;
      $display("FAIL sum=%h carry=%h expected total %h", sum, carry, ref_sum);
    end
  endtask

  initial begin
    ops = '1; check();
    ops = '0; check();
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) ops[i] = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
