// Self-checking testbench for csa_row: random and corner words; the check
// is that sum + carry equals x + y + z modulo 2**WIDTH, that carry bit 0 is
// zero, and that the row is carry-free (sum is the bitwise XOR).
module tb_csa_row;
  localparam int unsigned W = 64;
  logic [W-1:0] x, y, z, sum, carry;
  int checks = 0, failures = 0;

  csa_row #(.WIDTH(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    #1;
    checks++;
    if (W'(sum + carry) !== W'(x + y + z) || carry[0] !== 1'b0 || sum !== (x ^ y ^ z)) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h sum=%h carry=%h", x, y, z, sum, carry);
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; check();
    x = '0; y = '0; z = '0; check();
    x = '1; y = 1;  z = 0;  check();
    for (int i = 0; i < 500; i++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      z = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
