// Self-checking testbench for pp_gen: with a non-zero OFFSET every row must
// be the multiplicand shifted to the weight of its multiplier bit, or zero,
// and the rows must add up to a times the step's multiplier digit.
module tb_pp_gen;
  localparam int unsigned AW = 32, PW = 64, BITS = 4, OFF = 12;
  logic [AW-1:0] a;
  logic [BITS-1:0] b_bits;
  logic [BITS-1:0][PW-1:0] pp;
  int checks = 0, failures = 0;

  pp_gen #(.A_WIDTH(AW), .P_WIDTH(PW), .BITS(BITS), .OFFSET(OFF)) dut (
    .a(a), .b_bits(b_bits), .pp(pp));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [PW-1:0] total, expect_total, expect_row;
    #1;
    total = '0;
    for (int j = 0; j < BITS; j++) begin
      expect_row = b_bits[j] ? (PW'(a) * (64'd1 << (OFF + j))) : '0;
      checks++;
      if (pp[j] !== expect_row) begin
        failures++;
        $display("FAIL row %0d a=%h bits=%b got %h expected %h", j, a, b_bits, pp[j], expect_row);
      end
      total += pp[j];
    end
    expect_total = PW'(a) * PW'(b_bits) * (64'd1 << OFF);
    checks++;
    if (total !== expect_total) begin
      failures++;
      $display("FAIL total a=%h bits=%b got %h expected %h", a, b_bits, total, expect_total);
    end
  endtask

  initial begin
    a = '1;
    for (int d = 0; d < 16; d++) begin
      b_bits = 4'(d);
      check();
    end
    for (int i = 0; i < 200; i++) begin
      a = $urandom;
      b_bits = 4'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
