// Self-checking testbench for full_adder: all eight input combinations are
// applied and sum/carry are compared with the arithmetic sum a+b+cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] expect_sum;
      {a, b, cin} = 3'(v);
      #1;
      expect_sum = 2'(a) + 2'(b) + 2'(cin);
      checks++;
      if ({cout, s} !== expect_sum) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> cout=%0d s=%0d", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
