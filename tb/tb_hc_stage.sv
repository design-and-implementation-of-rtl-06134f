// Self-checking testbench for hc_stage (OFFSET = 8, four bits per stage).
// A new random operand set enters on every clock; one clock later
// out_psum must equal in_psum + a * b[11:8] * 2**8, the operands and the
// valid bit must be passed on, and out_cout must be 0. Reset must clear
// out_valid.
module tb_hc_stage;
  localparam int unsigned AW = 32, PW = 64, BITS = 4, OFF = 8;
  logic clk = 0, rst_n;
  logic in_valid, out_valid, out_cout;
  logic [AW-1:0] in_a, in_b, out_a, out_b;
  logic [PW-1:0] in_psum, out_psum;
  int checks = 0, failures = 0;

  hc_stage #(.A_WIDTH(AW), .P_WIDTH(PW), .BITS(BITS), .OFFSET(OFF)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_a(in_a), .in_b(in_b),
    .in_psum(in_psum), .out_valid(out_valid), .out_a(out_a), .out_b(out_b),
    .out_psum(out_psum), .out_cout(out_cout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PW-1:0] expect_psum;
    logic [AW-1:0] ea, eb;
    logic ev;
    rst_n = 0; in_valid = 1; in_a = '1; in_b = '1; in_psum = '1;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0 || out_psum !== '0) begin
      failures++; $display("FAIL reset did not clear the stage");
    end
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      in_valid = 1'($urandom);
      in_a = (i < 4) ? '1 : $urandom;
      in_b = (i < 4) ? '1 : $urandom;
      in_psum = (i < 4) ? {1'b0, {(PW-1){1'b1}}} - (PW'(in_a) << (OFF + BITS))
                        : {1'b0, $urandom, 31'($urandom)};
      expect_psum = in_psum + PW'(in_a) * PW'(in_b[OFF +: BITS]) * (64'd1 << OFF);
      ea = in_a; eb = in_b; ev = in_valid;
      @(posedge clk); #1;
      checks++;
      if (out_psum !== expect_psum || out_a !== ea || out_b !== eb || out_valid !== ev
          || out_cout !== 1'b0) begin
        failures++;
        $display("FAIL i=%0d psum=%h expected %h cout=%0d", i, out_psum, expect_psum, out_cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
