// tb_cmfa: exhaustive self-checking test of the carry-maskable full adder.
// All sixteen input combinations are applied. With mask_x = 1 the result must
// be a + b + cin; with mask_x = 0 it must be (a OR b) + cin, which is
// s = a OR b, cout = 0 when cin = 0.
`timescale 1ns / 1ps
module tb_cmfa;
  logic a, b, cin, mask_x, s, cout;
  logic [1:0] expected;
  int checks = 0, failures = 0;

  cmfa dut (.a(a), .b(b), .cin(cin), .mask_x(mask_x), .s(s), .cout(cout));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {mask_x, cin, a, b} = 4'(i);
      #1;
      if (mask_x) expected = 2'(a) + 2'(b) + 2'(cin);
      else        expected = 2'(a | b) + 2'(cin);
      checks++;
      if ({cout, s} !== expected) begin
        failures++;
        $display("FAIL mask_x=%0b cin=%0b a=%0b b=%0b: got %b want %b",
                 mask_x, cin, a, b, {cout, s}, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
