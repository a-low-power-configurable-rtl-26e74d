// tb_cmha: exhaustive self-checking test of the carry-maskable half adder.
// All eight input combinations are applied. Expected values come from the
// half adder truth table (mask_x = 1) and from the masked behaviour
// s = a OR b, cout = 0 (mask_x = 0).
`timescale 1ns / 1ps
module tb_cmha;
  logic a, b, mask_x, s, cout;
  int checks = 0, failures = 0;

  cmha dut (.a(a), .b(b), .mask_x(mask_x), .s(s), .cout(cout));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // expected {cout, s} indexed by {mask_x, a, b}
    automatic logic [1:0] expected [8] = '{2'b00, 2'b01, 2'b01, 2'b01,   // masked: OR
                                 2'b00, 2'b01, 2'b01, 2'b10};  // exact: sum
    for (int i = 0; i < 8; i++) begin
      {mask_x, a, b} = 3'(i);
      #1;
      checks++;
      if ({cout, s} !== expected[i]) begin
        failures++;
        $display("FAIL mask_x=%0b a=%0b b=%0b: got cout=%0b s=%0b", mask_x, a, b, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
