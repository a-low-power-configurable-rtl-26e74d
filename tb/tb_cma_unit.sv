// tb_cma_unit: exhaustive self-checking test of the sub adder unit.
// Two 4-bit units are tested side by side: an ordinary one (CMFAs only) and
// the bottom one of an adder (FIRST = 1, CMHA at bit 0, cin ignored). Every
// combination of a, b, cin and mask_x is applied. Expected values:
//   mask_x = 1 : a + b + cin      (cin taken as 0 for the bottom unit)
//   mask_x = 0 : (a OR b) + cin   (cin taken as 0 for the bottom unit)
`timescale 1ns / 1ps
module tb_cma_unit;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, s_mid, s_first;
  logic cin, mask_x, c_mid, c_first;
  logic [W:0] exp_mid, exp_first;
  int checks = 0, failures = 0;

  cma_unit #(.W(W), .FIRST(0)) dut_mid (
    .a(a), .b(b), .cin(cin), .mask_x(mask_x), .s(s_mid), .cout(c_mid));
  cma_unit #(.W(W), .FIRST(1)) dut_first (
    .a(a), .b(b), .cin(cin), .mask_x(mask_x), .s(s_first), .cout(c_first));

  initial begin : watchdog
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 2)); i++) begin
      {mask_x, cin, a, b} = (2 * W + 2)'(i);
      #1;
      if (mask_x) begin
        exp_mid   = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
        exp_first = (W+1)'(a) + (W+1)'(b);
      end else begin
        exp_mid   = (W+1)'(a | b) + (W+1)'(cin);
        exp_first = (W+1)'(a | b);
      end
      checks++;
      if ({c_mid, s_mid} !== exp_mid) begin
        failures++;
        $display("FAIL mid mask_x=%0b cin=%0b a=%h b=%h: got %h want %h",
                 mask_x, cin, a, b, {c_mid, s_mid}, exp_mid);
      end
      checks++;
      if ({c_first, s_first} !== exp_first) begin
        failures++;
        $display("FAIL first mask_x=%0b cin=%0b a=%h b=%h: got %h want %h",
                 mask_x, cin, a, b, {c_first, s_first}, exp_first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
