// tb_cma_bitwise: self-checking test of the carry-maskable adder in its
// fine-grained form, one carry mask bit per bit position: an 8-bit adder
// (a half adder at bit 0 and seven full adders) with an 8-bit mask.
//
// For each thermometer mask (mask bits 0..k-1 cleared, the rest set, k = 0..8)
// every pair of 8-bit operands is applied, and the sum must equal a + b with
// the low k bits replaced by a OR b and no carry leaving them; with k = 8 the
// sum is a OR b and the carry out is 0. Random operands with random masks are
// checked against a bit-by-bit reference model.
`timescale 1ns / 1ps
module tb_cma_bitwise;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, mask_x;
  logic [N:0]   s, want;
  int checks = 0, failures = 0;

  cma #(.N(N), .UNIT_W(1), .MASK_LAST(1)) dut (.a(a), .b(b), .mask_x(mask_x), .s(s));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bit-by-bit reference: masked bit adds (a|b) + carry, unmasked a + b + carry.
  function automatic logic [N:0] ref_sum(logic [N-1:0] x, logic [N-1:0] y, logic [N-1:0] m);
    logic [N:0] r = '0;
    logic [1:0] t;
    logic       c = 1'b0;
    for (int i = 0; i < N; i++) begin
      t = m[i] ? 2'(x[i]) + 2'(y[i]) + 2'(c) : 2'(x[i] | y[i]) + 2'(c);
      r[i] = t[0];
      c = t[1];
    end
    r[N] = c;
    return r;
  endfunction

  task automatic check(string what);
    checks++;
    if (s !== want) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s mask=%b a=%h b=%h: got %h want %h", what, mask_x, a, b, s, want);
    end
  endtask

  initial begin
    logic [N-1:0] low, hi_a, hi_b, lo_or;
    for (int k = 0; k <= N; k++) begin
      low    = N'((1 << k) - 1);
      mask_x = ~low;
      for (int i = 0; i < (1 << (2 * N)); i++) begin
        {a, b} = (2 * N)'(i);
        #1;
        hi_a  = a & ~low;
        hi_b  = b & ~low;
        lo_or = (a | b) & low;
        want  = (N+1)'(hi_a) + (N+1)'(hi_b) + (N+1)'(lo_or);
        check("thermometer");
      end
    end
    for (int i = 0; i < 50000; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      mask_x = N'($urandom);
      #1;
      want = ref_sum(a, b, mask_x);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
