// tb_cma: end-to-end self-checking test of the 16-bit carry-maskable adder
// at its default parameters (four 4-bit sub adder units, 3 mask bits).
//
// For every one of the eight mask words it applies directed corner operands
// and random operands, and compares the sum with a unit-by-unit reference:
// an unmasked unit adds a + b + carry, a masked unit adds (a OR b) + carry,
// and the carry out of one unit is the carry into the next. For the four
// accuracy settings CMA1..CMA4 (thermometer masks) it also checks the closed
// form exact_sum - approx_sum == a AND b over the masked low bits.
// It counts how often each mechanism occurs (carry masked in a unit, an
// approximate sum that differs from the exact one, carry out of the top,
// a masked unit receiving a carry from an unmasked one below it) and counts
// a failure for any that never occurs.
`timescale 1ns / 1ps
module tb_cma;
  import cma_pkg::*;

  localparam int unsigned N  = CMA_WIDTH;
  localparam int unsigned UW = CMA_UNIT_WIDTH;
  localparam int unsigned NU = CMA_NUM_UNITS;
  localparam int unsigned RANDOM_PER_MASK = 20000;

  logic [N-1:0] a, b;
  cma_mask_t    mask_x;
  logic [N:0]   s;
  int checks = 0, failures = 0;
  int n_masked_carry = 0, n_approx_err = 0, n_top_carry = 0, n_carry_into_masked = 0;
  int n_setting [4] = '{0, 0, 0, 0};

  cma dut (.a(a), .b(b), .mask_x(mask_x), .s(s));

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Unit-by-unit reference model; also reports mechanism occurrences.
  function automatic logic [N:0] ref_sum(logic [N-1:0] x, logic [N-1:0] y, cma_mask_t m,
                                         output bit masked_carry, output bit carry_into_masked);
    logic [N:0]    r = '0;
    logic          c = 1'b0;
    logic [UW:0]   t;
    logic [UW-1:0] xu, yu;
    masked_carry = 0;
    carry_into_masked = 0;
    for (int unsigned k = 0; k < NU; k++) begin
      xu = x[k*UW +: UW];
      yu = y[k*UW +: UW];
      if (k < NU - 1 && !m[k]) begin
        if ((xu & yu) != '0) masked_carry = 1;
        if (c) carry_into_masked = 1;
        t = (UW+1)'(xu | yu) + (UW+1)'(c);
      end else begin
        t = (UW+1)'(xu) + (UW+1)'(yu) + (UW+1)'(c);
      end
      r[k*UW +: UW] = t[UW-1:0];
      c = t[UW];
    end
    r[N] = c;
    return r;
  endfunction

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0]   want, exact;
    bit           mc, cim;
    int           setting;
    logic [N-1:0] low;
    a = x;
    b = y;
    #1;
    want = ref_sum(x, y, mask_x, mc, cim);
    checks++;
    if (s !== want) begin
      failures++;
      if (failures < 10)
        $display("FAIL mask=%b a=%h b=%h: got %h want %h", mask_x, x, y, s, want);
    end
    exact = (N+1)'(x) + (N+1)'(y);
    if (mc) n_masked_carry++;
    if (cim) n_carry_into_masked++;
    if (s !== exact) n_approx_err++;
    if (s[N]) n_top_carry++;
    // closed-form error for the accuracy settings
    setting = -1;
    for (int i = 0; i < 4; i++)
      if (mask_x == cma_setting_mask(cma_setting_e'(i))) setting = i;
    if (setting >= 0) begin
      n_setting[setting]++;
      low = N'((1 << ((NU - 1 - setting) * UW)) - 1);
      checks++;
      if (exact - s !== {1'b0, x & y & low}) begin
        failures++;
        if (failures < 10)
          $display("FAIL CMA%0d a=%h b=%h: error %h want %h", setting + 1, x, y, exact - s,
                   x & y & low);
      end
    end
  endtask

  initial begin
    for (int m = 0; m < (1 << CMA_MASK_BITS); m++) begin
      mask_x = cma_mask_t'(m);
      apply('0, '0);
      apply('1, '1);
      apply('1, 16'h0001);
      apply(16'h0fff, 16'h0001);
      apply(16'h5555, 16'haaaa);
      apply(16'h00ff, 16'h00ff);
      for (int i = 0; i < RANDOM_PER_MASK; i++)
        apply(N'($urandom), N'($urandom));
    end
    for (int i = 0; i < 4; i++)
      if (n_setting[i] == 0) begin
        failures++;
        $display("FAIL setting CMA%0d never applied", i + 1);
      end
    if (n_masked_carry == 0)      begin failures++; $display("FAIL no carry was masked"); end
    if (n_approx_err == 0)        begin failures++; $display("FAIL no approximate sum"); end
    if (n_top_carry == 0)         begin failures++; $display("FAIL no carry out of the top"); end
    if (n_carry_into_masked == 0) begin failures++; $display("FAIL no carry into a masked unit"); end
    $display("settings CMA1..4 applied %0d %0d %0d %0d times", n_setting[0], n_setting[1],
             n_setting[2], n_setting[3]);
    $display("carry masked %0d, approximate sums %0d, top carry out %0d, carry into masked unit %0d",
             n_masked_carry, n_approx_err, n_top_carry, n_carry_into_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
