// tb_cma_accuracy: accuracy of the 16-bit carry-maskable adder under random
// operands, for the four accuracy settings CMA1..CMA4.
//
// One million pairs of uniformly random 16-bit operands are added in each
// setting, and three error metrics are gathered against the exact sum S:
//   MED  mean of |S - S'|
//   MRED mean of |S - S'| / S      (pairs with S = 0 skipped)
//   ER   share of pairs with S' != S, in percent
// With k masked low bits the error is exactly (a AND b) over those bits, so
// for uniform operands MED = (2^k - 1) / 4 and ER = 100 * (1 - (3/4)^k).
// The run checks MED within 2 % and ER within 0.5 points of these values, an
// exact CMA4, and MRED within 35 % of the published figures (1.95e-2,
// 1.04e-3, 7.9e-5), which come from a different random input set.
`timescale 1ns / 1ps
module tb_cma_accuracy;
  import cma_pkg::*;

  localparam int unsigned N        = CMA_WIDTH;
  localparam int unsigned PATTERNS = 1_000_000;

  logic [N-1:0] a, b;
  cma_mask_t    mask_x;
  logic [N:0]   s, exact;
  int checks = 0, failures = 0;

  // published MRED per setting, in units of 1e-4
  real paper_mred [4] = '{195.14, 10.38, 0.79, 0.0};

  cma dut (.a(a), .b(b), .mask_x(mask_x), .s(s));

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_near(string what, real got, real want, real tol);
    checks++;
    if ((got - want > tol) || (want - got > tol)) begin
      failures++;
      $display("FAIL %s: got %f want %f +- %f", what, got, want, tol);
    end
  endtask

  initial begin
    real sum_ed, sum_red, med, mred, er, med_want, er_want;
    longint n_err, n_red;
    int unsigned k, ed;
    for (int setting = 0; setting < 4; setting++) begin
      mask_x  = cma_setting_mask(cma_setting_e'(setting));
      k       = (CMA_NUM_UNITS - 1 - setting) * CMA_UNIT_WIDTH;
      sum_ed  = 0.0;
      sum_red = 0.0;
      n_err   = 0;
      n_red   = 0;
      for (int i = 0; i < PATTERNS; i++) begin
        a = N'($urandom);
        b = N'($urandom);
        #1;
        exact = (N+1)'(a) + (N+1)'(b);
        ed    = (s > exact) ? int'(32'(s) - 32'(exact)) : int'(32'(exact) - 32'(s));
        sum_ed += real'(ed);
        if (ed != 0) n_err++;
        if (exact != 0) begin
          sum_red += real'(ed) / real'(exact);
          n_red++;
        end
      end
      med      = sum_ed / PATTERNS;
      mred     = sum_red / real'(n_red) * 1.0e4;
      er       = 100.0 * real'(n_err) / PATTERNS;
      med_want = (real'(64'(1) << k) - 1.0) / 4.0;
      er_want  = 100.0 * (1.0 - (0.75 ** k));
      $display("CMA%0d mask=%b  MED %9.3f (expected %9.3f)  MRED %8.3fe-4 (published %8.3fe-4)  ER %6.2f%% (expected %6.2f%%)",
               setting + 1, mask_x, med, med_want, mred, paper_mred[setting], er, er_want);
      expect_near($sformatf("CMA%0d MED", setting + 1), med, med_want, 0.02 * med_want);
      expect_near($sformatf("CMA%0d ER", setting + 1), er, er_want, 0.5);
      expect_near($sformatf("CMA%0d MRED", setting + 1), mred, paper_mred[setting],
                  0.35 * paper_mred[setting]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
