// tb_complex_divider: random complex numerators and denominators through the
// pipelined complex divider. Each result is compared bit-exactly with a
// behavioural model of the number format (relay_ref.svh) and, where the
// dividend did not saturate, also with the real-valued quotient
// 2^(C+F) num / den to within a few LSBs. Latency W + C + 4 is checked.
module tb_complex_divider;
  `include "relay_ref.svh"
  localparam int unsigned NW = 20, DW = 16, W = 12, C = 6, F = 8;
  localparam int unsigned LAT = W + C + 4, NVEC = 300;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [1:0][NW-1:0] num;
  logic [1:0][DW-1:0] den;
  logic [1:0][W+C:0] quot;
  ref_cplx_t expq [NVEC];
  real       expr_re [NVEC], expr_im [NVEC];
  int checks = 0, failures = 0, approx_checks = 0;

  complex_divider #(.NW(NW), .DW(DW), .W(W), .C(C), .F(F)) dut (.clk, .rst_n, .ce, .num, .den, .quot);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    issued = 0; enabled = 0;
    num = '0; den = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int t;
        real gr, gi;
        t = enabled - LAT;
        checks++;
        if (ref_wide_t'($signed(quot[0])) != expq[t].re || ref_wide_t'($signed(quot[1])) != expq[t].im) begin
          failures++;
          if (failures < 5) $display("mismatch %0d: %0d,%0d vs %0d,%0d", t, $signed(quot[0]),
                                     $signed(quot[1]), expq[t].re, expq[t].im);
        end
        gr = real'($signed(quot[0]));
        gi = real'($signed(quot[1]));
        if (expr_re[t] * expr_re[t] + expr_im[t] * expr_im[t] < 1.5 * (2.0 ** (2 * C))) begin
          // no saturation expected: within 2% + 2 LSB of the true quotient
          checks++;
          approx_checks++;
          if ((gr - expr_re[t]) > 2.0 + 0.02 * (expr_re[t] < 0 ? -expr_re[t] : expr_re[t]) ||
              (expr_re[t] - gr) > 2.0 + 0.02 * (expr_re[t] < 0 ? -expr_re[t] : expr_re[t]) ||
              (gi - expr_im[t]) > 2.0 + 0.02 * (expr_im[t] < 0 ? -expr_im[t] : expr_im[t]) ||
              (expr_im[t] - gi) > 2.0 + 0.02 * (expr_im[t] < 0 ? -expr_im[t] : expr_im[t])) begin
            failures++;
            if (failures < 5) $display("approx %0d: %f,%f vs %f,%f", t, gr, gi, expr_re[t], expr_im[t]);
          end
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          ref_cplx_t n, dd;
          real mag2;
          den = {DW'($urandom), DW'($urandom)};
          // numerator = den * z with |z| below 2^-F, as the inversion produces;
          // every tenth one is large so that the dividend saturates
          begin
            longint zr, zi, dr, di;
            zr = longint'($urandom_range(0, 120)) - 60;
            zi = longint'($urandom_range(0, 120)) - 60;
            dr = $signed(den[0]); di = $signed(den[1]);
            num[0] = NW'((dr * zr - di * zi) >>> (F + 6));
            num[1] = NW'((dr * zi + di * zr) >>> (F + 6));
            if (issued % 10 == 5) num = {NW'($urandom), NW'($urandom)};
          end
          if (issued == 0) den = '0;
          if (issued == 1) num = '0;
          if (issued == 2) num = {2{1'b0, {(NW-1){1'b1}}}};
          n.re = $signed(num[0]); n.im = $signed(num[1]);
          dd.re = $signed(den[0]); dd.im = $signed(den[1]);
          expq[issued] = ref_div(n, dd, W, C, F);
          mag2 = real'(dd.re) * real'(dd.re) + real'(dd.im) * real'(dd.im);
          if (mag2 == 0.0) begin
            expr_re[issued] = 1.0e30; expr_im[issued] = 1.0e30;
          end else begin
            expr_re[issued] = (2.0 ** (C + F)) * (real'(n.re) * real'(dd.re) + real'(n.im) * real'(dd.im)) / mag2;
            expr_im[issued] = (2.0 ** (C + F)) * (real'(n.im) * real'(dd.re) - real'(n.re) * real'(dd.im)) / mag2;
          end
          issued++;
        end
        enabled++;
      end
    end
    if (approx_checks < 10) begin
      failures++;
      $display("too few unsaturated cases: %0d", approx_checks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
