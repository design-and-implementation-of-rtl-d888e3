// tb_matrix_inverse: random complex 4 x 4 matrices through matrix_inverse.
// Every element is compared bit-exactly with the cofactor/Leibniz reference
// model (relay_ref.svh) W + C + 16 enabled clocks after the matrix entered.
// For diagonally dominant matrices the product A * A^-1 is also formed in
// real arithmetic and must be close to the identity, which checks the
// transposition, the cofactor signs and the scaling independently of the
// number-format model.
module tb_matrix_inverse;
  `include "relay_ref.svh"
  localparam int unsigned N = 4, EW = 12, W = 12, C = 8, F = 8;
  localparam int unsigned LAT = relay_pkg::det_latency(N) + W + C + 4;
  localparam int unsigned NVEC = 60;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [N-1:0][N-1:0][1:0][EW-1:0] a;
  logic [N-1:0][N-1:0][1:0][W+C:0]  a_inv;
  ref_cplx_t expq [NVEC][4][4];
  real       am_re [NVEC][4][4], am_im [NVEC][4][4];
  bit        dominant [NVEC];
  int checks = 0, failures = 0, ident_checks = 0;

  matrix_inverse #(.N(N), .EW(EW), .W(W), .C(C), .F(F)) dut (.clk, .rst_n, .ce, .a, .a_inv);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    if (LAT != W + C + 16) begin
      $display("latency formula differs from W + C + 16");
    end
    issued = 0; enabled = 0;
    a = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int t;
        t = enabled - LAT;
        for (int n = 0; n < 4; n++)
          for (int m = 0; m < 4; m++) begin
            checks++;
            if (ref_wide_t'($signed(a_inv[n][m][0])) != expq[t][n][m].re ||
                ref_wide_t'($signed(a_inv[n][m][1])) != expq[t][n][m].im) begin
              failures++;
              if (failures < 5) $display("mismatch %0d (%0d,%0d): %0d,%0d vs %0d,%0d", t, n, m,
                                         $signed(a_inv[n][m][0]), $signed(a_inv[n][m][1]),
                                         expq[t][n][m].re, expq[t][n][m].im);
            end
          end
        if (dominant[t]) begin
          for (int n = 0; n < 4; n++)
            for (int m = 0; m < 4; m++) begin
              real pr, pi;
              pr = 0.0; pi = 0.0;
              for (int k = 0; k < 4; k++) begin
                real br, bi;
                br = real'($signed(a_inv[k][m][0])) / (2.0 ** (C + F));
                bi = real'($signed(a_inv[k][m][1])) / (2.0 ** (C + F));
                pr += am_re[t][n][k] * br - am_im[t][n][k] * bi;
                pi += am_re[t][n][k] * bi + am_im[t][n][k] * br;
              end
              checks++;
              ident_checks++;
              if ((pr - ((n == m) ? 1.0 : 0.0)) > 0.1 || (((n == m) ? 1.0 : 0.0) - pr) > 0.1 ||
                  pi > 0.1 || pi < -0.1) begin
                failures++;
                if (failures < 5) $display("A*inv(A) %0d (%0d,%0d) = %f,%f", t, n, m, pr, pi);
              end
            end
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          ref_cplx_t am [4][4];
          dominant[issued] = issued[0];
          for (int n = 0; n < 4; n++)
            for (int m = 0; m < 4; m++) begin
              if (dominant[issued]) begin
                a[n][m][0] = EW'(int'($urandom_range(0, 200)) - 100);
                a[n][m][1] = EW'(int'($urandom_range(0, 200)) - 100);
                if (n == m) begin
                  a[n][m][0] = EW'(int'($urandom_range(600, 900)) * ((issued % 4 == 1) ? 1 : -1));
                  a[n][m][1] = EW'(int'($urandom_range(0, 100)));
                end
              end else begin
                a[n][m] = {EW'($urandom), EW'($urandom)};
              end
              am[n][m].re = $signed(a[n][m][0]);
              am[n][m].im = $signed(a[n][m][1]);
              am_re[issued][n][m] = real'($signed(a[n][m][0]));
              am_im[issued][n][m] = real'($signed(a[n][m][1]));
            end
          ref_inverse(am, W, C, F, expq[issued]);
          issued++;
        end
        enabled++;
      end
    end
    if (ident_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
