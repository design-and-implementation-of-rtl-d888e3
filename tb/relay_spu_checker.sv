// relay_spu_checker: one configuration of the relay unit under the same
// end-to-end test as tb_relay_spu, for use by tb_relay_spu_configs.
//
// It instantiates relay_spu with the given W, C and DETECTOR (and the
// default F = 2W - C - 1), feeds NSETS random two-user channel sets with
// random clock-enable stalls and input bubbles, checks y, pnc and use_diff
// bit-exactly against the behavioural model of relay_ref.svh and the
// latency W + C + 30 (ZF) or W + C + 31 (MMSE), and counts decisions equal
// to the true x(1) (+) x(2). It reports its counts on its ports and raises
// done when finished.
module relay_spu_checker #(
  parameter int unsigned         W     = 12,
  parameter int unsigned         C     = 6,
  parameter relay_pkg::detector_e DET  = relay_pkg::DET_ZF,
  parameter int unsigned         NSETS = 40
) (
  output int checks,
  output int failures,
  output int n_correct_o,
  output int n_out_o,
  output bit done
);
  `include "relay_ref.svh"
  import relay_pkg::*;

  localparam int unsigned F = 2 * W - C - 1;
  localparam int unsigned LAT = W + C + 30 + ((DET == DET_MMSE) ? 1 : 0);
  localparam int unsigned YOW = cadd_width(4, cmul_width(cadd_width(4,
                                  cmul_width(W + C + 1, W + 2)), W)) - F;

  logic clk = 0, rst_n = 0, ce = 0, in_valid = 0;
  logic [3:0][1:0][1:0][W-1:0] h1, h2;
  logic [3:0][1:0][W-1:0] r;
  logic [2*W-1:0] sigma2;
  logic [W-1:0] gamma;
  logic out_valid;
  logic [3:0][1:0][YOW-1:0] y;
  logic [1:0] pnc, use_diff;

  relay_spu #(.W(W), .C(C), .DETECTOR(DET)) dut (
    .clk, .rst_n, .ce, .in_valid, .h1, .h2, .r, .sigma2, .gamma,
    .out_valid, .y, .pnc, .use_diff
  );

  always #5 clk = ~clk;

  typedef struct {
    ref_wide_t y_re [4];
    ref_wide_t y_im [4];
    bit        pnc [2];
    bit        diff [2];
    bit        truth [2];
    int        issue_at;
  } expect_t;

  expect_t q [$];
  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end
  int n_stall = 0, n_bubble = 0, n_sum = 0, n_diff = 0, n_out = 0, n_correct = 0;


  // Behavioural model of one input set.
  function automatic expect_t model(input logic [3:0][1:0][1:0][W-1:0] a1,
                                    input logic [3:0][1:0][1:0][W-1:0] a2,
                                    input logic [3:0][1:0][W-1:0] rv,
                                    input logic [2*W-1:0] s2, input logic [W-1:0] gm,
                                    output int unused);
    expect_t ex;
    ref_cplx_t hv [4][4], hh [4][4], kmat [4][4], inv [4][4], g [4][4];
    ref_wide_t yf_re [4], yf_im [4], e [4], thr;
    ref_cplx_t hfull [4][4];
    unused = 0;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 2; j++) begin
        hfull[i][j].re   = $signed(a1[i][j][0]); hfull[i][j].im   = $signed(a1[i][j][1]);
        hfull[i][j+2].re = $signed(a2[i][j][0]); hfull[i][j+2].im = $signed(a2[i][j][1]);
      end
    end
    // H V with V = [1 0 1 0; 0 1 0 1; 1 0 -1 0; 0 1 0 -1]
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int m0, m1;
        ref_cplx_t s;
        m0 = j % 2;          // first nonzero row of column j of V
        m1 = m0 + 2;
        s.re = hfull[i][m0].re + ((j < 2) ? hfull[i][m1].re : -hfull[i][m1].re);
        s.im = hfull[i][m0].im + ((j < 2) ? hfull[i][m1].im : -hfull[i][m1].im);
        hv[i][j] = s;
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) hh[j][i] = ref_conj(hv[i][j]);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        kmat[i][j].re = 0; kmat[i][j].im = 0;
        for (int k = 0; k < 4; k++) kmat[i][j] = ref_add(kmat[i][j], ref_mul(hh[i][k], hv[k][j]));
        if (DET == DET_MMSE && i == j) kmat[i][j].re += ref_wide_t'(s2);
      end
    ref_inverse(kmat, W, C, F, inv);
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        g[i][j].re = 0; g[i][j].im = 0;
        for (int k = 0; k < 4; k++) g[i][j] = ref_add(g[i][j], ref_mul(inv[i][k], hh[k][j]));
      end
    for (int k = 0; k < 4; k++) begin
      yf_re[k] = 0; yf_im[k] = 0; e[k] = 0;
      for (int j = 0; j < 4; j++) begin
        ref_cplx_t rr, p;
        rr.re = $signed(rv[j][0]); rr.im = $signed(rv[j][1]);
        p = ref_mul(g[k][j], rr);
        yf_re[k] += p.re; yf_im[k] += p.im;
        e[k] += g[k][j].re * g[k][j].re + g[k][j].im * g[k][j].im;
      end
      ex.y_re[k] = yf_re[k] >>> F;
      ex.y_im[k] = yf_im[k] >>> F;
    end
    thr = ref_wide_t'(gm) <<< F;
    for (int i = 0; i < 2; i++) begin
      ref_wide_t ys, yd;
      ys = (yf_re[i] < 0) ? -yf_re[i] : yf_re[i];
      yd = (yf_re[i+2] < 0) ? -yf_re[i+2] : yf_re[i+2];
      ex.diff[i] = !(e[i] < e[i+2]);
      ex.pnc[i]  = ex.diff[i] ? (yd <= thr) : (ys >= thr);
    end
    return ex;
  endfunction

  // Output checker.
  int enabled = 0;

  initial begin
    int issued;
    real amp;
    issued = 0;
    h1 = '0; h2 = '0; r = '0;
    sigma2 = '0;
    gamma = W'(int'(0.3536 * (2.0 ** C)));      // half of the noiseless |y| of 1/sqrt 2
    amp = 2.0 ** (W - 3);
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_out < NSETS) begin
      @(negedge clk);
      // ---- check the output shown after the last edge
      if (out_valid && ce) begin   // a new output only after an enabled edge
        expect_t ex;
        if (q.size() == 0) begin
          failures++;
          $display("out_valid with nothing expected");
        end else begin
          ex = q.pop_front();
          checks++;
          if (enabled - ex.issue_at != LAT) begin
            failures++;
            $display("latency %0d, expected %0d", enabled - ex.issue_at, LAT);
          end
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (ref_wide_t'($signed(y[k][0])) != ex.y_re[k] || ref_wide_t'($signed(y[k][1])) != ex.y_im[k]) begin
              failures++;
              if (failures < 6) $display("y[%0d] %0d,%0d expected %0d,%0d", k, $signed(y[k][0]),
                                         $signed(y[k][1]), ex.y_re[k], ex.y_im[k]);
            end
          end
          for (int i = 0; i < 2; i++) begin
            checks++;
            if (pnc[i] != ex.pnc[i] || use_diff[i] != ex.diff[i]) begin
              failures++;
              if (failures < 6) $display("decision %0d: pnc %0b/%0b diff %0b/%0b", i, pnc[i], ex.pnc[i],
                                         use_diff[i], ex.diff[i]);
            end
            if (use_diff[i]) n_diff++; else n_sum++;
            if (pnc[i] == ex.truth[i]) n_correct++;
          end
          n_out++;
        end
      end
      // ---- drive the next inputs
      ce = ($urandom_range(0, 9) != 0);
      if (!ce) n_stall++;
      if (ce) begin
        in_valid = (issued < NSETS) && ($urandom_range(0, 4) != 0);
        if (issued < NSETS && !in_valid) n_bubble++;
        // random channel, symbols and received vector (also when not valid)
        begin
          int x1 [2], x2 [2];
          real hr [4][4], hi [4][4];
          expect_t ex;
          int unused;
          for (int j = 0; j < 2; j++) begin
            x1[j] = $urandom_range(0, 1) ? 1 : -1;
            x2[j] = $urandom_range(0, 1) ? 1 : -1;
          end
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) begin
              hr[i][j] = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * amp;
              hi[i][j] = (real'($urandom_range(0, 2000)) / 1000.0 - 1.0) * amp;
              if (j < 2) begin
                h1[i][j][0] = W'($rtoi(hr[i][j])); h1[i][j][1] = W'($rtoi(hi[i][j]));
                hr[i][j] = real'($signed(h1[i][j][0])); hi[i][j] = real'($signed(h1[i][j][1]));
              end else begin
                h2[i][j-2][0] = W'($rtoi(hr[i][j])); h2[i][j-2][1] = W'($rtoi(hi[i][j]));
                hr[i][j] = real'($signed(h2[i][j-2][0])); hi[i][j] = real'($signed(h2[i][j-2][1]));
              end
            end
          for (int i = 0; i < 4; i++) begin
            real sr, si;
            sr = 0.0; si = 0.0;
            for (int j = 0; j < 4; j++) begin
              real xv;
              xv = real'((j < 2) ? x1[j] : x2[j-2]);
              sr += hr[i][j] * xv;
              si += hi[i][j] * xv;
            end
            sr = sr / $sqrt(2.0) + (real'($urandom_range(0, 200)) - 100.0) / 100.0 * 4.0;
            si = si / $sqrt(2.0) + (real'($urandom_range(0, 200)) - 100.0) / 100.0 * 4.0;
            r[i][0] = W'($rtoi(sr));
            r[i][1] = W'($rtoi(si));
          end
          // about 8 times the noise variance of r: the 1/sqrt 2 and the factor 2
          // in H_hat scale the Gram matrix by 8 relative to eq. (11)
          sigma2 = (DET == DET_MMSE) ? (2*W)'($urandom_range(0, 200)) : '0;
          if (in_valid) begin
            ex = model(h1, h2, r, sigma2, gamma, unused);
            for (int j = 0; j < 2; j++) ex.truth[j] = (x1[j] == x2[j]);
            ex.issue_at = enabled;
            q.push_back(ex);
            issued++;
          end
        end
        enabled++;
      end
    end
    $display("stalls %0d, bubbles %0d, sum-stream %0d, difference-stream %0d",
             n_stall, n_bubble, n_sum, n_diff);
    $display("decisions equal to x1 xor-symbol x2: %0d of %0d", n_correct, 2 * n_out);
    checks += 5;
    if (n_stall == 0) failures++;
    if (n_bubble == 0) failures++;
    if (n_sum == 0) failures++;
    if (n_diff == 0) failures++;
    if (n_correct * 10 < 2 * n_out * 8) begin
      failures++;
      $display("too few correct decisions");
    end
    $display("W=%0d C=%0d %s: checks %0d failures %0d", W, C, (DET == DET_MMSE) ? "MMSE" : "ZF", checks, failures);
    n_correct_o = n_correct;
    n_out_o = n_out;
    done = 1;
  end
endmodule
