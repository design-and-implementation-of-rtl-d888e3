// tb_selective_decision: random weight matrices G, received vectors r and
// thresholds gamma. Five enabled clocks later y must equal (G r) >> F, and
// each PNC bit must follow eq. (17): the sum stream decides with
// |y_i| >= gamma when its noise gain (G G^H)_ii is the smaller one, the
// difference stream decides with |y_k| <= gamma otherwise. Both branches must
// be taken.
module tb_selective_decision;
  localparam int unsigned GW = 20, RW = 10, GAW = 8, F = 6, LAT = 5, NVEC = 400;
  localparam int unsigned YW  = relay_pkg::cadd_width(4, relay_pkg::cmul_width(GW, RW));
  localparam int unsigned YOW = YW - F;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [3:0][3:0][1:0][GW-1:0] g;
  logic [3:0][1:0][RW-1:0] r;
  logic [GAW-1:0] gamma;
  logic [3:0][1:0][YOW-1:0] y;
  logic [1:0] pnc, use_diff;
  longint exp_y [NVEC][4][2];
  bit exp_pnc [NVEC][2], exp_diff [NVEC][2];
  int checks = 0, failures = 0, n_sum = 0, n_diff = 0;

  selective_decision #(.GW(GW), .RW(RW), .GAW(GAW), .F(F)) dut (
    .clk, .rst_n, .ce, .g, .r, .gamma, .y, .pnc, .use_diff
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    issued = 0; enabled = 0;
    g = '0; r = '0; gamma = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int t;
        t = enabled - LAT;
        for (int k = 0; k < 4; k++)
          for (int p = 0; p < 2; p++) begin
            checks++;
            if (longint'($signed(y[k][p])) != exp_y[t][k][p]) begin
              failures++;
              if (failures < 5) $display("y mismatch %0d (%0d,%0d)", t, k, p);
            end
          end
        for (int i = 0; i < 2; i++) begin
          checks++;
          if (pnc[i] != exp_pnc[t][i] || use_diff[i] != exp_diff[t][i]) begin
            failures++;
            if (failures < 5) $display("decision mismatch %0d stream %0d", t, i);
          end
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          longint yf [4][2];
          longint e [4];
          for (int k = 0; k < 4; k++) begin
            r[k] = {RW'($urandom), RW'($urandom)};
            for (int j = 0; j < 4; j++) begin
              g[k][j] = {GW'($urandom), GW'($urandom)};
              if ($urandom_range(0, 1) == 1) g[k][j] = {GW'($signed(g[k][j][1]) >>> 8), GW'($signed(g[k][j][0]) >>> 8)};
            end
          end
          gamma = GAW'($urandom);
          for (int k = 0; k < 4; k++) begin
            yf[k][0] = 0; yf[k][1] = 0; e[k] = 0;
            for (int j = 0; j < 4; j++) begin
              longint gr, gi, rr, ri;
              gr = $signed(g[k][j][0]); gi = $signed(g[k][j][1]);
              rr = $signed(r[j][0]);    ri = $signed(r[j][1]);
              yf[k][0] += gr * rr - gi * ri;
              yf[k][1] += gr * ri + gi * rr;
              e[k] += gr * gr + gi * gi;
            end
            exp_y[issued][k][0] = yf[k][0] >>> F;
            exp_y[issued][k][1] = yf[k][1] >>> F;
          end
          // place a tie on the threshold now and then
          if (issued % 7 == 3) gamma = GAW'((yf[0][0] < 0 ? -yf[0][0] : yf[0][0]) >>> F);
          for (int i = 0; i < 2; i++) begin
            longint ys, yd, thr;
            thr = longint'(gamma) <<< F;
            ys = (yf[i][0] < 0) ? -yf[i][0] : yf[i][0];
            yd = (yf[i+2][0] < 0) ? -yf[i+2][0] : yf[i+2][0];
            if (e[i] < e[i+2]) begin
              exp_diff[issued][i] = 0;
              exp_pnc[issued][i]  = (ys - thr >= 0);   // sign(|y_s| - gamma), sign(0) = +1
              n_sum++;
            end else begin
              exp_diff[issued][i] = 1;
              exp_pnc[issued][i]  = (thr - yd >= 0);   // sign(gamma - |y_d|)
              n_diff++;
            end
          end
          issued++;
        end
        enabled++;
      end
    end
    if (n_sum == 0 || n_diff == 0) failures++;
    $display("sum-stream decisions %0d, difference-stream decisions %0d", n_sum, n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
