// tb_channel_prep: random channel matrices H1, H2; one enabled clock later
// H_hat must equal [H1 H2] V (columns h1+h3, h2+h4, h1-h3, h2-h4) and
// H_hat_h its conjugate transpose. The expected values are computed by an
// explicit matrix product with V of eq. (8).
module tb_channel_prep;
  localparam int unsigned W = 12, LAT = 1, NVEC = 300;
  localparam int V [4][4] = '{'{1, 0, 1, 0}, '{0, 1, 0, 1}, '{1, 0, -1, 0}, '{0, 1, 0, -1}};

  logic clk = 0, rst_n = 0, ce = 0;
  logic [3:0][1:0][1:0][W-1:0] h1, h2;
  logic [3:0][3:0][1:0][W:0]   h_hat;
  logic [3:0][3:0][1:0][W+1:0] h_hat_h;
  int exp_re [NVEC][4][4], exp_im [NVEC][4][4];
  int checks = 0, failures = 0;

  channel_prep #(.W(W)) dut (.clk, .rst_n, .ce, .h1, .h2, .h_hat, .h_hat_h);

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
    h1 = '0; h2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int t;
        t = enabled - LAT;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            checks++;
            if (int'($signed(h_hat[i][j][0])) != exp_re[t][i][j] ||
                int'($signed(h_hat[i][j][1])) != exp_im[t][i][j] ||
                int'($signed(h_hat_h[j][i][0])) != exp_re[t][i][j] ||
                int'($signed(h_hat_h[j][i][1])) != -exp_im[t][i][j]) begin
              failures++;
              if (failures < 5) $display("mismatch %0d (%0d,%0d)", t, i, j);
            end
          end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          int hr [4][4], hi [4][4];
          h1 = {8{W'($urandom), W'($urandom)}};
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 2; j++) begin
              h1[i][j] = {W'($urandom), W'($urandom)};
              h2[i][j] = {W'($urandom), W'($urandom)};
              if (issued == 0) begin
                h1[i][j] = {2{1'b1, {(W-1){1'b0}}}};
                h2[i][j] = {2{1'b0, {(W-1){1'b1}}}};
              end
              hr[i][j] = $signed(h1[i][j][0]); hi[i][j] = $signed(h1[i][j][1]);
              hr[i][j+2] = $signed(h2[i][j][0]); hi[i][j+2] = $signed(h2[i][j][1]);
            end
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++) begin
              exp_re[issued][i][j] = 0; exp_im[issued][i][j] = 0;
              for (int k = 0; k < 4; k++) begin
                exp_re[issued][i][j] += hr[i][k] * V[k][j];
                exp_im[issued][i][j] += hi[i][k] * V[k][j];
              end
            end
          issued++;
        end
        enabled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
