// tb_matrix_mult: random complex 4 x 4 by 4 x 4 products and 4 x 4 by 4 x 1
// matrix-vector products (the two shapes the relay unit uses), compared
// element by element with integer arithmetic four enabled clocks later.
module tb_matrix_mult;
  localparam int unsigned AW = 9, BW = 8, LAT = 4, NVEC = 200;
  localparam int unsigned OW = relay_pkg::cadd_width(4, relay_pkg::cmul_width(AW, BW));

  logic clk = 0, rst_n = 0, ce = 0;
  logic [3:0][3:0][1:0][AW-1:0] a;
  logic [3:0][3:0][1:0][BW-1:0] b;
  logic [3:0][0:0][1:0][BW-1:0] v;
  logic [3:0][3:0][1:0][OW-1:0] c;
  logic [3:0][0:0][1:0][OW-1:0] cv;
  longint exp_re [NVEC][4][5], exp_im [NVEC][4][5];
  int checks = 0, failures = 0;

  matrix_mult #(.R(4), .K(4), .C(4), .AW(AW), .BW(BW)) dut (.clk, .rst_n, .ce, .a, .b, .c);
  matrix_mult #(.R(4), .K(4), .C(1), .AW(AW), .BW(BW)) dut_vec (.clk, .rst_n, .ce, .a, .b(v), .c(cv));

  always #5 clk = ~clk;

  for (genvar k = 0; k < 4; k++) begin : g_v
    assign v[k][0] = b[k][1];     // vector = second column of b
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    issued = 0; enabled = 0;
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int t;
        t = enabled - LAT;
        for (int n = 0; n < 4; n++) begin
          for (int m = 0; m < 4; m++) begin
            checks++;
            if (longint'($signed(c[n][m][0])) != exp_re[t][n][m] ||
                longint'($signed(c[n][m][1])) != exp_im[t][n][m]) begin
              failures++;
              if (failures < 5) $display("mismatch %0d (%0d,%0d)", t, n, m);
            end
          end
          checks++;
          if (longint'($signed(cv[n][0][0])) != exp_re[t][n][1] ||
              longint'($signed(cv[n][0][1])) != exp_im[t][n][1]) failures++;
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          for (int n = 0; n < 4; n++)
            for (int m = 0; m < 4; m++) begin
              a[n][m] = {AW'($urandom), AW'($urandom)};
              b[n][m] = {BW'($urandom), BW'($urandom)};
            end
          for (int n = 0; n < 4; n++)
            for (int m = 0; m < 4; m++) begin
              exp_re[issued][n][m] = 0; exp_im[issued][n][m] = 0;
              for (int k = 0; k < 4; k++) begin
                longint ar, ai, br, bi;
                ar = $signed(a[n][k][0]); ai = $signed(a[n][k][1]);
                br = $signed(b[k][m][0]); bi = $signed(b[k][m][1]);
                exp_re[issued][n][m] += ar * br - ai * bi;
                exp_im[issued][n][m] += ar * bi + ai * br;
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
