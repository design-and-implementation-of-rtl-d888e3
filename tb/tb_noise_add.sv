// tb_noise_add: random 4 x 4 complex matrices plus sigma2; one enabled
// clock later the diagonal real parts must have grown by sigma2 and all
// other parts must be unchanged.
module tb_noise_add;
  localparam int unsigned N = 4, EW = 14, SW = 12, LAT = 1, NVEC = 300;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [N-1:0][N-1:0][1:0][EW-1:0] k_in;
  logic [SW-1:0] sigma2;
  logic [N-1:0][N-1:0][1:0][EW:0] k_out;
  int exp_v [NVEC][4][4][2];
  int checks = 0, failures = 0;

  noise_add #(.N(N), .EW(EW), .SW(SW)) dut (.clk, .rst_n, .ce, .k_in, .sigma2, .k_out);

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
    k_in = '0; sigma2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            for (int p = 0; p < 2; p++) begin
              checks++;
              if (int'($signed(k_out[i][j][p])) != exp_v[enabled - LAT][i][j][p]) begin
                failures++;
                if (failures < 5) $display("mismatch %0d (%0d,%0d,%0d)", enabled - LAT, i, j, p);
              end
            end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          sigma2 = SW'($urandom);
          if (issued == 0) sigma2 = '1;
          for (int i = 0; i < 4; i++)
            for (int j = 0; j < 4; j++)
              for (int p = 0; p < 2; p++) begin
                k_in[i][j][p] = EW'($urandom);
                if (issued == 0) k_in[i][j][p] = {1'b0, {(EW-1){1'b1}}};
                exp_v[issued][i][j][p] = $signed(k_in[i][j][p]) +
                                         ((i == j && p == 0) ? int'(sigma2) : 0);
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
