// tb_mm_element: one element of a complex matrix product, sum over K = 4
// products, compared with integer arithmetic four enabled clocks later
// (3-clock multiplier plus 1-clock adder).
module tb_mm_element;
  localparam int unsigned K = 4, AW = 9, BW = 8, LAT = 4, NVEC = 400;
  localparam int unsigned OW = relay_pkg::cadd_width(K, relay_pkg::cmul_width(AW, BW));

  logic clk = 0, rst_n = 0, ce = 0;
  logic [K-1:0][1:0][AW-1:0] a_row;
  logic [K-1:0][1:0][BW-1:0] b_col;
  logic [1:0][OW-1:0] c;
  longint exp_re [NVEC], exp_im [NVEC];
  int checks = 0, failures = 0;

  mm_element #(.K(K), .AW(AW), .BW(BW)) dut (.clk, .rst_n, .ce, .a_row, .b_col, .c);

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
    a_row = '0; b_col = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        checks++;
        if (longint'($signed(c[0])) != exp_re[enabled - LAT] ||
            longint'($signed(c[1])) != exp_im[enabled - LAT]) begin
          failures++;
          if (failures < 5) $display("mismatch %0d", enabled - LAT);
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          exp_re[issued] = 0; exp_im[issued] = 0;
          for (int k = 0; k < K; k++) begin
            longint ar, ai, br, bi;
            a_row[k] = {AW'($urandom), AW'($urandom)};
            b_col[k] = {BW'($urandom), BW'($urandom)};
            if (issued == 0) begin
              a_row[k] = {2{1'b1, {(AW-1){1'b0}}}};
              b_col[k] = {1'b0, {(BW-1){1'b1}}, 1'b1, {(BW-1){1'b0}}};
            end
            ar = $signed(a_row[k][0]); ai = $signed(a_row[k][1]);
            br = $signed(b_col[k][0]); bi = $signed(b_col[k][1]);
            exp_re[issued] += ar * br - ai * bi;
            exp_im[issued] += ar * bi + ai * br;
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
