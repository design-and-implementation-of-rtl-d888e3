// tb_complex_mult: random and extreme operands into complex_mult with ce
// toggling; the product is compared with integer arithmetic three enabled
// clocks later (the document's 3-clock multiplier latency).
module tb_complex_mult;
  localparam int unsigned AW = 10, BW = 7, PW = AW + BW + 1, LAT = 3, NVEC = 400;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [1:0][AW-1:0] a;
  logic [1:0][BW-1:0] b;
  logic [1:0][PW-1:0] p;
  longint exp_re [NVEC], exp_im [NVEC];
  int checks = 0, failures = 0;

  complex_mult #(.AW(AW), .BW(BW)) dut (.clk, .rst_n, .ce, .a, .b, .p);

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
    a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        checks++;
        if (longint'($signed(p[0])) != exp_re[enabled - LAT] ||
            longint'($signed(p[1])) != exp_im[enabled - LAT]) begin
          failures++;
          if (failures < 5) $display("mismatch %0d: %0d,%0d vs %0d,%0d", enabled - LAT,
                                     $signed(p[0]), $signed(p[1]), exp_re[enabled - LAT], exp_im[enabled - LAT]);
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          a = {AW'($urandom), AW'($urandom)};
          b = {BW'($urandom), BW'($urandom)};
          if (issued < 4) begin
            a = {2{issued[0] ? {1'b1, {(AW-1){1'b0}}} : {1'b0, {(AW-1){1'b1}}}}};
            b = {2{issued[1] ? {1'b1, {(BW-1){1'b0}}} : {1'b0, {(BW-1){1'b1}}}}};
          end
          exp_re[issued] = longint'($signed(a[0])) * longint'($signed(b[0])) -
                           longint'($signed(a[1])) * longint'($signed(b[1]));
          exp_im[issued] = longint'($signed(a[0])) * longint'($signed(b[1])) +
                           longint'($signed(a[1])) * longint'($signed(b[0]));
          issued++;
        end
        enabled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
