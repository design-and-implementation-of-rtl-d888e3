// tb_complex_adder: four random complex terms, terms 0 and 2 subtracted
// (SUB_MASK = 4'b0101); the registered sum is compared one enabled clock
// later with integer arithmetic.
module tb_complex_adder;
  localparam int unsigned N = 4, IW = 10, LAT = 1, NVEC = 400;
  localparam logic [N-1:0] MASK = 4'b0101;
  localparam int unsigned OW = relay_pkg::cadd_width(N, IW);

  logic clk = 0, rst_n = 0, ce = 0;
  logic [N-1:0][1:0][IW-1:0] terms;
  logic [1:0][OW-1:0] sum;
  longint exp_re [NVEC], exp_im [NVEC];
  int checks = 0, failures = 0;

  complex_adder #(.N(N), .IW(IW), .SUB_MASK(MASK)) dut (.clk, .rst_n, .ce, .terms, .sum);

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
    terms = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        checks++;
        if (longint'($signed(sum[0])) != exp_re[enabled - LAT] ||
            longint'($signed(sum[1])) != exp_im[enabled - LAT]) begin
          failures++;
          if (failures < 5) $display("mismatch %0d", enabled - LAT);
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          exp_re[issued] = 0; exp_im[issued] = 0;
          for (int k = 0; k < N; k++) begin
            terms[k] = {IW'($urandom), IW'($urandom)};
            if (issued == 0) terms[k] = {2{k[0] ? {IW{1'b0}} : {1'b1, {(IW-1){1'b0}}}}};
            if (MASK[k]) begin
              exp_re[issued] -= longint'($signed(terms[k][0]));
              exp_im[issued] -= longint'($signed(terms[k][1]));
            end else begin
              exp_re[issued] += longint'($signed(terms[k][0]));
              exp_im[issued] += longint'($signed(terms[k][1]));
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
