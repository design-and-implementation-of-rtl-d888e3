// tb_int_divider: checks 2^C d = q v + r for random W-bit operands and
// corner cases (d = 0, d = v, v = 1, all ones) with W + C = 18 stages; the
// result must appear exactly W + C enabled clocks after the operands.
module tb_int_divider;
  localparam int unsigned W = 12, C = 6, LAT = W + C, NVEC = 400;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [W-1:0] d, v, r;
  logic [W+C-1:0] q;
  longint exp_q [NVEC], exp_r [NVEC];
  int checks = 0, failures = 0;

  int_divider #(.W(W), .C(C)) dut (.clk, .rst_n, .ce, .d, .v, .q, .r);

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
    d = '0; v = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        checks++;
        if (longint'(q) != exp_q[enabled - LAT] || longint'(r) != exp_r[enabled - LAT]) begin
          failures++;
          if (failures < 5) $display("mismatch %0d: q=%0d r=%0d exp %0d %0d", enabled - LAT, q, r,
                                     exp_q[enabled - LAT], exp_r[enabled - LAT]);
        end
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          d = W'($urandom);
          v = W'($urandom);
          case (issued)
            0: d = '0;
            1: v = d;
            2: v = 1;
            3: begin d = '1; v = '1; end
            4: begin d = '1; v = 1; end
            default: if (v == 0) v = 3;
          endcase
          exp_q[issued] = (longint'(d) << C) / longint'(v);
          exp_r[issued] = (longint'(d) << C) % longint'(v);
          issued++;
        end
        enabled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
