// tb_det_calc: self-checking testbench for det_calc at N = 4.
//
// Random complex 4 x 4 matrices enter one per enabled clock while ce is
// toggled at random. The expected determinant is computed independently
// with the Leibniz permutation formula (24 signed products) and compared
// with the output 4(N-1) = 12 enabled clocks after the matrix entered, which
// also checks the latency.
module tb_det_calc;
  localparam int unsigned N   = 4;
  localparam int unsigned EW  = 10;
  localparam int unsigned DW  = relay_pkg::det_width(N, EW);
  localparam int unsigned LAT = relay_pkg::det_latency(N);
  localparam int unsigned NVEC = 200;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [N-1:0][N-1:0][1:0][EW-1:0] m;
  logic [1:0][DW-1:0] det;
  int checks = 0, failures = 0;

  det_calc #(.N(N), .EW(EW)) dut (.clk, .rst_n, .ce, .m, .det);

  always #5 clk = ~clk;

  typedef logic signed [191:0] wide_t;
  wide_t exp_re [NVEC];
  wide_t exp_im [NVEC];

  function automatic void leibniz(input logic [N-1:0][N-1:0][1:0][EW-1:0] a,
                                  output wide_t re, output wide_t im);
    int perm [4];
    re = 0; im = 0;
    for (int p0 = 0; p0 < 4; p0++)
      for (int p1 = 0; p1 < 4; p1++)
        for (int p2 = 0; p2 < 4; p2++)
          for (int p3 = 0; p3 < 4; p3++) begin
            int inv;
            wide_t pr, pi, tr, ti;
            perm = '{p0, p1, p2, p3};
            if (p0 == p1 || p0 == p2 || p0 == p3 || p1 == p2 || p1 == p3 || p2 == p3) continue;
            inv = 0;
            for (int x = 0; x < 4; x++)
              for (int y = x + 1; y < 4; y++)
                if (perm[x] > perm[y]) inv++;
            pr = 1; pi = 0;
            for (int r = 0; r < 4; r++) begin
              wide_t er, ei;
              er = wide_t'($signed(a[r][perm[r]][0]));
              ei = wide_t'($signed(a[r][perm[r]][1]));
              tr = pr * er - pi * ei;
              ti = pr * ei + pi * er;
              pr = tr; pi = ti;
            end
            if (inv % 2 != 0) begin re -= pr; im -= pi; end
            else begin re += pr; im += pi; end
          end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    issued = 0; enabled = 0;
    m = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (enabled < NVEC + LAT) begin
      @(negedge clk);
      // check what the output shows now
      if (enabled >= LAT && enabled - LAT < NVEC) begin
        int k;
        k = enabled - LAT;
        checks++;
        if (wide_t'($signed(det[0])) !== exp_re[k] || wide_t'($signed(det[1])) !== exp_im[k]) begin
          failures++;
          if (failures < 5) $display("det mismatch #%0d: got %0d,%0d exp %0d,%0d", k,
                                     $signed(det[0]), $signed(det[1]), exp_re[k], exp_im[k]);
        end
      end
      ce = ($urandom_range(0, 4) != 0);
      if (ce) begin
        if (issued < NVEC) begin
          for (int r = 0; r < N; r++)
            for (int c = 0; c < N; c++) begin
              m[r][c][0] = EW'($urandom);
              m[r][c][1] = EW'($urandom);
              if (issued < 4) begin          // extremes first
                m[r][c][0] = (issued[0]) ? {1'b1, {(EW-1){1'b0}}} : {1'b0, {(EW-1){1'b1}}};
                m[r][c][1] = (issued[1]) ? {1'b1, {(EW-1){1'b0}}} : {1'b0, {(EW-1){1'b1}}};
                if (r == c && issued == 2) m[r][c][0] = '0;
              end
            end
          leibniz(m, exp_re[issued], exp_im[issued]);
          issued++;
        end
        enabled++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
