// det_calc: pipelined determinant of an N x N complex matrix (Sec. III-C,
// eqs. (25)-(26), Fig. 7).
//
// The determinant is expanded along the first row:
//   det(A) = sum_j (-1)^(1+j) a_1j det(A_1j),
// where A_1j is A without row 1 and column j. As in Fig. 7, each minor
// det(A_1j) comes from a smaller determinant calculator (this module
// instantiates itself with N-1, down to N = 1 where the determinant is the
// element), the element a_1j is delayed to meet it, a complex multiplier
// forms the product and one complex adder sums the N products. The
// alternating cofactor signs, which the printed eq. (25) leaves out, are
// applied by the adder's subtract mask.
//
// Timing: each level adds a 3-clock multiplier and a 1-clock adder, so the
// latency is 4(N-1) clocks (12 for N = 4) and a new matrix can enter every
// clock. The element delay at each level equals the latency of the (N-1)
// calculator, 4(N-2) clocks. The document's figure prints that delay as
// 4(N-1); 4(N-2) is what aligns the element with its minor. The result is
// exact: DW = det_width(N, EW) bits.
//
// The lint pass reports the per-term 'sub' as unused and 'sub_det' as
// undriven; both are connected to the self-instance one level down, which
// the lint pass of a recursive module does not follow. Simulation confirms
// the connection (every determinant matches the reference).
module det_calc #(
  parameter int unsigned N  = 4,
  parameter int unsigned EW = 16,
  parameter int unsigned DW = relay_pkg::det_width(N, EW)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  input  logic [N-1:0][N-1:0][1:0][EW-1:0] m,
  output logic [1:0][DW-1:0]               det
);
  if (N == 1) begin : g_leaf
    assign det[0] = DW'($signed(m[0][0][0]));
    assign det[1] = DW'($signed(m[0][0][1]));
  end else begin : g_expand
    localparam int unsigned SDW = relay_pkg::det_width(N - 1, EW);
    localparam int unsigned PW  = relay_pkg::cmul_width(EW, SDW);
    localparam int unsigned LAT = relay_pkg::det_latency(N - 1);

    // Subtract the odd-indexed terms: (-1)^(1+j) for 1-based j.
    localparam logic [N-1:0] ALT_MASK = N'(32'hAAAA_AAAA);

    logic [N-1:0][1:0][PW-1:0] prod;

    for (genvar j = 0; j < N; j++) begin : g_term
      logic [N-2:0][N-2:0][1:0][EW-1:0] sub;
      logic [1:0][SDW-1:0]              sub_det;
      logic [1:0][EW-1:0]               elem_d;

      for (genvar r = 1; r < N; r++) begin : g_r
        for (genvar c = 0; c < N; c++) begin : g_c
          if (c < j) begin : g_lo
            assign sub[r-1][c] = m[r][c];
          end else if (c > j) begin : g_hi
            assign sub[r-1][c-1] = m[r][c];
          end
        end
      end

      det_calc #(.N(N - 1), .EW(EW), .DW(SDW)) u_minor (
        .clk, .rst_n, .ce, .m(sub), .det(sub_det)
      );

      delay_line #(.WIDTH(2 * EW), .DEPTH(LAT)) u_elem_dly (
        .clk, .rst_n, .ce, .din(m[0][j]), .dout(elem_d)
      );

      complex_mult #(.AW(EW), .BW(SDW), .PW(PW)) u_mul (
        .clk, .rst_n, .ce, .a(elem_d), .b(sub_det), .p(prod[j])
      );
    end

    complex_adder #(.N(N), .IW(PW), .OW(DW), .SUB_MASK(ALT_MASK)) u_add (
      .clk, .rst_n, .ce, .terms(prod), .sum(det)
    );
  end
endmodule
