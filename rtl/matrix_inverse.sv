// matrix_inverse: pipelined inverse of an N x N complex matrix by cofactors
// (Sec. III-C, eqs. (22)-(24), Fig. 8):
//   (A^-1)_nm = (-1)^(n+m) det(A_mn) / det(A),
// where A_mn is A without row m and column n (the comatrix is transposed).
//
// Structure: one det_calc for det(A) (4(N-1) clocks) and, for each of the
// N*N output elements, a det_calc for the (N-1) x (N-1) minor (4(N-2) clocks)
// followed by a 4-clock alignment delay, a sign flip for (-1)^(n+m), and a
// complex_divider (W + C + 4 clocks). All N*N submodules run in parallel, so
// a new matrix can enter every clock.
// Latency: 4(N-1) + W + C + 4 clocks, which is W + C + 16 for N = 4, the
// value the document's latency budget implies.
//
// Output format: each element is a (W + C + 1)-bit complex two's complement
// value whose LSB weighs 2^-(C+F) (see complex_divider). The document draws
// each submodule with its own det(A) calculator; here one det(A) calculator
// is shared by the N*N dividers, which gives the same numbers with less
// logic. That sharing and the F scaling are this design's choices.
module matrix_inverse #(
  parameter int unsigned N  = 4,
  parameter int unsigned EW = 30,
  parameter int unsigned W  = 12,
  parameter int unsigned C  = 6,
  parameter int unsigned F  = 24
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  input  logic [N-1:0][N-1:0][1:0][EW-1:0] a,
  output logic [N-1:0][N-1:0][1:0][W+C:0]  a_inv
);
  localparam int unsigned DW   = relay_pkg::det_width(N, EW);
  localparam int unsigned MW   = relay_pkg::det_width(N - 1, EW);
  localparam int unsigned ALIGN = relay_pkg::det_latency(N) - relay_pkg::det_latency(N - 1);

  logic [1:0][DW-1:0] det_a;

  det_calc #(.N(N), .EW(EW), .DW(DW)) u_det (
    .clk, .rst_n, .ce, .m(a), .det(det_a)
  );

  // Minors: minor[i][j] = det(A without row i and column j).
  for (genvar i = 0; i < N; i++) begin : g_mi
    for (genvar j = 0; j < N; j++) begin : g_mj
      logic [N-2:0][N-2:0][1:0][EW-1:0] sub;
      logic [1:0][MW-1:0]               minor;
      logic [1:0][MW-1:0]               minor_d;
      logic [1:0][MW:0]                 cof;

      for (genvar r = 0; r < N; r++) begin : g_r
        for (genvar c = 0; c < N; c++) begin : g_c
          if (r != i && c != j) begin : g_keep
            assign sub[(r < i) ? r : r - 1][(c < j) ? c : c - 1] = a[r][c];
          end
        end
      end

      det_calc #(.N(N - 1), .EW(EW), .DW(MW)) u_minor (
        .clk, .rst_n, .ce, .m(sub), .det(minor)
      );

      delay_line #(.WIDTH(2 * MW), .DEPTH(ALIGN)) u_align (
        .clk, .rst_n, .ce, .din(minor), .dout(minor_d)
      );

      // Cofactor (-1)^(i+j) det(A_ij), one bit wider so negation cannot overflow.
      if (((i + j) % 2) == 1) begin : g_neg
        assign cof[0] = -(MW+1)'($signed(minor_d[0]));
        assign cof[1] = -(MW+1)'($signed(minor_d[1]));
      end else begin : g_pos
        assign cof[0] = (MW+1)'($signed(minor_d[0]));
        assign cof[1] = (MW+1)'($signed(minor_d[1]));
      end

      // The cofactor of A_ij lands at (j, i) of the inverse.
      complex_divider #(.NW(MW + 1), .DW(DW), .W(W), .C(C), .F(F)) u_div (
        .clk, .rst_n, .ce, .num(cof), .den(det_a), .quot(a_inv[j][i])
      );
    end
  end
endmodule
