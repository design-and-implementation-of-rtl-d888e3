// matrix_mult: complex matrix multiplier C = A B (Sec. III-B, eq. (21)).
//
// One mm_element per output element, all working in parallel, so a 4 x 4
// product uses the sixteen submodules the document describes. The shape is
// generic (R x K times K x C) so that the same block also forms the
// matrix-vector product G r. Latency 4 clocks, one new product per clock,
// full-precision outputs of OW bits.
module matrix_mult #(
  parameter int unsigned R  = 4,
  parameter int unsigned K  = 4,
  parameter int unsigned C  = 4,
  parameter int unsigned AW = 12,
  parameter int unsigned BW = 12,
  parameter int unsigned OW = relay_pkg::cadd_width(K, relay_pkg::cmul_width(AW, BW))
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  input  logic [R-1:0][K-1:0][1:0][AW-1:0] a,
  input  logic [K-1:0][C-1:0][1:0][BW-1:0] b,
  output logic [R-1:0][C-1:0][1:0][OW-1:0] c
);
  for (genvar n = 0; n < R; n++) begin : g_row
    for (genvar m = 0; m < C; m++) begin : g_col
      logic [K-1:0][1:0][BW-1:0] b_col;
      for (genvar k = 0; k < K; k++) begin : g_k
        assign b_col[k] = b[k][m];
      end
      mm_element #(.K(K), .AW(AW), .BW(BW), .OW(OW)) u_el (
        .clk, .rst_n, .ce,
        .a_row(a[n]),
        .b_col(b_col),
        .c(c[n][m])
      );
    end
  end
endmodule
