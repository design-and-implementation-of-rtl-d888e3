// mm_element: one element c_nm = sum_k a_nk * b_km of a complex matrix
// product (the submodule of Fig. 6).
//
// K complex multipliers work in parallel on the K operand pairs and one
// complex adder sums their products, exactly as the document draws it. The
// result keeps full precision. Latency: 3 (multiplier) + 1 (adder) = 4
// clocks, fully pipelined, ce = 0 holds every stage.
//
// Interface: a_row[k] is a_nk, b_col[k] is b_km, both complex packed pairs.
module mm_element #(
  parameter int unsigned K  = 4,
  parameter int unsigned AW = 12,
  parameter int unsigned BW = 12,
  parameter int unsigned OW = relay_pkg::cadd_width(K, relay_pkg::cmul_width(AW, BW))
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ce,
  input  logic [K-1:0][1:0][AW-1:0] a_row,
  input  logic [K-1:0][1:0][BW-1:0] b_col,
  output logic [1:0][OW-1:0]        c
);
  localparam int unsigned PW = relay_pkg::cmul_width(AW, BW);

  logic [K-1:0][1:0][PW-1:0] prod;

  for (genvar k = 0; k < K; k++) begin : g_mul
    complex_mult #(.AW(AW), .BW(BW), .PW(PW)) u_mul (
      .clk, .rst_n, .ce,
      .a(a_row[k]),
      .b(b_col[k]),
      .p(prod[k])
    );
  end

  complex_adder #(.N(K), .IW(PW), .OW(OW)) u_add (
    .clk, .rst_n, .ce,
    .terms(prod),
    .sum(c)
  );
endmodule
