// noise_add: the MMSE "Noise add" block (Fig. 3): K = H_hat^H H_hat +
// sigma_n^2 I, in one register stage (Fig. 14 gives it 1Ts).
//
// sigma2 is added to the real part of each diagonal element; off-diagonal
// elements and imaginary parts pass unchanged. The output is one bit wider
// than the input so the sum cannot overflow. sigma2 is unsigned and in the
// units of the Gram matrix, i.e. already scaled like H_hat^H H_hat (this
// scaling convention is this design's choice).
module noise_add #(
  parameter int unsigned N  = 4,
  parameter int unsigned EW = 30,
  parameter int unsigned SW = 24
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             ce,
  input  logic [N-1:0][N-1:0][1:0][EW-1:0] k_in,
  input  logic [SW-1:0]                    sigma2,
  output logic [N-1:0][N-1:0][1:0][EW:0]   k_out
);
  logic [N-1:0][N-1:0][1:0][EW:0] sum_d;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        sum_d[i][j][0] = (EW+1)'($signed(k_in[i][j][0]));
        sum_d[i][j][1] = (EW+1)'($signed(k_in[i][j][1]));
        if (i == j) sum_d[i][j][0] = sum_d[i][j][0] + (EW+1)'(sigma2);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) k_out <= '0;
    else if (ce) k_out <= sum_d;
  end
endmodule
