// channel_prep: the "Combination", "HV^-1" and "Hermitian Transposition"
// blocks of the relay unit (Sec. III, Figs. 2 and 3), in one register stage.
//
//   H      = [H1, H2]                         (eq. (3), 4 x 4)
//   H_hat  = H V, with V of eq. (8)           (2 H V^-1, since V^-1 = V / 2)
//   H_hatH = conj(H_hat)^T                    (Hermitian transpose)
//
// With V of eq. (8), the columns of H V are h1 + h3, h2 + h4, h1 - h3 and
// h2 - h4, i.e. the sum and difference of the two users' channels per
// transmit antenna; this needs only adders. The factor 1/2 of V^-1 is left
// out: it scales the channel by 2, so the weight matrix G and the detector
// outputs come out scaled by 1/2, which the decision threshold absorbs. That
// omission is this design's choice; the document gives the equations.
//
// Timing: the three blocks share one clock (Fig. 13 gives "Comb., HV^-1,
// Her. Tran." 1Ts together). Inputs are taken on every enabled clock.
//
// Interface: h1[i][j], h2[i][j] are the W-bit complex gains from transmit
// antenna j of node 1 / node 2 to receive antenna i of the relay. h_hat is
// (W+1)-bit, h_hat_h is (W+2)-bit (the conjugate of -2^W needs one more bit).
module channel_prep #(
  parameter int unsigned W = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ce,
  input  logic [3:0][1:0][1:0][W-1:0] h1,
  input  logic [3:0][1:0][1:0][W-1:0] h2,
  output logic [3:0][3:0][1:0][W:0]   h_hat,
  output logic [3:0][3:0][1:0][W+1:0] h_hat_h
);
  logic [3:0][3:0][1:0][W-1:0] h;      // combination [H1, H2]
  logic [3:0][3:0][1:0][W:0]   hv_d;
  logic [3:0][3:0][1:0][W+1:0] hh_d;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      h[i][0] = h1[i][0];
      h[i][1] = h1[i][1];
      h[i][2] = h2[i][0];
      h[i][3] = h2[i][1];
    end
    for (int i = 0; i < 4; i++) begin
      for (int p = 0; p < 2; p++) begin
        hv_d[i][0][p] = (W+1)'($signed(h[i][0][p])) + (W+1)'($signed(h[i][2][p]));
        hv_d[i][1][p] = (W+1)'($signed(h[i][1][p])) + (W+1)'($signed(h[i][3][p]));
        hv_d[i][2][p] = (W+1)'($signed(h[i][0][p])) - (W+1)'($signed(h[i][2][p]));
        hv_d[i][3][p] = (W+1)'($signed(h[i][1][p])) - (W+1)'($signed(h[i][3][p]));
      end
    end
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        hh_d[j][i][0] =  (W+2)'($signed(hv_d[i][j][0]));
        hh_d[j][i][1] = -(W+2)'($signed(hv_d[i][j][1]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_hat   <= '0;
      h_hat_h <= '0;
    end else if (ce) begin
      h_hat   <= hv_d;
      h_hat_h <= hh_d;
    end
  end
endmodule
