// selective_decision: the "Multiplier and decision" stage of the relay unit
// (Figs. 2, 3, 13, 14): y = G r and the PNC selective decision of eq. (17).
//
// How it works (5 clocks, as in Figs. 13 and 14):
//   clocks 1-4  a 4 x 4 by 4 x 1 matrix_mult forms y = G r, and in parallel
//               four mm_elements form the row energies e_k = sum_j |g_kj|^2,
//               i.e. the diagonal of G G^H (the noise gain of stream k);
//   clock 5     for each transmit antenna i = 1, 2 with k = i + 2:
//                 if e_i < e_k : x_i = sign(|y_i| - gamma)   (sum stream)
//                 else         : x_i = sign(gamma - |y_k|)   (difference stream)
//               and y is registered for observation.
// sign(0) is taken as +1, which puts a tie on the same side as the document's
// LLR rule, eq. (16). pnc[i] = 1 means x_i = +1, i.e. the estimate of
// x_i^(1) (+) x_i^(2) is +1 in the signed mapping of eq. (17). The real part
// of y is used, since the symbols are BPSK.
//
// Number formats: G has LSB 2^-(C+F) (see matrix_inverse), r is integer, so
// the full product y has LSB 2^-(C+F). gamma is unsigned with LSB 2^-C and is
// compared at full precision. The y output is the full product shifted right
// by F (LSB 2^-C).
//
// The formula of eq. (17) and the 5-clock budget are the document's; the
// split into 4 + 1 clocks, the tie rule and the number formats are this
// design's choices.
module selective_decision #(
  parameter int unsigned GW = 40,
  parameter int unsigned RW = 12,
  parameter int unsigned GAW = 12,
  parameter int unsigned F  = 20,
  parameter int unsigned YW = relay_pkg::cadd_width(4, relay_pkg::cmul_width(GW, RW)),
  parameter int unsigned YOW = YW - F
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ce,
  input  logic [3:0][3:0][1:0][GW-1:0]  g,
  input  logic [3:0][1:0][RW-1:0]       r,
  input  logic [GAW-1:0]                gamma,
  output logic [3:0][1:0][YOW-1:0]      y,
  output logic [1:0]                    pnc,
  output logic [1:0]                    use_diff
);
  localparam int unsigned GCW = GW + 1;
  localparam int unsigned EWD = relay_pkg::cadd_width(4, relay_pkg::cmul_width(GW, GCW));

  logic [3:0][0:0][1:0][RW-1:0] r_col;
  logic [3:0][0:0][1:0][YW-1:0] y_full;
  logic [3:0][1:0][EWD-1:0]     energy;

  for (genvar k = 0; k < 4; k++) begin : g_rcol
    assign r_col[k][0] = r[k];
  end

  matrix_mult #(.R(4), .K(4), .C(1), .AW(GW), .BW(RW), .OW(YW)) u_gr (
    .clk, .rst_n, .ce, .a(g), .b(r_col), .c(y_full)
  );

  for (genvar k = 0; k < 4; k++) begin : g_energy
    logic [3:0][1:0][GCW-1:0] g_conj;
    for (genvar j = 0; j < 4; j++) begin : g_j
      assign g_conj[j][0] =  GCW'($signed(g[k][j][0]));
      assign g_conj[j][1] = -GCW'($signed(g[k][j][1]));
    end
    mm_element #(.K(4), .AW(GW), .BW(GCW), .OW(EWD)) u_e (
      .clk, .rst_n, .ce, .a_row(g[k]), .b_col(g_conj), .c(energy[k])
    );
  end

  // Decision threshold at the precision of the full product.
  localparam int unsigned TW = (YW > GAW + F ? YW : GAW + F) + 1;

  logic [1:0] pnc_d, diff_d;

  always_comb begin
    logic [TW-1:0] thr;
    thr = TW'(gamma) << F;
    for (int i = 0; i < 2; i++) begin
      logic signed [TW-1:0] ys, yd;
      logic [TW-1:0] ys_abs, yd_abs;
      ys = TW'($signed(y_full[i][0][0]));
      yd = TW'($signed(y_full[i+2][0][0]));
      ys_abs = (ys < 0) ? -ys : ys;
      yd_abs = (yd < 0) ? -yd : yd;
      diff_d[i] = !($signed(energy[i][0]) < $signed(energy[i+2][0]));
      pnc_d[i]  = diff_d[i] ? (yd_abs <= thr) : (ys_abs >= thr);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y        <= '0;
      pnc      <= '0;
      use_diff <= '0;
    end else if (ce) begin
      for (int k = 0; k < 4; k++) begin
        y[k][0] <= YOW'($signed(y_full[k][0][0]) >>> F);
        y[k][1] <= YOW'($signed(y_full[k][0][1]) >>> F);
      end
      pnc      <= pnc_d;
      use_diff <= diff_d;
    end
  end
endmodule
