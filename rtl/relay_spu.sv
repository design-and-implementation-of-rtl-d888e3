// relay_spu: signal processing unit of the relay node in a two-way
// MIMO-SDM-PNC system (Figs. 2 and 3, eqs. (3)-(19)).
//
// Two source nodes with two antennas each transmit BPSK streams at the same
// time; the relay (four receive antennas) does not separate the users but
// estimates, per transmit antenna i, the sum x_i^(1) + x_i^(2) and the
// difference x_i^(1) - x_i^(2), and maps them to the network-coded symbol
// x_i^(1) (+) x_i^(2) that it will broadcast.
//
// Dataflow (one new channel/received-vector set per clock, fully pipelined):
//   channel_prep        H = [H1 H2], H_hat = H V, H_hat^H           1 clock
//   matrix_mult         K = H_hat^H H_hat                            4 clocks
//   noise_add (MMSE)    K + sigma_n^2 I; sigma2 delayed 5 clocks    1 clock
//   matrix_inverse      K^-1 by cofactors and complex division      W+C+16
//   matrix_mult         G = K^-1 H_hat^H (H_hat^H delayed W+C+20/21) 4 clocks
//   selective_decision  y = G r (r delayed W+C+25/26), eq. (17)      5 clocks
// Latency from in_valid to out_valid: W + C + 30 clocks for ZF and
// W + C + 31 for MMSE, the document's eqs. (18)-(19). DETECTOR selects the
// architecture of Fig. 2 (ZF) or Fig. 3 (MMSE) at build time.
//
// Interface: all inputs are taken on each rising clk edge with ce = 1;
// ce = 0 freezes the whole pipeline (the CE of Fig. 4). in_valid marks a
// valid input set and is carried beside the data to out_valid. h1[i][j] and
// h2[i][j] are W-bit complex gains from antenna j of node 1 / 2 to relay
// antenna i; r is the W-bit complex received vector in the same units;
// sigma2 (MMSE only) is the noise variance scaled like H_hat^H H_hat, i.e.
// 4 sigma_n^2 in input units squared; gamma is the decision threshold with
// LSB 2^-C in units of y. Outputs: y (LSB 2^-C; equal to
// x_hat / (2 sqrt 2) for a noiseless channel, see channel_prep), pnc[i] = 1
// for x_i^(1) (+) x_i^(2) = +1 in eq. (17)'s mapping, use_diff[i] = 1 when
// the difference stream decided.
//
// The block structure, the latencies and the alignment delays follow the
// document. Default W = 12, C = 6 is the first configuration of its result
// tables. The number formats (full precision up to the divider, fixed
// scaling F at the divider input) are this design's choices; the document
// gives no internal widths.
module relay_spu
  import relay_pkg::*;
#(
  parameter int unsigned W        = 12,        // input data bus width (ADC bits)
  parameter int unsigned C        = 6,         // divider scale factor
  parameter detector_e   DETECTOR = DET_ZF,
  parameter int unsigned F        = 2 * W - C - 1, // binary point of K^-1 (see complex_divider)
  parameter int unsigned SW       = 2 * W,     // sigma2 width
  // width of the y output: the G r product (LSB 2^-(C+F)) less its F lowest bits
  localparam int unsigned YOW     = cadd_width(4, cmul_width(cadd_width(4,
                                      cmul_width(W + C + 1, W + 2)), W)) - F
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        ce,
  input  logic                        in_valid,
  input  logic [3:0][1:0][1:0][W-1:0] h1,
  input  logic [3:0][1:0][1:0][W-1:0] h2,
  input  logic [3:0][1:0][W-1:0]      r,
  input  logic [SW-1:0]               sigma2,
  input  logic [W-1:0]                gamma,
  output logic                        out_valid,
  output logic [3:0][1:0][YOW-1:0]     y,
  output logic [1:0]                  pnc,
  output logic [1:0]                  use_diff
);
  localparam bit          MMSE  = (DETECTOR == DET_MMSE);
  localparam int unsigned HW    = W + 1;                          // H_hat
  localparam int unsigned HHW   = W + 2;                          // H_hat^H
  localparam int unsigned KW    = cadd_width(4, cmul_width(HHW, HW));
  localparam int unsigned IW    = MMSE ? KW + 1 : KW;             // inversion input
  localparam int unsigned QW    = W + C + 1;                      // K^-1 element
  localparam int unsigned GW    = cadd_width(4, cmul_width(QW, HHW));
  localparam int unsigned YW    = cadd_width(4, cmul_width(GW, W));
  localparam int unsigned EXTRA = MMSE ? 1 : 0;
  localparam int unsigned LAT   = W + C + 30 + EXTRA;
  localparam int unsigned HH_DLY = W + C + 20 + EXTRA;
  localparam int unsigned R_DLY  = W + C + 25 + EXTRA;
  localparam int unsigned SIG_DLY = 1 + MM_LAT;                   // delay(5)Ts

  // ---- Combination, H V^-1, Hermitian transposition -------------------
  logic [3:0][3:0][1:0][HW-1:0]  h_hat;
  logic [3:0][3:0][1:0][HHW-1:0] h_hat_h;

  channel_prep #(.W(W)) u_prep (
    .clk, .rst_n, .ce, .h1, .h2, .h_hat, .h_hat_h
  );

  // ---- Gram matrix H_hat^H H_hat -----------------------------------------
  logic [3:0][3:0][1:0][KW-1:0] gram;

  matrix_mult #(.R(4), .K(4), .C(4), .AW(HHW), .BW(HW), .OW(KW)) u_gram (
    .clk, .rst_n, .ce, .a(h_hat_h), .b(h_hat), .c(gram)
  );

  // ---- Noise add (MMSE only) --------------------------------------------
  logic [3:0][3:0][1:0][IW-1:0] k_mat;

  if (MMSE) begin : g_mmse
    logic [SW-1:0] sigma2_d;
    delay_line #(.WIDTH(SW), .DEPTH(SIG_DLY)) u_sig_dly (
      .clk, .rst_n, .ce, .din(sigma2), .dout(sigma2_d)
    );
    noise_add #(.N(4), .EW(KW), .SW(SW)) u_noise (
      .clk, .rst_n, .ce, .k_in(gram), .sigma2(sigma2_d), .k_out(k_mat)
    );
  end else begin : g_zf
    assign k_mat = gram;
  end

  // ---- Matrix inversion ---------------------------------------------------
  logic [3:0][3:0][1:0][QW-1:0] k_inv;

  matrix_inverse #(.N(4), .EW(IW), .W(W), .C(C), .F(F)) u_inv (
    .clk, .rst_n, .ce, .a(k_mat), .a_inv(k_inv)
  );

  // ---- Weight matrix G = K^-1 H_hat^H -------------------------------------
  logic [3:0][3:0][1:0][HHW-1:0] h_hat_h_d;
  logic [3:0][3:0][1:0][GW-1:0]  g_mat;

  delay_line #(.WIDTH(16 * 2 * HHW), .DEPTH(HH_DLY)) u_hh_dly (
    .clk, .rst_n, .ce, .din(h_hat_h), .dout(h_hat_h_d)
  );

  matrix_mult #(.R(4), .K(4), .C(4), .AW(QW), .BW(HHW), .OW(GW)) u_weight (
    .clk, .rst_n, .ce, .a(k_inv), .b(h_hat_h_d), .c(g_mat)
  );

  // ---- Received vector alignment and selective decision ------------------
  logic [3:0][1:0][W-1:0] r_d;

  delay_line #(.WIDTH(4 * 2 * W), .DEPTH(R_DLY)) u_r_dly (
    .clk, .rst_n, .ce, .din(r), .dout(r_d)
  );

  selective_decision #(.GW(GW), .RW(W), .GAW(W), .F(F), .YW(YW), .YOW(YOW)) u_dec (
    .clk, .rst_n, .ce, .g(g_mat), .r(r_d), .gamma, .y, .pnc, .use_diff
  );

  // ---- Valid tracking -----------------------------------------------------
  delay_line #(.WIDTH(1), .DEPTH(LAT)) u_valid_dly (
    .clk, .rst_n, .ce, .din(in_valid), .dout(out_valid)
  );

endmodule
