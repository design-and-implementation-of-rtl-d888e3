// int_divider: pipelined unsigned restoring divider computing
//   2^C * d = q * v + r        (eq. (20) of the scaled division)
// for a W-bit dividend d and a W-bit divisor v (Fig. 4).
//
// The dividend is scaled by 2^C so that a quotient smaller than one (the
// divisor is usually larger than the dividend in the matrix inversion) keeps
// C fraction bits. The divider has W + C stages, one register stage per
// quotient bit, as in Fig. 4: each stage shifts the next dividend bit into
// the partial remainder, subtracts the divisor, and a multiplexer keeps
// either the difference (quotient bit 1) or the old value (quotient bit 0).
// Quotient bits enter q from the right, most significant first.
//
// Interface: d and v are sampled when ce = 1; q (W + C bits) and r (W bits)
// appear W + C enabled clocks later. A new division can start every clock.
// ce = 0 freezes all stages (the CE input of Fig. 4). v = 0 gives an
// all-ones quotient. The stage structure follows the document; register
// reset and the all-ones result for v = 0 are this design's choices.
module int_divider #(
  parameter int unsigned W = 12,
  parameter int unsigned C = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,
  input  logic [W-1:0]   d,
  input  logic [W-1:0]   v,
  output logic [W+C-1:0] q,
  output logic [W-1:0]   r
);
  localparam int unsigned S = W + C;

  // Index i holds the values entering stage i; index S is the output.
  logic [S:0][W-1:0] rem;
  logic [S:0][S-1:0] quo;
  logic [S:0][S-1:0] dvd;
  logic [S:0][W-1:0] dvs;

  assign rem[0] = '0;
  assign quo[0] = '0;
  assign dvd[0] = {d, {C{1'b0}}};
  assign dvs[0] = v;

  for (genvar i = 0; i < S; i++) begin : g_stage
    logic [W:0]   trial;
    logic [W:0]   diff;
    logic         qbit;
    logic [W-1:0] rem_d;

    always_comb begin
      trial = {rem[i], dvd[i][S-1]};
      diff  = trial - {1'b0, dvs[i]};
      qbit  = (trial >= {1'b0, dvs[i]});
      rem_d = qbit ? diff[W-1:0] : trial[W-1:0];
    end

    logic [W-1:0] rem_q;
    logic [S-1:0] quo_q;
    logic [S-1:0] dvd_q;
    logic [W-1:0] dvs_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        rem_q <= '0;
        quo_q <= '0;
        dvd_q <= '0;
        dvs_q <= '0;
      end else if (ce) begin
        rem_q <= rem_d;
        quo_q <= {quo[i][S-2:0], qbit};
        dvd_q <= dvd[i] << 1;
        dvs_q <= dvs[i];
      end
    end

    assign rem[i+1] = rem_q;
    assign quo[i+1] = quo_q;
    assign dvd[i+1] = dvd_q;
    assign dvs[i+1] = dvs_q;
  end

  assign q = quo[S];
  assign r = rem[S];
endmodule
