// complex_mult: pipelined complex multiplier p = a * b.
//
// The document uses a "Complex Number Multiplier" in the matrix multiplier,
// the determinant calculator and the divider, and gives it 3 clocks (Fig. 5).
// The three stages are this design's choice, laid out like an FPGA DSP slice:
//   stage 1 registers the operands,
//   stage 2 registers the four real products ar*br, ai*bi, ar*bi, ai*br,
//   stage 3 registers re = ar*br - ai*bi and im = ar*bi + ai*br.
// The result keeps full precision (AW + BW + 1 bits per part).
//
// Interface: complex operands as [1:0][W-1:0] packed pairs, [0] real and [1]
// imaginary, two's complement. ce = 0 holds every stage. Latency 3 clocks,
// one new product per clock.
module complex_mult #(
  parameter int unsigned AW = 12,
  parameter int unsigned BW = 12,
  parameter int unsigned PW = AW + BW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic [1:0][AW-1:0]  a,
  input  logic [1:0][BW-1:0]  b,
  output logic [1:0][PW-1:0]  p
);
  logic signed [AW-1:0] ar_q, ai_q;
  logic signed [BW-1:0] br_q, bi_q;
  logic signed [AW+BW-1:0] rr_q, ii_q, ri_q, ir_q;
  logic signed [PW-1:0] re_q, im_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ar_q <= '0; ai_q <= '0; br_q <= '0; bi_q <= '0;
      rr_q <= '0; ii_q <= '0; ri_q <= '0; ir_q <= '0;
      re_q <= '0; im_q <= '0;
    end else if (ce) begin
      ar_q <= $signed(a[0]);
      ai_q <= $signed(a[1]);
      br_q <= $signed(b[0]);
      bi_q <= $signed(b[1]);
      rr_q <= ar_q * br_q;
      ii_q <= ai_q * bi_q;
      ri_q <= ar_q * bi_q;
      ir_q <= ai_q * br_q;
      re_q <= PW'(rr_q) - PW'(ii_q);
      im_q <= PW'(ri_q) + PW'(ir_q);
    end
  end

  assign p[0] = re_q;
  assign p[1] = im_q;
endmodule
