// complex_divider: pipelined complex divider for one element of the inverse
// matrix, quot ~= 2^(C+F) * num / den (Sec. III-A, Fig. 5).
//
// How it works:
//   1. Complex multiplication, 3 clocks: num * conj(den) and den * conj(den),
//      so that num / den = num * conj(den) / |den|^2 has a real divisor.
//   2. Normalisation (combinational, at the entry of the dividers): the
//      divisor |den|^2 is shifted right by s bits so that it fits W bits, and
//      each numerator magnitude is scaled by 2^F and shifted by the same s,
//      saturating at 2^W - 1. F fixes the binary point of the result; it
//      stands in for the document's "normalization factor of divider".
//   3. Two int_divider pipelines (W + C stages each) divide the real and the
//      imaginary magnitudes by the normalised divisor, computing 2^C a / b.
//   4. An output register restores the signs.
// Latency: 3 + (W + C) + 1 = W + C + 4 clocks, as the document states; one
// new division per clock. ce = 0 freezes the pipeline.
//
// The multiply / shift-subtract / register split and the latency are the
// document's. The normalisation by a common shift and the F scaling are this
// design's own choices: the document does not say how the wide determinant
// products are brought to the W-bit divider inputs.
//
// Interface: num is a complex NW-bit value, den a complex DW-bit value; quot
// is a complex (W + C + 1)-bit two's complement value whose LSB weighs
// 2^-(C+F). den = 0 gives the largest quotient magnitude.
module complex_divider #(
  parameter int unsigned NW = 16,
  parameter int unsigned DW = 16,
  parameter int unsigned W  = 12,
  parameter int unsigned C  = 6,
  parameter int unsigned F  = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic [1:0][NW-1:0]    num,
  input  logic [1:0][DW-1:0]    den,
  output logic [1:0][W+C:0]     quot
);
  localparam int unsigned DCW = DW + 1;                         // conj(den)
  localparam int unsigned PW  = relay_pkg::cmul_width(NW, DCW); // num*conj(den)
  localparam int unsigned QW  = relay_pkg::cmul_width(DW, DCW); // |den|^2
  localparam int unsigned SW  = PW + F;                         // scaled numerator

  logic [1:0][DCW-1:0] den_conj;
  logic [1:0][PW-1:0]  prod;
  logic [1:0][QW-1:0]  energy;

  assign den_conj[0] = DCW'($signed(den[0]));
  assign den_conj[1] = -DCW'($signed(den[1]));

  complex_mult #(.AW(NW), .BW(DCW), .PW(PW)) u_num_mul (
    .clk, .rst_n, .ce, .a(num), .b(den_conj), .p(prod)
  );

  complex_mult #(.AW(DW), .BW(DCW), .PW(QW)) u_den_mul (
    .clk, .rst_n, .ce, .a(den), .b(den_conj), .p(energy)
  );

  // Normalisation to the W-bit divider inputs.
  logic [QW-1:0]  divisor_full;
  int unsigned    msb;
  int unsigned    shift;
  logic [W-1:0]   divisor;
  logic [1:0]     neg;
  logic [1:0][W-1:0] dividend;

  always_comb begin
    divisor_full = energy[0];       // |den|^2 >= 0
    msb = 0;
    for (int unsigned i = 0; i < QW; i++) begin
      if (divisor_full[i]) msb = i;
    end
    shift   = (msb > W - 1) ? msb - (W - 1) : 0;
    divisor = W'(divisor_full >> shift);
    for (int p = 0; p < 2; p++) begin
      logic [PW-1:0] mag;
      logic [SW-1:0] scaled;
      neg[p] = prod[p][PW-1];
      mag    = neg[p] ? -prod[p] : prod[p];
      scaled = (SW'(mag) << F) >> shift;
      dividend[p] = (scaled > SW'({W{1'b1}})) ? {W{1'b1}} : W'(scaled);
    end
  end

  logic [1:0][W+C-1:0] q_mag;
  logic [1:0]          neg_d;

  for (genvar p = 0; p < 2; p++) begin : g_part
    int_divider #(.W(W), .C(C)) u_div (
      .clk, .rst_n, .ce,
      .d(dividend[p]),
      .v(divisor),
      .q(q_mag[p]),
      .r()
    );
  end

  delay_line #(.WIDTH(2), .DEPTH(W + C)) u_sign_dly (
    .clk, .rst_n, .ce, .din(neg), .dout(neg_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      quot <= '0;
    end else if (ce) begin
      for (int p = 0; p < 2; p++) begin
        quot[p] <= neg_d[p] ? -{1'b0, q_mag[p]} : {1'b0, q_mag[p]};
      end
    end
  end
endmodule
