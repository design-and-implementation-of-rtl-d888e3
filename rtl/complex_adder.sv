// complex_adder: registered N-input complex adder/subtractor.
//
// It is the "Complex Number Adder" of the matrix multiplier element (Fig. 6)
// and of the determinant calculator (Fig. 7). Bit k of SUB_MASK selects
// whether term k is subtracted; the determinant uses this for the
// alternating cofactor signs. The result has IW + clog2(N) + 1 bits, enough
// for any mix of signs; a single register stage gives a latency of 1 clock
// (this design's choice, which makes a matrix multiplier 3 + 1 = 4 clocks as
// the document's timing requires).
module complex_adder #(
  parameter int unsigned N        = 4,
  parameter int unsigned IW       = 16,
  parameter int unsigned OW       = relay_pkg::cadd_width(N, IW),
  parameter logic [N-1:0] SUB_MASK = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      ce,
  input  logic [N-1:0][1:0][IW-1:0] terms,
  output logic [1:0][OW-1:0]        sum
);
  logic signed [OW-1:0] re_d, im_d, re_q, im_q;

  always_comb begin
    re_d = '0;
    im_d = '0;
    for (int unsigned k = 0; k < N; k++) begin
      if (SUB_MASK[k]) begin
        re_d = re_d - OW'($signed(terms[k][0]));
        im_d = im_d - OW'($signed(terms[k][1]));
      end else begin
        re_d = re_d + OW'($signed(terms[k][0]));
        im_d = im_d + OW'($signed(terms[k][1]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      re_q <= '0;
      im_q <= '0;
    end else if (ce) begin
      re_q <= re_d;
      im_q <= im_d;
    end
  end

  assign sum[0] = re_q;
  assign sum[1] = im_q;
endmodule
