// delay_line: clock-enabled shift register that delays a WIDTH-bit word by
// DEPTH clocks. It realises the alignment delays of the relay unit (for
// example delay(w+c+20)Ts on the Hermitian channel matrix and delay(5)Ts on
// the noise variance). The delays are the document's; building them as a
// plain register chain is this design's choice.
//
// Interface: din is sampled on each rising clk edge where ce = 1 and appears
// on dout DEPTH enabled edges later. ce = 0 freezes the whole chain. DEPTH = 0
// is a wire. rst_n (asynchronous, active low) clears every stage.
module delay_line #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [DEPTH-1:0][WIDTH-1:0] stage_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int unsigned i = 0; i < DEPTH; i++) stage_q[i] <= '0;
      end else if (ce) begin
        stage_q[0] <= din;
        for (int unsigned i = 1; i < DEPTH; i++) stage_q[i] <= stage_q[i-1];
      end
    end
    assign dout = stage_q[DEPTH-1];
  end
endmodule
