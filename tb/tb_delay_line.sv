// tb_delay_line: checks that delay_line reproduces its input exactly DEPTH
// enabled clocks later while ce toggles at random, that the chain holds
// while ce = 0, and that reset clears it.
module tb_delay_line;
  localparam int unsigned WIDTH = 9;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned NVEC  = 300;

  logic clk = 0, rst_n = 0, ce = 0;
  logic [WIDTH-1:0] din, dout;
  logic [WIDTH-1:0] hist [NVEC];
  int checks = 0, failures = 0;

  delay_line #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .rst_n, .ce, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int issued, enabled;
    issued = 0; enabled = 0;
    din = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (dout !== '0) failures++;          // reset value
    rst_n = 1;
    while (enabled < NVEC + DEPTH) begin
      @(negedge clk);
      if (enabled >= DEPTH && enabled - DEPTH < NVEC) begin
        checks++;
        if (dout !== hist[enabled - DEPTH]) begin
          failures++;
          if (failures < 5) $display("mismatch at %0d: %h vs %h", enabled - DEPTH, dout, hist[enabled - DEPTH]);
        end
      end else if (enabled > 0 && enabled < DEPTH) begin
        checks++;
        if (dout !== '0) failures++;      // zeros shifted out after reset
      end
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        din = WIDTH'($urandom);
        if (issued < NVEC) hist[issued] = din;
        issued++;
        enabled++;
      end else begin
        din = WIDTH'($urandom);           // must be ignored
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
