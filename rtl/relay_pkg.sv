// relay_pkg: constants and width helpers shared by the MIMO-SDM-PNC relay
// signal processing unit.
//
// Complex numbers travel as packed pairs, index [0] = real part and index
// [1] = imaginary part, both two's complement. Matrices are packed arrays
// [ROWS-1:0][COLS-1:0][1:0][WIDTH-1:0] with row 0 / column 0 as the first
// row / column of the mathematical matrix.
//
// The pipeline latencies follow the document's timing budget: a complex
// multiplier takes 3 clocks (Fig. 5 "Complex Mult. 3Ts"), a complex adder 1,
// so a matrix multiplier takes 4 and each determinant level takes 4. The
// width helpers are this design's own: every product and sum is kept at full
// precision up to the divider.
package relay_pkg;

  // Which linear detector the relay unit is built for (Fig. 2 or Fig. 3).
  typedef enum logic {
    DET_ZF   = 1'b0,
    DET_MMSE = 1'b1
  } detector_e;

  localparam int unsigned CMUL_LAT = 3;                   // complex multiplier
  localparam int unsigned CADD_LAT = 1;                   // complex adder
  localparam int unsigned MM_LAT   = CMUL_LAT + CADD_LAT; // matrix multiplier element

  // Ceiling log2, with clog2i(1) = 0.
  function automatic int unsigned clog2i(input int unsigned n);
    int unsigned r;
    r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // Width of a complex product real/imag part of AW- and BW-bit operands.
  function automatic int unsigned cmul_width(input int unsigned aw, input int unsigned bw);
    return aw + bw + 1;
  endfunction

  // Width of the sum of n signed iw-bit terms with any signs.
  function automatic int unsigned cadd_width(input int unsigned n, input int unsigned iw);
    return iw + clog2i(n) + 1;
  endfunction

  // Width of the determinant of an n x n matrix of ew-bit complex entries when
  // evaluated by first-row Laplace expansion at full precision.
  function automatic int unsigned det_width(input int unsigned n, input int unsigned ew);
    int unsigned d;
    d = ew;
    for (int unsigned k = 2; k <= n; k++) d = cadd_width(k, cmul_width(ew, d));
    return d;
  endfunction

  // Latency of the determinant calculator for an n x n matrix: 4(n-1) clocks.
  function automatic int unsigned det_latency(input int unsigned n);
    return (n <= 1) ? 0 : MM_LAT * (n - 1);
  endfunction

  // Latency of the complex divider: 3 + (w + c) + 1 clocks (Sec. III-A).
  function automatic int unsigned cdiv_latency(input int unsigned w, input int unsigned c);
    return CMUL_LAT + w + c + 1;
  endfunction

endpackage
