// un_gaussian: piecewise-linear inverse Gaussian CDF ("un-Gaussian") for a
// single-group stochastic flash converter.
//
// The ones count of a group of comparators with Gaussian offsets follows
// the Gaussian CDF of the input. This block maps the count back onto a
// straight line with five linear segments whose slopes are 1, 3/2 and 5/2,
// so only shifts and adds are needed. The count is first centred,
// v = count - (N-1)/2, so code 0 is the mean of the offset distribution;
// then
//     v >  BP2        : 2v + v/2 - (BP2 + BP1/2)
//     BP1 < v <= BP2  :  v + v/2 - BP1/2
//    -BP1 <= v <= BP1 :  v
//    -BP2 <= v < -BP1 :  v + v/2 + BP1/2
//     v < -BP2        : 2v + v/2 + (BP2 + BP1/2)
// v/2 is an arithmetic shift (rounds toward minus infinity). The offsets
// follow from the break points by making the curve continuous; with the
// defaults BP1 = 549 and BP2 = 775 (2047 comparators, break points at
// about 0.73 and 1.17 sigma of the offset distribution) they are 274 and
// 1049, the document's constants. Because the map depends only on the
// count, it needs no calibration.
//
// Timing: one register, loaded on the falling edge of clk.
module un_gaussian #(
  parameter  int unsigned N   = 2047,
  parameter  int          BP1 = 549,
  parameter  int          BP2 = 775,
  localparam int unsigned W   = $clog2(N + 1)
) (
  input  logic                clk,
  input  logic [W-1:0]        count,
  output logic signed [W:0]   code
);

  localparam int CENTER = int'((N - 1) / 2);
  localparam int OFF1   = BP1 / 2;
  localparam int OFF2   = BP2 + OFF1;

  // Two extra bits of headroom for the 5/2 slope.
  logic signed [W+2:0] v, half, res;

  always_comb begin
    v    = $signed({3'b000, count}) - (W+3)'(CENTER);
    half = v >>> 1;
    if (v > (W+3)'(BP2))
      res = (v <<< 1) + half - (W+3)'(OFF2);
    else if (v > (W+3)'(BP1))
      res = v + half - (W+3)'(OFF1);
    else if (v >= -(W+3)'(BP1))
      res = v;
    else if (v >= -(W+3)'(BP2))
      res = v + half + (W+3)'(OFF1);
    else
      res = (v <<< 1) + half + (W+3)'(OFF2);
  end

  always_ff @(negedge clk) code <= res[W:0];

endmodule
