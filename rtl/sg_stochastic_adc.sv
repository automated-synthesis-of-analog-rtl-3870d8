// sg_stochastic_adc: single-group stochastic flash ADC.
//
// N comparators all see the same differential input; none has a reference.
// Each one's trip point is its own random offset, so the number of
// comparators that decide "1" grows with the input along the Gaussian CDF
// of the offsets. A pipelined Wallace-tree ones counter sums the decisions,
// the un-Gaussian block straightens the CDF with a five-segment
// piecewise-linear inverse, and an optional decimate-by-8 register slows
// the output down. Nothing is calibrated: the output describes the shape of
// the offset distribution, code 0 being its mean and, with 2047
// comparators, about +-699 codes being one standard deviation before
// correction.
//
// The comparators are behavioural models of the NAND3 comparator; their
// offsets are drawn at elaboration from a Gaussian of standard deviation
// SIGMA_UV (46 mV as measured on the 2047-comparator prototype) with seed
// SEED. Everything else is synthesizable.
//
// Interface: clk, differential input inp/inn (microvolts), dec_en; out is
// the corrected signed code (12 bits for N = 2047), raw_count the ones
// count before correction.
//
// Timing: comparators decide on the rising edge of clk, all digital stages
// load on the falling edge. raw_count appears after the Wallace latency
// (layers + 1 falling edges, 15 for N = 2047), out two falling edges after
// raw_count (un-Gaussian register, then output register). With dec_en high
// out is refreshed every 8th cycle.
//
// Break points of the un-Gaussian map are the document's values (549, 775)
// scaled by N/2047, which leaves them unchanged at the default size.
module sg_stochastic_adc
  import adc_pkg::*;
#(
  parameter  int unsigned N        = 2047,
  parameter  int          SIGMA_UV = 46000,
  parameter  int unsigned SEED     = 1,
  localparam int unsigned W        = $clog2(N + 1)
) (
  input  logic              clk,
  input  uvolt_t            inp,
  input  uvolt_t            inn,
  input  logic              dec_en,
  output logic signed [W:0] out,
  output logic [W-1:0]      raw_count
);

  localparam int BP1 = int'((549 * N + 1023) / 2047);
  localparam int BP2 = int'((775 * N + 1023) / 2047);

  logic [N-1:0]      q;
  logic signed [W:0] lin;

  for (genvar i = 0; i < int'(N); i++) begin : g_cmp
    nand3_comparator u_cmp (
      .INP      (inp),
      .INN      (inn),
      .CK       (clk),
      .OFFSET_UV(gauss_uv(SEED, i, SIGMA_UV)),
      .Q        (q[i])
    );
  end

  wallace_ones_adder #(.N(N)) u_ones (
    .clk  (clk),
    .bits (q),
    .count(raw_count)
  );

  un_gaussian #(.N(N), .BP1(BP1), .BP2(BP2)) u_ungauss (
    .clk  (clk),
    .count(raw_count),
    .code (lin)
  );

  decimator #(.WIDTH(W + 1), .DEC_BITS(3)) u_dec (
    .clk   (clk),
    .dec_en(dec_en),
    .din   (lin),
    .dout  (out)
  );

endmodule
