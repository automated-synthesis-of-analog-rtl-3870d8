// domino_adc: pseudo-differential domino-logic ADC.
//
// Each half samples its input while phi is high and then, while phi is
// low, lets a ripple run down a chain of 2**B - 1 dynamic delay cells at a
// speed set by the sampled voltage (lower voltage, faster ripple). The
// cells that fired by the end of the evaluation phase form a thermometer
// code. On the rising edge of phi that code is captured by flip-flops
// (true single-phase-clock flip-flops inside each cell in the original),
// decoded to binary by a multiplexer decoder during the following cycle,
// and the two halves are subtracted by a ripple-carry subtractor. The
// subtraction cancels the even-order distortion of the non-linear
// voltage-to-delay conversion. With 63 cells per half the two 6-bit codes
// give a 7-bit signed result.
//
// The sample-and-hold switches and the delay chains are behavioural models;
// the capture registers, decoders and subtractor are synthesizable.
// phi comes from a pulse generator outside this block that keeps the
// reset/sample phase short.
//
// Sign: the negative half's code minus the positive half's code, so a
// positive differential input (vinp > vinn) gives a positive result.
//
// Timing: the input sampled while phi is high in cycle k is captured as a
// thermometer code at the rising edge that ends cycle k, and appears on out
// one rising edge of phi later (two rising edges after sampling).
module domino_adc
  import adc_pkg::*;
#(
  parameter int unsigned B = 6
) (
  input  logic            phi,
  input  uvolt_t          vinp,
  input  uvolt_t          vinn,
  output logic signed [B:0] out
);

  localparam int unsigned NC = (2**B) - 1;

  uvolt_t            hold_p, hold_n;
  logic [NC-1:0]     d_p, d_n;       // domino outputs
  logic [NC-1:0]     t_p, t_n;       // captured thermometer codes
  logic [B-1:0]      bin_p, bin_n;
  logic signed [B:0] diff;

  sample_hold u_sh_p (.track(phi), .vin(vinp), .vout(hold_p));
  sample_hold u_sh_n (.track(phi), .vin(vinn), .vout(hold_n));

  domino_chain #(.N_CELLS(NC)) u_chain_p (.phi(phi), .vin(hold_p), .d(d_p));
  domino_chain #(.N_CELLS(NC)) u_chain_n (.phi(phi), .vin(hold_n), .d(d_n));

  always_ff @(posedge phi) begin
    t_p <= d_p;
    t_n <= d_n;
  end

  thermo_mux_decoder #(.B(B)) u_dec_p (.therm(t_p), .bin(bin_p));
  thermo_mux_decoder #(.B(B)) u_dec_n (.therm(t_n), .bin(bin_n));

  rca_subtractor #(.B(B)) u_sub (.a(bin_n), .b(bin_p), .diff(diff));

  always_ff @(posedge phi) out <= diff;

endmodule
