// dinosar_adc: DINOSAR, a digitally implemented NAND-only
// successive-approximation ADC.
//
// A charge-redistribution SAR converter in which every analog part is made
// of standard NAND3 cells: the comparator is two cross-coupled NAND3 gates
// with an SR latch, and the DAC is a set of NAND3 inputs whose switching
// couples charge onto the held input nodes. There are no drawn capacitors;
// the parasitic gate and wiring capacitance holds the samples.
//
// Each polarity of the differential input is sampled by a single switch
// onto its node while all DAC bits are 1. The comparator then decides
// which node is higher and the SAR logic pulls that node down by half of
// the remaining range; the lower node is never touched. After N decisions
// the difference between the nodes has been driven close to zero and the
// decisions are the N-bit result (offset binary; 6 bits by default, as in
// the document's simulated design).
//
// The switches, DAC and comparator are behavioural models; the SAR logic is
// synthesizable. Interface: clk, rst_n, differential input vinp/vinn in
// microvolts; dout with a one-cycle valid pulse every N + 1 cycles.
// Timing: see sar_logic; the comparator decides on rising edges, the SAR
// logic acts on falling edges. With N = 6 a conversion takes 7 clock
// cycles, so the document's 12.5 MS/s corresponds to an 87.5 MHz clock in
// this schedule.
module dinosar_adc
  import adc_pkg::*;
#(
  parameter int unsigned N         = 6,
  parameter int          LSB_UV    = 5625,
  parameter int          OFFSET_UV = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  uvolt_t       vinp,
  input  uvolt_t       vinn,
  output logic [N-1:0] dout,
  output logic         valid
);

  logic         sample, comp;
  logic [N-2:0] dac_p, dac_n;
  uvolt_t       hold_p, hold_n, node_p, node_n;

  sample_hold u_sh_p (.track(sample), .vin(vinp), .vout(hold_p));
  sample_hold u_sh_n (.track(sample), .vin(vinn), .vout(hold_n));

  nand_cdac #(.NBITS(N - 1), .LSB_UV(LSB_UV)) u_dac_p (.vhold(hold_p), .dac(dac_p), .vout(node_p));
  nand_cdac #(.NBITS(N - 1), .LSB_UV(LSB_UV)) u_dac_n (.vhold(hold_n), .dac(dac_n), .vout(node_n));

  nand3_comparator u_cmp (
    .INP(node_p), .INN(node_n), .CK(clk), .OFFSET_UV(OFFSET_UV), .Q(comp)
  );

  sar_logic #(.N(N)) u_sar (
    .clk(clk), .rst_n(rst_n), .comp(comp), .sample(sample),
    .dac_p(dac_p), .dac_n(dac_n), .dout(dout), .valid(valid)
  );

endmodule
