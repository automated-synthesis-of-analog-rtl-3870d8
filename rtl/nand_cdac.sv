// nand_cdac: behavioural model of a charge-redistribution DAC built from
// 3-input NAND cells.
//
// This is a behavioural model, not synthesizable logic. The input voltage
// is held on the gate capacitance of a set of NAND3 inputs. Switching the
// digital input of a NAND3 next to that node couples a small charge step
// onto it through the overlap capacitance; cells are grouped in binary
// weights, one group per DAC bit. All bits start at 1 (reset); taking bit k
// from 1 to 0 pulls the node down by LSB_UV * 2**k. The third NAND input is
// held at 0 so the cells' outputs never switch.
//
//   vout = vhold - sum over k of (dac[k] == 0) * LSB_UV * 2**k
//
// The step size is this model's choice: with LSB_UV = 5625 a 6-bit
// converter (5 DAC bits plus the sign decision) spans 360 mV differential,
// the input amplitude used in the document's simulation. Non-linearity,
// charge injection and comparator kickback are not modelled.
module nand_cdac
  import adc_pkg::*;
#(
  parameter int unsigned NBITS  = 5,
  parameter int          LSB_UV = 5625
) (
  input  uvolt_t           vhold,
  input  logic [NBITS-1:0] dac,
  output uvolt_t           vout
);

  always_comb begin
    int drop;
    drop = 0;
    for (int k = 0; k < int'(NBITS); k++)
      if (!dac[k]) drop += LSB_UV << k;
    vout = uvolt_t'(int'(vhold) - drop);
  end

endmodule
