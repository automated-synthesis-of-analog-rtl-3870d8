// nand3_comparator: behavioural model of the clocked comparator made from two
// cross-coupled 3-input NAND standard cells followed by an SR latch.
//
// This is a behavioural model, not synthesizable logic: the real part is an
// analog circuit built from library NAND3, inverter and NOR2 cells that must
// be kept out of logic optimisation. While CK is low both NAND outputs are
// precharged high and the SR latch holds the last decision. On the rising
// edge of CK the two outputs race to discharge through their series NMOS
// stacks, the faster side (larger input) wins through positive feedback,
// and the SR latch takes the result. Q therefore changes only at the rising
// edge of CK and holds for the rest of the cycle.
//
// Random device mismatch gives each instance an input-referred offset; the
// stochastic converters use that offset as the comparator's trip point.
// OFFSET_UV is that offset: Q = 1 when INP - INN > OFFSET_UV. Thermal noise
// is not modelled, so a decision is repeatable.
//
// Ports follow the standard-cell netlist of the original comparator
// (INP, INN, CK, Q); the analog inputs are microvolt integers. OFFSET_UV is
// a model-only input that the real cell does not have: the parent ties it
// to the instance's constant mismatch offset. It is a port rather than a
// parameter so that thousands of instances share one model.
module nand3_comparator
  import adc_pkg::*;
(
  input  uvolt_t INP,
  input  uvolt_t INN,
  input  logic   CK,
  input  int     OFFSET_UV,
  output logic   Q
);

  always_ff @(posedge CK) begin
    Q <= (int'(INP) - int'(INN)) > OFFSET_UV;
  end

endmodule
