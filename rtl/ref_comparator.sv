// ref_comparator: behavioural model of the comparator cell of the two-group
// stochastic flash converter: a clocked latch comparator with a differential
// reference input, followed by a secondary latch.
//
// This is a behavioural model, not synthesizable logic. The comparator
// compares the differential input against the differential reference; the
// reference shifts the mean of the trip points of a whole group of cells
// (a change of its common mode would change their spread, which this model
// does not represent). The secondary latch keeps Q valid while the
// comparator is reset, so Q changes only at the rising edge of CK.
//
//   Q = 1 when (INP - INN) - (REFP - REFN) > OFFSET_UV
//
// OFFSET_UV is the random input-referred offset of this instance, a
// model-only input tied to a constant by the parent (a port rather than a
// parameter so that thousands of instances share one model). Noise is not
// modelled.
module ref_comparator
  import adc_pkg::*;
(
  input  uvolt_t INP,
  input  uvolt_t INN,
  input  uvolt_t REFP,
  input  uvolt_t REFN,
  input  logic   CK,
  input  int     OFFSET_UV,
  output logic   Q
);

  always_ff @(posedge CK) begin
    Q <= (int'(INP) - int'(INN)) - (int'(REFP) - int'(REFN)) > OFFSET_UV;
  end

endmodule
