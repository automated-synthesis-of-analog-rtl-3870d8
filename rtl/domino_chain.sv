// domino_chain: behavioural model of a chain of dynamic "domino" delay
// cells with its thermometer output.
//
// This is a behavioural model, not synthesizable logic: each real cell is a
// small custom analog circuit (an NMOS pass device that shares charge
// between the sampled input node and the gate of a PMOS, which then
// triggers the next cell). While phi is high every cell is reset in
// parallel and d is all zeros. When phi falls the first cell fires and the
// ripple runs down the chain; the lower the sampled input vin, the faster
// each cell fires. Just before phi rises again the cells that have fired
// form a thermometer code d[0..N_CELLS-1].
//
// Model: each cell takes tau = TAU0_PS + (vin - VCM_UV) / UV_PER_PS
// picoseconds, so after an evaluation time of T_EVAL_PS the number of
// fired cells is T_EVAL_PS / tau, clamped to 0..N_CELLS. The 1/tau law is
// deliberately non-linear: it gives the strong second harmonic that the
// pseudo-differential arrangement cancels. All constants are this model's
// own; the document gives only the principle and 63 cells per chain.
//
// Timing: d is computed from vin when phi falls (start of evaluation) and
// cleared when phi rises (reset); a register clocked by the rising edge of
// phi therefore captures the final code of the cycle.
module domino_chain
  import adc_pkg::*;
#(
  parameter int unsigned N_CELLS   = 63,
  parameter int          VCM_UV    = 900000,
  parameter int          TAU0_PS   = 250,
  parameter int          UV_PER_PS = 1667,
  parameter int          T_EVAL_PS = 8000
) (
  input  logic               phi,
  input  uvolt_t             vin,
  output logic [N_CELLS-1:0] d
);

  function automatic int fired(uvolt_t v);
    int tau;
    int n;
    tau = TAU0_PS + (int'(v) - VCM_UV) / UV_PER_PS;
    if (tau <= 0) return int'(N_CELLS);
    n = T_EVAL_PS / tau;
    if (n > int'(N_CELLS)) n = int'(N_CELLS);
    if (n < 0) n = 0;
    return n;
  endfunction

  always_ff @(posedge phi or negedge phi) begin
    if (phi) begin
      d <= '0;
    end else begin
      for (int i = 0; i < int'(N_CELLS); i++) d[i] <= (i < fired(vin));
    end
  end

endmodule
