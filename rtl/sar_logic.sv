// sar_logic: successive-approximation controller of the DINOSAR converter.
//
// One conversion takes N + 1 clock cycles, counted by `step`:
//   step 0      sample = 1: the input is tracked and every DAC bit is 1.
//   step 1..N   the comparator has decided on the rising edge inside the
//               step; on the falling edge that ends the step its answer
//               becomes result bit N-step. For step < N the DAC bit
//               N-1-step (weights 2**(N-2) down to 1) is pulled to 0 on
//               the side that was higher (dac_p if comp = 1, dac_n
//               otherwise), halving the remaining difference.
//   end of N    the result is latched on dout, valid pulses for one cycle,
//               and a new sample phase starts with the DAC reset to 1s.
// The first decision is the sign of the input and needs no DAC step, so an
// N-bit result uses N-1 DAC bits per side. The result is offset binary:
// code 2**(N-1) is the first step above zero differential input.
//
// Timing: registers load on the falling edge of clk, so each new DAC state
// settles during the low phase before the comparator's next rising-edge
// decision. rst_n is an asynchronous, active-low reset to step 0.
// The step schedule and the reset are this design's choices; the document
// describes the bit-by-bit procedure.
module sar_logic #(
  parameter int unsigned N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         comp,
  output logic         sample,
  output logic [N-2:0] dac_p,
  output logic [N-2:0] dac_n,
  output logic [N-1:0] dout,
  output logic         valid
);

  localparam int unsigned SW = $clog2(N + 1);

  logic [SW-1:0] step;
  logic [N-1:0]  result;

  assign sample = (step == '0);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step   <= '0;
      dac_p  <= '1;
      dac_n  <= '1;
      result <= '0;
      dout   <= '0;
      valid  <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (step == '0) begin
        dac_p <= '1;
        dac_n <= '1;
        step  <= SW'(1);
      end else begin
        result[int'(N) - int'(step)] <= comp;
        if (step < SW'(N)) begin
          if (comp) dac_p[int'(N) - 1 - int'(step)] <= 1'b0;
          else      dac_n[int'(N) - 1 - int'(step)] <= 1'b0;
          step <= step + 1'b1;
        end else begin
          dout  <= {result[N-1:1], comp};
          valid <= 1'b1;
          step  <= '0;
          dac_p <= '1;
          dac_n <= '1;
        end
      end
    end
  end

  // The step counter never leaves 0..N.
  a_step_range: assert property (@(negedge clk) disable iff (!rst_n) step <= SW'(N));

endmodule
