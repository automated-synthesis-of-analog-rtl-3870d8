// decimator: optional decimate-by-2**DEC_BITS output register.
//
// A free-running DEC_BITS-bit counter advances on every falling clock edge.
// With dec_en high the output register loads only when the counter is zero,
// i.e. once every 2**DEC_BITS cycles (every 8 cycles by default, as in the
// document's converter, whose dec_en was an external pin); with dec_en low
// it loads every cycle. Nothing is filtered: this is plain down-sampling,
// used to bring a fast converter's output off chip at a lower rate.
//
// Timing: the counter and output register load on the falling edge of clk;
// dout follows din one cycle later when it loads. The counter has no reset
// (as in the original); it is free-running and its phase is arbitrary.
module decimator #(
  parameter int unsigned WIDTH    = 12,
  parameter int unsigned DEC_BITS = 3
) (
  input  logic             clk,
  input  logic             dec_en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [DEC_BITS-1:0] dec_cnt;

  always_ff @(negedge clk) begin
    if (dec_en) begin
      if (dec_cnt == '0) dout <= din;
      dec_cnt <= dec_cnt + 1'b1;
    end else begin
      dout <= din;
    end
  end

endmodule
