// thermo_mux_decoder: multiplexer-based thermometer-to-binary decoder.
//
// For a thermometer code of 2**B - 1 bits, the most significant output bit
// is the middle thermometer bit. That bit then selects, through a
// multiplexer, which half of the code the next bit is taken from (the
// middle of the upper or of the lower half), and so on down to the LSB: B
// levels of 2:1 multiplexers, one thermometer bit read per level. For a
// valid thermometer code the result is the number of ones; a single bubble
// can only move the result to a neighbouring segment of the code.
//
// Purely combinational; in the domino-logic converter it is given a whole
// clock cycle between the thermometer latch and the output register.
module thermo_mux_decoder #(
  parameter int unsigned B = 6
) (
  input  logic [(2**B)-2:0] therm,
  output logic [B-1:0]      bin
);

  always_comb begin
    int unsigned base;
    base = 0;
    for (int b = int'(B) - 1; b >= 0; b--) begin
      bin[b] = therm[base + (1 << b) - 1];
      if (bin[b]) base = base + (1 << b);
    end
  end

endmodule
