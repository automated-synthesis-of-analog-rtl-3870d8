// rca_subtractor: ripple-carry subtractor for the pseudo-differential
// domino-logic converter.
//
// diff = a - b, formed as a + ~b + 1 with a chain of full adders: b is
// inverted bit by bit and the carry into the LSB is 1 (two's complement).
// Both inputs are unsigned B-bit codes; the result is a signed B+1-bit
// number (7 bits for the document's two 6-bit outputs). Purely
// combinational.
module rca_subtractor #(
  parameter int unsigned B = 6
) (
  input  logic [B-1:0]        a,
  input  logic [B-1:0]        b,
  output logic signed [B:0]   diff
);

  logic [B:0] c;
  logic [B:0] ae, be;

  // Zero-extend both operands to B+1 bits; the extra stage gives the sign.
  assign ae = {1'b0, a};
  assign be = ~{1'b0, b};
  assign c[0] = 1'b1;

  for (genvar i = 0; i <= int'(B); i++) begin : g_fa
    assign diff[i] = ae[i] ^ be[i] ^ c[i];
    if (i < int'(B)) begin : g_c
      assign c[i+1] = (ae[i] & be[i]) | (ae[i] & c[i]) | (be[i] & c[i]);
    end
  end

endmodule
