// sample_hold: behavioural model of a sample-and-hold switch.
//
// This is a behavioural model of an analog switch (a bootstrapped NMOS in
// the domino-logic converter, a single PMOS per polarity in DINOSAR). While
// track is high the output follows the input; when track falls, the output
// holds the last input value. Charge injection, droop and bandwidth are not
// modelled. Voltages are microvolt integers.
module sample_hold
  import adc_pkg::*;
(
  input  logic   track,
  input  uvolt_t vin,
  output uvolt_t vout
);

  uvolt_t held;

  always_latch begin
    if (track) held = vin;
  end

  assign vout = track ? vin : held;

endmodule
