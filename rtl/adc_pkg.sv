// adc_pkg: types and helper functions shared by the converters.
//
// Analog quantities (input voltages, references, comparator offsets) are
// carried as signed integers in microvolts (uvolt_t). This lets the
// behavioural models of the analog cells sit in an ordinary two-state,
// cycle-based simulation next to the synthesizable digital logic.
//
// gauss_uv() produces a deterministic pseudo-random Gaussian offset for a
// comparator from its index and a seed (sum of twelve uniform variables,
// the Irwin-Hall approximation). It stands in for the device mismatch the
// stochastic converters rely on; real silicon supplies this for free.
package adc_pkg;

  // Voltage in microvolts, +-8.3 V range.
  typedef logic signed [23:0] uvolt_t;

  // One step of a 32-bit xorshift generator.
  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  // Gaussian-distributed offset with mean 0 and standard deviation sigma_uv.
  function automatic int gauss_uv(int unsigned seed, int unsigned idx, int sigma_uv);
    logic [31:0] st;
    longint acc;
    st = 32'h9E37_79B9 ^ (seed * 32'h85EB_CA6B) ^ (idx * 32'hC2B2_AE35);
    if (st == 0) st = 32'h1;
    for (int k = 0; k < 4; k++) st = xorshift32(st);
    acc = 0;
    for (int k = 0; k < 12; k++) begin
      st  = xorshift32(st);
      acc = acc + longint'(st[31:16]);
    end
    // acc - 6*65536 has unit variance in units of 65536.
    acc = (acc - 64'sd393216) * longint'(sigma_uv);
    return int'(acc / 65536);
  endfunction

endpackage
