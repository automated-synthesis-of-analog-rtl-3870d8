// tb_domino_chain: checks the domino delay-chain model. While phi is high
// the output is all zeros (reset). During evaluation the output is a
// thermometer code whose length is T_EVAL / tau with tau = 250 ps +
// (vin - 0.9 V) / (1.667 mV/ps), clamped to 0..63; it falls as the input
// rises, and the steps grow with the input (the 1/tau non-linearity).
module tb_domino_chain;
  import adc_pkg::*;
  logic phi;
  uvolt_t vin;
  logic [62:0] d;
  int checks = 0, failures = 0;

  domino_chain dut (.phi(phi), .vin(vin), .d(d));

  function automatic int expected(int v);
    int tau, n;
    tau = 250 + (v - 900000) / 1667;
    if (tau <= 0) return 63;
    n = 8000 / tau;
    if (n > 63) n = 63;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, prev;
    phi = 1'b1;
    prev = 64;
    for (int i = 0; i <= 100; i++) begin
      vin = uvolt_t'(600000 + i * 6000);     // 0.6 V .. 1.2 V
      phi = 1'b1;
      #2;
      checks++;
      if (d != '0) begin failures++; $display("FAIL not reset"); end
      phi = 1'b0;
      #2;
      n = $countones(d);
      checks += 3;
      if (n != expected(int'(vin))) begin
        failures++;
        $display("FAIL vin=%0d fired %0d want %0d", vin, n, expected(int'(vin)));
      end
      if (d != 63'((64'd1 << n) - 1)) begin failures++; $display("FAIL not a thermometer code"); end
      if (n > prev) begin failures++; $display("FAIL not monotonic"); end
      prev = n;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
