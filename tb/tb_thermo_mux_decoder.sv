// tb_thermo_mux_decoder: checks the multiplexer thermometer decoder for
// every valid 63-bit thermometer code (result = number of ones) and for
// every valid 7-bit code of a 3-bit instance.
module tb_thermo_mux_decoder;
  logic [62:0] t6;
  logic [5:0]  b6;
  logic [6:0]  t3;
  logic [2:0]  b3;
  int checks = 0, failures = 0;

  thermo_mux_decoder          dut6 (.therm(t6), .bin(b6));
  thermo_mux_decoder #(.B(3)) dut3 (.therm(t3), .bin(b3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 63; n++) begin
      t6 = 63'((64'd1 << n) - 1);
      #1;
      checks++;
      if (int'(b6) != n) begin failures++; $display("FAIL 6-bit n=%0d got %0d", n, b6); end
    end
    for (int n = 0; n <= 7; n++) begin
      t3 = 7'((8'd1 << n) - 1);
      #1;
      checks++;
      if (int'(b3) != n) begin failures++; $display("FAIL 3-bit n=%0d got %0d", n, b3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
