// tb_sar_logic: checks the SAR controller with an ideal comparator and DAC
// modelled here. For each conversion a differential input x in
// +-180 mV is chosen; the model comparator decides on rising edges from x
// minus the DAC steps (5.625 mV times the bit weight per cleared bit).
// Checked: sample is high for exactly one cycle per conversion and the DAC
// is all ones then; during the search at most one DAC bit is cleared per
// cycle and never on both sides at once; valid pulses every 7 cycles; and
// dout equals floor((x + 180 mV) / 5.625 mV), the offset-binary code.
module tb_sar_logic;
  localparam int LSB = 5625, FS = 180000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic comp, sample, valid;
  logic [4:0] dp, dn;
  logic [5:0] dout;
  int checks = 0, failures = 0;
  int x;

  sar_logic dut (.clk(clk), .rst_n(rst_n), .comp(comp), .sample(sample),
                 .dac_p(dp), .dac_n(dn), .dout(dout), .valid(valid));

  always #5 clk = ~clk;

  function automatic int drop(logic [4:0] d);
    int s;
    s = 0;
    for (int k = 0; k < 5; k++) if (!d[k]) s += LSB << k;
    return s;
  endfunction

  always @(posedge clk) comp <= (x - drop(dp) + drop(dn)) > 0;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, cyc_since, nconv, cleared_prev, cleared;
    x = 1000;
    comp = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    nconv = 0;
    cyc_since = 0;
    cleared_prev = 0;
    while (nconv < 300) begin
      @(negedge clk);
      #1;
      cyc_since++;
      if (valid) begin
        want = (x + FS) / LSB;
        if (want > 63) want = 63;
        checks++;
        if (int'(dout) != want) begin
          failures++;
          $display("FAIL x=%0d dout=%0d want %0d", x, dout, want);
        end
        if (nconv > 0) begin
          checks++;
          if (cyc_since != 7) begin failures++; $display("FAIL conversion took %0d cycles", cyc_since); end
        end
        cyc_since = 0;
        nconv++;
      end
      cleared = $countones(~dp) + $countones(~dn);
      if (sample) begin
        checks++;
        if (dp != '1 || dn != '1) begin failures++; $display("FAIL DAC not reset while sampling"); end
        // new input for the next conversion (taken while sampling)
        x = int'($urandom_range(0, 2 * FS - 1)) - FS;
        if ((x + FS) % LSB == 0) x++;
      end else begin
        checks++;
        if (cleared - cleared_prev > 1) begin failures++; $display("FAIL two DAC bits in one step"); end
        if ((~dp & ~dn) != '0) begin failures++; $display("FAIL same bit cleared on both sides"); end
      end
      cleared_prev = sample ? 0 : cleared;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
