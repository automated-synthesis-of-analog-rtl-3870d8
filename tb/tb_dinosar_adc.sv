// tb_dinosar_adc: end-to-end check of the 6-bit DINOSAR converter.
// A new differential input (0.9 V common mode, +-180 mV) is applied after
// every result; each result must equal floor((x + 180 mV) / 5.625 mV),
// clamped to 0..63, and arrive exactly 7 clock cycles after the previous
// one. Inputs beyond full scale must clamp to codes 0 and 63. A slow ramp
// across the range must give a monotonic staircase that hits all 64 codes.
module tb_dinosar_adc;
  import adc_pkg::*;
  localparam int LSB = 5625, FS = 180000, VCM = 900000;
  logic   clk = 1'b0, rst_n = 1'b0;
  uvolt_t vinp, vinn;
  logic [5:0] dout;
  logic valid;
  int checks = 0, failures = 0;

  dinosar_adc dut (.clk(clk), .rst_n(rst_n), .vinp(vinp), .vinn(vinn), .dout(dout), .valid(valid));

  always #5 clk = ~clk;

  task automatic set_x(int x);
    vinp = uvolt_t'(VCM + x / 2);
    vinn = uvolt_t'(VCM - (x - x / 2));
  endtask

  function automatic int expected(int x);
    int c;
    if (x <= -FS) return 0;
    c = (x + FS) / LSB;
    if (c > 63) c = 63;
    return c;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, nconv, since, prev_code, codes_seen;
    bit seen[64];
    set_x(1000);
    x = 1000;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    nconv = 0;
    since = 0;
    // random conversions, with some over-range inputs
    while (nconv < 400) begin
      @(negedge clk);
      #1;
      since++;
      if (valid) begin
        checks++;
        if (int'(dout) != expected(x)) begin
          failures++;
          $display("FAIL x=%0d dout=%0d want %0d", x, dout, expected(x));
        end
        if (nconv > 0) begin
          checks++;
          if (since != 7) begin failures++; $display("FAIL %0d cycles per conversion", since); end
        end
        since = 0;
        nconv++;
        x = int'($urandom_range(0, 2 * FS - 1)) - FS;
        if (nconv % 50 == 0) x = FS + 20000;
        if (nconv % 50 == 1) x = -FS - 20000;
        if ((x + FS) % LSB == 0) x++;
        set_x(x);
      end
    end
    // ramp: one conversion per step
    prev_code = -1;
    for (int i = 0; i < 64; i++) seen[i] = 0;
    for (int k = 0; k < 256; k++) begin
      x = -FS + 700 + k * (2 * FS - 1400) / 255;
      set_x(x);
      do @(negedge clk); while (!valid);
      // this result belongs to the previous input; take the next one
      do @(negedge clk); while (!valid);
      #1;
      seen[dout] = 1;
      checks++;
      if (int'(dout) < prev_code) begin failures++; $display("FAIL ramp not monotonic"); end
      prev_code = int'(dout);
    end
    codes_seen = 0;
    for (int i = 0; i < 64; i++) codes_seen += seen[i];
    checks++;
    if (codes_seen != 64) begin failures++; $display("FAIL ramp hit only %0d codes", codes_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
