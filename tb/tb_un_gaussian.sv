// tb_un_gaussian: checks the piecewise-linear un-Gaussian map for 2047
// comparators over every possible ones count 0..2047. The expected code is
// computed with real arithmetic from the five-segment formula
// (slopes 1, 1.5, 2.5; break points 549 and 775; offsets 274 and 1049),
// rounding the half-LSB terms down. Also checks that the map is monotonic
// with steps of at most 3 codes, and the one-cycle latency.
module tb_un_gaussian;
  logic clk = 1'b0;
  logic [10:0] count;
  logic signed [11:0] code;
  int checks = 0, failures = 0;

  un_gaussian dut (.clk(clk), .count(count), .code(code));

  always #5 clk = ~clk;

  function automatic int expected(int c);
    real v, r;
    v = real'(c - 1023);
    if (v > 775.0)       r = 2.5 * v - 1049.0;
    else if (v > 549.0)  r = 1.5 * v - 274.0;
    else if (v >= -549.0) r = v;
    else if (v >= -775.0) r = 1.5 * v + 274.0;
    else                 r = 2.5 * v + 1049.0;
    return int'($floor(r));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev;
    prev = -100000;
    for (int c = 0; c <= 2047; c++) begin
      @(posedge clk);
      count = 11'(c);
      @(negedge clk);
      #1;
      checks++;
      if (int'(code) != expected(c)) begin
        failures++;
        $display("FAIL count=%0d got %0d want %0d", c, code, expected(c));
      end
      if (c > 0) begin
        checks++;
        if (int'(code) < prev || int'(code) - prev > 3) begin
          failures++;
          $display("FAIL step at count=%0d: %0d -> %0d", c, prev, code);
        end
      end
      prev = int'(code);
    end
    // latency: the register must not follow a change before the falling edge
    @(posedge clk);
    count = 11'd1023;
    #1;
    checks++;
    if (code == 12'sd0) begin
      failures++;
      $display("FAIL output changed before the clock edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
