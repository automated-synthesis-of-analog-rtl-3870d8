// tb_domino_adc: checks the pseudo-differential domino-logic ADC.
// phi runs at a 20-unit period with a short 4-unit reset/sample phase (the
// pulse-generator waveform). A new differential input around 0.9 V common
// mode is applied each cycle; two rising edges of phi after it was
// sampled, out must equal the negative half's fired-cell count minus the
// positive half's, each computed from the chain law
// n = 8000 / (250 + (v - 0.9 V)/1667) clamped to 0..63. A sweep of
// symmetric inputs +-x then shows the even-order error cancelled: the
// single-ended counts are clearly bent (n(+x) + n(-x) - 2 n(0) large)
// while out(+x) + out(-x) stays within one code.
module tb_domino_adc;
  import adc_pkg::*;
  localparam int VCM = 900000;
  logic   phi = 1'b1;
  uvolt_t vinp, vinn;
  logic signed [6:0] out;
  int checks = 0, failures = 0;

  domino_adc dut (.phi(phi), .vinp(vinp), .vinn(vinn), .out(out));

  function automatic int n_of(int v);
    int tau, n;
    tau = 250 + (v - VCM) / 1667;
    if (tau <= 0) return 63;
    n = 8000 / tau;
    if (n > 63) n = 63;
    if (n < 0) n = 0;
    return n;
  endfunction

  function automatic int expected(int x);
    return n_of(VCM - (x - x / 2)) - n_of(VCM + x / 2);
  endfunction

  // one phi period: sample while high, evaluate while low
  task automatic period(int x);
    vinp = uvolt_t'(VCM + x / 2);
    vinn = uvolt_t'(VCM - (x - x / 2));
    phi = 1'b1;
    #4 phi = 1'b0;
    #16;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[$];
    int bend_max, odd_err_max, o_pos, o_neg;
    for (int k = 0; k < 300; k++) begin
      xs.push_back(int'($urandom_range(0, 800000)) - 400000);
      period(xs[k]);
      // after this period's rising edge (next call), out holds sample k-1
      if (k >= 2) begin
        checks++;
        if (int'(out) != expected(xs[k - 2])) begin
          failures++;
          $display("FAIL k=%0d x=%0d got %0d want %0d", k, xs[k - 2], out, expected(xs[k - 2]));
        end
      end
    end
    // symmetric sweep
    bend_max = 0;
    odd_err_max = 0;
    for (int x = 40000; x <= 400000; x += 40000) begin
      repeat (3) period(x);
      o_pos = int'(out);
      repeat (3) period(-x);
      o_neg = int'(out);
      if (n_of(VCM + x / 2) + n_of(VCM - x / 2) - 2 * n_of(VCM) > bend_max)
        bend_max = n_of(VCM + x / 2) + n_of(VCM - x / 2) - 2 * n_of(VCM);
      if ((o_pos + o_neg) > odd_err_max) odd_err_max = o_pos + o_neg;
      if (-(o_pos + o_neg) > odd_err_max) odd_err_max = -(o_pos + o_neg);
    end
    $display("even-order error: single-ended %0d codes, differential %0d codes", bend_max, odd_err_max);
    checks++;
    if (!(bend_max >= 3 && odd_err_max <= 1)) begin
      failures++;
      $display("FAIL pseudo-differential output does not cancel the even-order error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
