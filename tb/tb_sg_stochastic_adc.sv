// tb_sg_stochastic_adc: end-to-end check of the single-group stochastic
// flash ADC at its full size (2047 comparators, 46 mV offset sigma).
//
// The reference model counts the comparators whose offset (the same
// Gaussian draw the converter's comparators use) lies below the applied
// differential input, then applies the five-segment un-Gaussian formula
// in real arithmetic. A new random input is applied every cycle, and both
// raw_count and out are compared with the model at their exact pipeline
// delays (raw_count 15 falling edges after the deciding rising edge, out
// two more). A slow ramp over +-1.6 sigma then checks that the correction
// makes the transfer function straighter than the raw Gaussian CDF
// (smaller endpoint-fit error), and the decimate-by-8 mode is checked to
// refresh out once every 8 cycles.
module tb_sg_stochastic_adc;
  import adc_pkg::*;
  localparam int N = 2047;
  localparam int SIGMA = 46000;
  localparam int LAT_RAW = 15;   // falling edges from decision to raw_count
  localparam int LAT_OUT = LAT_RAW + 2;

  logic   clk = 1'b0;
  uvolt_t inp, inn;
  logic   dec_en;
  logic signed [11:0] out;
  logic [10:0] raw;
  int checks = 0, failures = 0;
  int offs[N];

  sg_stochastic_adc dut (.clk(clk), .inp(inp), .inn(inn), .dec_en(dec_en),
                         .out(out), .raw_count(raw));

  always #5 clk = ~clk;

  function automatic int model_count(int x);
    int c;
    c = 0;
    for (int i = 0; i < N; i++) if (x > offs[i]) c++;
    return c;
  endfunction

  function automatic int model_code(int c);
    real v, r;
    v = real'(c - 1023);
    if (v > 775.0)        r = 2.5 * v - 1049.0;
    else if (v > 549.0)   r = 1.5 * v - 274.0;
    else if (v >= -549.0) r = v;
    else if (v >= -775.0) r = 1.5 * v + 274.0;
    else                  r = 2.5 * v + 1049.0;
    return int'($floor(r));
  endfunction

  task automatic set_x(int x);
    inp = uvolt_t'(800000 + x / 2);
    inn = uvolt_t'(800000 - (x - x / 2));
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[$];
    int x, cnt;
    real raw_err, cor_err, a, b, e;
    int rc[65], cc[65];
    int updates;
    logic signed [11:0] last;

    for (int i = 0; i < N; i++) offs[i] = gauss_uv(1, i, SIGMA);
    dec_en = 1'b0;
    set_x(0);

    // random inputs, one per cycle; input changes after the falling edge
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      #1;
      x = int'($urandom_range(0, 2 * 90000)) - 90000;
      set_x(x);
      xs.push_back(x);
      // decision for xs[cyc] happens at the next rising edge; its count is
      // loaded at the LAT_RAW-th falling edge from then on
      if (cyc >= LAT_OUT) begin
        cnt = model_count(xs[cyc - LAT_RAW]);
        checks++;
        if (int'(raw) != cnt) begin
          failures++;
          $display("FAIL raw cyc=%0d got %0d want %0d", cyc, raw, cnt);
        end
        checks++;
        if (int'(out) != model_code(model_count(xs[cyc - LAT_OUT]))) begin
          failures++;
          $display("FAIL out cyc=%0d got %0d want %0d", cyc, out,
                   model_code(model_count(xs[cyc - LAT_OUT])));
        end
      end
    end

    // ramp over +-1.6 sigma, held long enough to flush the pipeline
    for (int k = 0; k <= 64; k++) begin
      set_x((k - 32) * (SIGMA / 20));
      repeat (LAT_OUT + 2) @(negedge clk);
      rc[k] = int'(raw) - 1023;
      cc[k] = int'(out);
    end
    raw_err = 0.0;
    cor_err = 0.0;
    for (int k = 0; k <= 64; k++) begin
      a = real'(rc[0]) + real'(rc[64] - rc[0]) * k / 64.0;
      e = real'(rc[k]) - a;
      if (e < 0) e = -e;
      e = e / real'(rc[64] - rc[0]);
      if (e > raw_err) raw_err = e;
      b = real'(cc[0]) + real'(cc[64] - cc[0]) * k / 64.0;
      e = real'(cc[k]) - b;
      if (e < 0) e = -e;
      e = e / real'(cc[64] - cc[0]);
      if (e > cor_err) cor_err = e;
    end
    $display("max endpoint-fit error over +-1.6 sigma: raw %0.4f, corrected %0.4f of full scale",
             raw_err, cor_err);
    checks++;
    if (!(cor_err < raw_err / 2.0)) begin
      failures++;
      $display("FAIL correction does not straighten the transfer function");
    end

    // decimate by 8
    dec_en = 1'b1;
    updates = 0;
    last = out;
    for (int cyc = 0; cyc < 160; cyc++) begin
      @(negedge clk);
      #1;
      set_x(int'($urandom_range(0, 2 * 90000)) - 90000);
      if (out != last) updates++;
      last = out;
    end
    checks++;
    if (updates < 17 || updates > 21) begin
      failures++;
      $display("FAIL decimated output changed %0d times in 160 cycles", updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
