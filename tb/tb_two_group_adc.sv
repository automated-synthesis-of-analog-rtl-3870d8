// tb_two_group_adc: checks the two-group stochastic flash ADC at a reduced
// size (4 subgroups of 48 comparators per group, 140 mV offset sigma,
// group references -+1.078 sigma).
//
// A cycle-accurate reference model holds every comparator's offset (the
// same Gaussian draw as the converter) and, with folding on, its own copy
// of each polarity and lock flip-flop. Each cycle it predicts the ones
// count of each group and their sum, which are compared with sum_a, sum_b
// (7 falling edges later) and sum (8). Phases:
//   1. folding off, random inputs in -a..+a, random subgroup enables;
//   2. folding on after a lock reset, with a full-scale triangle input so
//      comparators lock; the number of polarity toggles and locks is
//      counted and must be non-zero;
//   3. with every comparator locked or settled, the span of the sum
//      between -a and +a must be clearly larger than without folding
//      (folding brings wasted comparators into the signal range).
module tb_two_group_adc;
  import adc_pkg::*;
  localparam int NSUB = 4, SUB = 48, NG = NSUB * SUB;
  localparam int SIGMA = 140000;
  localparam int A = 150920;      // 1.078 sigma
  localparam int LAT = 7;         // 64 partial counts -> 6 pair stages + 1

  logic   clk = 1'b0;
  uvolt_t inp, inn, rap, ran, rbp, rbn;
  logic [NSUB-1:0] en_a, en_b;
  logic fold_en, lock_rst;
  logic [7:0] sum_a, sum_b;
  logic [8:0] sum;
  logic [NG-1:0] lk_a, lk_b;
  int checks = 0, failures = 0;

  two_group_adc #(.N_SUB(NSUB), .SUB_SIZE(SUB)) dut (
    .clk(clk), .inp(inp), .inn(inn), .refa_p(rap), .refa_n(ran), .refb_p(rbp), .refb_n(rbn),
    .en_a(en_a), .en_b(en_b), .fold_en(fold_en), .lock_rst(lock_rst),
    .sum_a(sum_a), .sum_b(sum_b), .sum(sum), .locked_a(lk_a), .locked_b(lk_b));

  always #5 clk = ~clk;

  int off_a[NG], off_b[NG];
  bit sw_a[NG], sw_b[NG], lkm_a[NG], lkm_b[NG];
  int toggles = 0, locks = 0;
  int ha[$], hb[$];

  // One decision of every comparator plus the folding update that follows.
  task automatic model_cycle(int x);
    int ca, cb, d;
    bit raw, q, inr;
    ca = 0;
    cb = 0;
    for (int i = 0; i < NG; i++) begin
      d   = x + A;                       // group A reference is -A
      raw = sw_a[i] ? (-d > off_a[i]) : (d > off_a[i]);
      q   = raw ^ sw_a[i];
      if (q && en_a[i / SUB]) ca++;
      inr = (q == 1'b0);
      if (!fold_en) begin sw_a[i] = 0; lkm_a[i] = 0; end
      else if (lock_rst) lkm_a[i] = 0;
      else if (!lkm_a[i]) begin
        if (inr) begin lkm_a[i] = 1; locks++; end
        else begin sw_a[i] = !sw_a[i]; toggles++; end
      end
      d   = x - A;                       // group B reference is +A
      raw = sw_b[i] ? (-d > off_b[i]) : (d > off_b[i]);
      q   = raw ^ sw_b[i];
      if (q && en_b[i / SUB]) cb++;
      inr = (q == 1'b1);
      if (!fold_en) begin sw_b[i] = 0; lkm_b[i] = 0; end
      else if (lock_rst) lkm_b[i] = 0;
      else if (!lkm_b[i]) begin
        if (inr) begin lkm_b[i] = 1; locks++; end
        else begin sw_b[i] = !sw_b[i]; toggles++; end
      end
    end
    ha.push_back(ca);
    hb.push_back(cb);
  endtask

  task automatic set_x(int x);
    inp = uvolt_t'(800000 + x / 2);
    inn = uvolt_t'(800000 - (x - x / 2));
  endtask

  int cyc = 0;
  // control values applied together with the next input
  logic [NSUB-1:0] nx_en_a = '1, nx_en_b = '1;
  logic nx_fold = 1'b0, nx_lrst = 1'b0;

  // apply x and the pending controls for one cycle, advance the model,
  // check the outputs belonging to LAT cycles ago
  task automatic step(int x);
    @(negedge clk);
    #1;
    en_a = nx_en_a;
    en_b = nx_en_b;
    fold_en = nx_fold;
    lock_rst = nx_lrst;
    if (cyc >= LAT + 1) begin
      checks += 3;
      if (int'(sum_a) != ha[cyc - LAT] || int'(sum_b) != hb[cyc - LAT]) begin
        failures++;
        $display("FAIL cyc=%0d sum_a %0d/%0d sum_b %0d/%0d", cyc, sum_a, ha[cyc - LAT],
                 sum_b, hb[cyc - LAT]);
      end
      if (int'(sum) != ha[cyc - LAT - 1] + hb[cyc - LAT - 1]) begin
        failures++;
        $display("FAIL cyc=%0d sum %0d", cyc, sum);
      end
    end
    set_x(x);
    model_cycle(x);
    cyc++;
  endtask

  function automatic int tri_wave(int k, int period);
    int p;
    p = k % period;
    if (p < period / 2) return -A + 2 * A * p / (period / 2);
    return A - 2 * A * (p - period / 2) / (period / 2);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int span_plain, span_fold, lo, hi;
    for (int i = 0; i < NG; i++) begin
      off_a[i] = gauss_uv(2, i, SIGMA);
      off_b[i] = gauss_uv(3, i, SIGMA);
      sw_a[i] = 0; sw_b[i] = 0; lkm_a[i] = 0; lkm_b[i] = 0;
    end
    rap = uvolt_t'(850000 - A / 2); ran = uvolt_t'(850000 + A / 2);
    rbp = uvolt_t'(850000 + A / 2); rbn = uvolt_t'(850000 - A / 2);
    en_a = '1; en_b = '1;
    fold_en = 1'b0; lock_rst = 1'b0;
    set_x(0);
    // let the folding flip-flops clear before the model takes over
    repeat (3) @(negedge clk);

    // phase 1: no folding, random enables
    for (int k = 0; k < 200; k++) begin
      if (k % 25 == 0) begin
        nx_en_a = NSUB'($urandom);
        nx_en_b = NSUB'($urandom);
      end
      step(int'($urandom_range(0, 2 * A)) - A);
    end
    nx_en_a = '1; nx_en_b = '1;
    for (int k = 0; k < 20; k++) step(0);
    step(-A); repeat (LAT + 2) step(-A); lo = int'(sum);
    step(A);  repeat (LAT + 2) step(A);  hi = int'(sum);
    span_plain = hi - lo;

    // phase 2: folding with lock reset and a full-scale triangle
    nx_fold = 1'b1;
    nx_lrst = 1'b1;
    step(0);
    nx_lrst = 1'b0;
    for (int k = 0; k < 400; k++) step(tri_wave(k, 64));
    // phase 3: span with folding settled
    for (int k = 0; k < 20; k++) step(0);
    step(-A); repeat (LAT + 2) step(-A); lo = int'(sum);
    step(A);  repeat (LAT + 2) step(A);  hi = int'(sum);
    span_fold = hi - lo;

    $display("polarity toggles %0d, locks %0d, locked now A=%0d B=%0d of %0d",
             toggles, locks, $countones(lk_a), $countones(lk_b), NG);
    $display("output span over -a..+a: %0d codes without folding, %0d with folding",
             span_plain, span_fold);
    checks += 2;
    if (toggles == 0 || locks == 0) begin
      failures++;
      $display("FAIL folding never toggled or locked");
    end
    if (!(span_fold * 10 > span_plain * 15)) begin
      failures++;
      $display("FAIL folding did not widen the useful span");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
