// tb_synth_adc_top: end-to-end test of all four converters at their full
// default sizes (no parameter overrides), run side by side.
//
//   single-group: random inputs checked code-for-code against a model
//     (comparator offsets, ones count, five-segment un-Gaussian map) at the
//     exact pipeline delay; every segment of the map must be used; then
//     decimate-by-8 mode must refresh the output once per 8 cycles.
//   two-group: 2 x 3840 comparators; a cycle-accurate model of every
//     comparator and folding flip-flop predicts both group sums. Phases:
//     all subgroups on, some subgroups off, folding on with a lock reset
//     and a full-scale triangle. Counted: subgroup-off cycles, polarity
//     toggles, locks.
//   domino: random inputs checked against the chain law, 2 cycles late.
//   DINOSAR: conversions checked against the ideal offset-binary code,
//     including over-range inputs that must clamp.
// Each mechanism's count is printed and a mechanism that never happened is
// a failure.
module tb_synth_adc_top;
  import adc_pkg::*;

  // ---------------- stimulus signals ----------------
  logic sg_clk = 0, tg_clk = 0, dom_phi = 1, sar_clk = 0, sar_rst_n = 0;
  uvolt_t sg_inp, sg_inn, tg_inp, tg_inn, tg_refa_p, tg_refa_n, tg_refb_p, tg_refb_n;
  uvolt_t dom_vinp, dom_vinn, sar_vinp, sar_vinn;
  logic sg_dec_en;
  logic [19:0] tg_en_a, tg_en_b;
  logic tg_fold_en, tg_lock_rst;
  logic signed [11:0] sg_out;
  logic [10:0] sg_raw;
  logic [11:0] tg_sum_a, tg_sum_b;
  logic [12:0] tg_sum;
  logic [3839:0] tg_locked_a, tg_locked_b;
  logic signed [6:0] dom_out;
  logic [5:0] sar_dout;
  logic sar_valid;

  synth_adc_top dut (.*);

  int checks = 0, failures = 0;
  bit done_sg = 0, done_tg = 0, done_dom = 0, done_sar = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  always #5 sg_clk  = ~sg_clk;
  always #5 tg_clk  = ~tg_clk;
  always #6 sar_clk = ~sar_clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- single-group stochastic flash ----------------
  localparam int SG_N = 2047, SG_SIGMA = 46000, SG_LAT_RAW = 15, SG_LAT_OUT = 17;
  int sg_off[SG_N];
  int seg_hits[5];
  int sg_dec_updates = 0;

  function automatic int sg_count(int x);
    int c = 0;
    for (int i = 0; i < SG_N; i++) if (x > sg_off[i]) c++;
    return c;
  endfunction

  function automatic int sg_seg(int c);
    int v = c - 1023;
    if (v > 775) return 4;
    if (v > 549) return 3;
    if (v >= -549) return 2;
    if (v >= -775) return 1;
    return 0;
  endfunction

  function automatic int sg_code(int c);
    real v, r;
    v = real'(c - 1023);
    case (sg_seg(c))
      4: r = 2.5 * v - 1049.0;
      3: r = 1.5 * v - 274.0;
      2: r = v;
      1: r = 1.5 * v + 274.0;
      default: r = 2.5 * v + 1049.0;
    endcase
    return int'($floor(r));
  endfunction

  initial begin : sg_test
    int xs[$];
    int x;
    logic signed [11:0] last;
    for (int i = 0; i < SG_N; i++) sg_off[i] = gauss_uv(1, i, SG_SIGMA);
    sg_dec_en = 0;
    sg_inp = 800000;
    sg_inn = 800000;
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge sg_clk);
      #1;
      x = int'($urandom_range(0, 2 * 110000)) - 110000;   // +-2.4 sigma
      sg_inp = uvolt_t'(800000 + x / 2);
      sg_inn = uvolt_t'(800000 - (x - x / 2));
      xs.push_back(x);
      if (cyc >= SG_LAT_OUT) begin
        checks += 2;
        if (int'(sg_raw) != sg_count(xs[cyc - SG_LAT_RAW])) fail($sformatf("sg raw cyc %0d", cyc));
        if (int'(sg_out) != sg_code(sg_count(xs[cyc - SG_LAT_OUT])))
          fail($sformatf("sg out cyc %0d", cyc));
        seg_hits[sg_seg(sg_count(xs[cyc - SG_LAT_OUT]))]++;
      end
    end
    sg_dec_en = 1;
    last = sg_out;
    for (int cyc = 0; cyc < 160; cyc++) begin
      @(negedge sg_clk);
      #1;
      x = int'($urandom_range(0, 2 * 90000)) - 90000;
      sg_inp = uvolt_t'(800000 + x / 2);
      sg_inn = uvolt_t'(800000 - (x - x / 2));
      if (sg_out != last) sg_dec_updates++;
      last = sg_out;
    end
    checks++;
    if (sg_dec_updates < 17 || sg_dec_updates > 21) fail("sg decimation rate");
    done_sg = 1;
  end

  // ---------------- two-group stochastic flash ----------------
  localparam int TG_SUB = 192, TG_NSUB = 20, TG_NG = 3840, TG_SIGMA = 140000;
  localparam int TG_A = 150920, TG_LAT = 12;
  int  ta_off[TG_NG], tb_off[TG_NG];
  bit  sa[TG_NG], sb[TG_NG], la[TG_NG], lb[TG_NG];
  int  tg_toggles = 0, tg_locks = 0, tg_sub_off_cycles = 0;
  int  ha[$], hb[$];
  logic [19:0] nx_en_a = '1, nx_en_b = '1;
  logic nx_fold = 0, nx_lrst = 0;
  int tg_cyc = 0;

  task automatic tg_model(int x);
    int ca = 0, cb = 0, d;
    bit raw, q;
    for (int i = 0; i < TG_NG; i++) begin
      d = x + TG_A;
      raw = sa[i] ? (-d > ta_off[i]) : (d > ta_off[i]);
      q = raw ^ sa[i];
      if (q && tg_en_a[i / TG_SUB]) ca++;
      if (!tg_fold_en) begin sa[i] = 0; la[i] = 0; end
      else if (tg_lock_rst) la[i] = 0;
      else if (!la[i]) begin
        if (!q) begin la[i] = 1; tg_locks++; end else begin sa[i] = !sa[i]; tg_toggles++; end
      end
      d = x - TG_A;
      raw = sb[i] ? (-d > tb_off[i]) : (d > tb_off[i]);
      q = raw ^ sb[i];
      if (q && tg_en_b[i / TG_SUB]) cb++;
      if (!tg_fold_en) begin sb[i] = 0; lb[i] = 0; end
      else if (tg_lock_rst) lb[i] = 0;
      else if (!lb[i]) begin
        if (q) begin lb[i] = 1; tg_locks++; end else begin sb[i] = !sb[i]; tg_toggles++; end
      end
    end
    ha.push_back(ca);
    hb.push_back(cb);
  endtask

  task automatic tg_step(int x);
    @(negedge tg_clk);
    #1;
    if (tg_cyc >= TG_LAT + 1) begin
      checks += 3;
      if (int'(tg_sum_a) != ha[tg_cyc - TG_LAT]) fail($sformatf("tg sum_a cyc %0d", tg_cyc));
      if (int'(tg_sum_b) != hb[tg_cyc - TG_LAT]) fail($sformatf("tg sum_b cyc %0d", tg_cyc));
      if (int'(tg_sum) != ha[tg_cyc - TG_LAT - 1] + hb[tg_cyc - TG_LAT - 1])
        fail($sformatf("tg sum cyc %0d", tg_cyc));
    end
    tg_en_a = nx_en_a;
    tg_en_b = nx_en_b;
    tg_fold_en = nx_fold;
    tg_lock_rst = nx_lrst;
    if (tg_en_a != '1 || tg_en_b != '1) tg_sub_off_cycles++;
    tg_inp = uvolt_t'(850000 + x / 2);
    tg_inn = uvolt_t'(850000 - (x - x / 2));
    tg_model(x);
    tg_cyc++;
  endtask

  initial begin : tg_test
    int p;
    for (int i = 0; i < TG_NG; i++) begin
      ta_off[i] = gauss_uv(2, i, TG_SIGMA);
      tb_off[i] = gauss_uv(3, i, TG_SIGMA);
      sa[i] = 0; sb[i] = 0; la[i] = 0; lb[i] = 0;
    end
    tg_refa_p = uvolt_t'(850000 - TG_A / 2); tg_refa_n = uvolt_t'(850000 + TG_A / 2);
    tg_refb_p = uvolt_t'(850000 + TG_A / 2); tg_refb_n = uvolt_t'(850000 - TG_A / 2);
    tg_en_a = '1; tg_en_b = '1; tg_fold_en = 0; tg_lock_rst = 0;
    tg_inp = 850000; tg_inn = 850000;
    repeat (3) @(negedge tg_clk);
    for (int k = 0; k < 100; k++) tg_step(int'($urandom_range(0, 2 * TG_A)) - TG_A);
    nx_en_a = 20'h0F0F3; nx_en_b = 20'hAAAA5;            // some subgroups off
    for (int k = 0; k < 60; k++) tg_step(int'($urandom_range(0, 2 * TG_A)) - TG_A);
    nx_en_a = '1; nx_en_b = '1;
    nx_fold = 1; nx_lrst = 1;
    tg_step(0);
    nx_lrst = 0;
    for (int k = 0; k < 200; k++) begin
      p = k % 64;
      tg_step(p < 32 ? -TG_A + 2 * TG_A * p / 32 : TG_A - 2 * TG_A * (p - 32) / 32);
    end
    for (int k = 0; k < TG_LAT + 3; k++) tg_step(0);
    done_tg = 1;
  end

  // ---------------- domino logic ----------------
  localparam int VCM = 900000;
  int dom_conv = 0;

  function automatic int dom_n(int v);
    int tau, n;
    tau = 250 + (v - VCM) / 1667;
    if (tau <= 0) return 63;
    n = 8000 / tau;
    if (n > 63) n = 63;
    if (n < 0) n = 0;
    return n;
  endfunction

  initial begin : dom_test
    int xs[$];
    for (int k = 0; k < 200; k++) begin
      xs.push_back(int'($urandom_range(0, 800000)) - 400000);
      dom_vinp = uvolt_t'(VCM + xs[k] / 2);
      dom_vinn = uvolt_t'(VCM - (xs[k] - xs[k] / 2));
      dom_phi = 1;
      #4 dom_phi = 0;
      #16;
      if (k >= 2) begin
        checks++;
        dom_conv++;
        if (int'(dom_out) != dom_n(VCM - (xs[k-2] - xs[k-2] / 2)) - dom_n(VCM + xs[k-2] / 2))
          fail($sformatf("domino k=%0d", k));
      end
    end
    done_dom = 1;
  end

  // ---------------- DINOSAR ----------------
  localparam int LSB = 5625, FS = 180000;
  int sar_conv = 0, sar_clamps = 0;

  initial begin : sar_test
    int x, want;
    x = 1000;
    sar_vinp = uvolt_t'(VCM + x / 2);
    sar_vinn = uvolt_t'(VCM - (x - x / 2));
    repeat (2) @(negedge sar_clk);
    sar_rst_n = 1;
    while (sar_conv < 200) begin
      @(negedge sar_clk);
      #1;
      if (sar_valid) begin
        if (x <= -FS) want = 0;
        else begin
          want = (x + FS) / LSB;
          if (want > 63) want = 63;
        end
        if (x <= -FS || x >= FS) sar_clamps++;
        checks++;
        if (int'(sar_dout) != want) fail($sformatf("sar x=%0d got %0d want %0d", x, sar_dout, want));
        sar_conv++;
        x = int'($urandom_range(0, 2 * FS - 1)) - FS;
        if (sar_conv % 40 == 0) x = FS + 30000;
        if (sar_conv % 40 == 1) x = -FS - 30000;
        if ((x + FS) % LSB == 0) x++;
        sar_vinp = uvolt_t'(VCM + x / 2);
        sar_vinn = uvolt_t'(VCM - (x - x / 2));
      end
    end
    done_sar = 1;
  end

  // ---------------- report ----------------
  initial begin
    wait (done_sg && done_tg && done_dom && done_sar);
    $display("single-group: un-Gaussian segment uses %0d %0d %0d %0d %0d, decimated updates %0d",
             seg_hits[0], seg_hits[1], seg_hits[2], seg_hits[3], seg_hits[4], sg_dec_updates);
    $display("two-group: subgroup-off cycles %0d, polarity toggles %0d, locks %0d, locked now %0d + %0d",
             tg_sub_off_cycles, tg_toggles, tg_locks, $countones(tg_locked_a), $countones(tg_locked_b));
    $display("domino: %0d conversions; DINOSAR: %0d conversions, %0d clamped", dom_conv, sar_conv, sar_clamps);
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (seg_hits[s] == 0) fail($sformatf("un-Gaussian segment %0d never used", s));
    end
    checks += 6;
    if (sg_dec_updates == 0) fail("decimation never happened");
    if (tg_sub_off_cycles == 0) fail("no subgroup was ever switched off");
    if (tg_toggles == 0) fail("folding never toggled a polarity");
    if (tg_locks == 0) fail("folding never locked");
    if (dom_conv == 0 || sar_conv == 0) fail("a converter never converted");
    if (sar_clamps == 0) fail("DINOSAR never saw an over-range input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
