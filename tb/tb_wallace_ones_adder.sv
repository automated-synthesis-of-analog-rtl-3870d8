// tb_wallace_ones_adder: checks the pipelined Wallace ones counter.
// Two instances: the 7-input tree of the document's small example, whose
// latency must be 3 falling edges (two compressor layers and the final
// adder), and the full 2047-input tree. Random input words (and the
// all-zero and all-one words) are applied every cycle; each output is
// compared with the population count of the word applied LATENCY cycles
// earlier. The expected latency of the large tree is computed here from
// the layer-by-layer reduction rule (every column of c bits leaves
// ceil-ish c/3 sums and carries until no column holds more than two).
module tb_wallace_ones_adder;
  localparam int NS = 7;
  localparam int NB = 2047;

  function automatic int latency_of(int n);
    int c[32], nc[32], l;
    bit busy;
    for (int i = 0; i < 32; i++) c[i] = 0;
    c[0] = n;
    l = 0;
    busy = 1'b1;
    while (busy) begin
      busy = 1'b0;
      for (int i = 0; i < 32; i++) if (c[i] > 2) busy = 1'b1;
      if (busy) begin
        for (int i = 0; i < 32; i++) begin
          nc[i] = c[i] / 3 + (c[i] % 3 == 2) + (c[i] % 3 == 1);
          if (i > 0) nc[i] += c[i-1] / 3 + (c[i-1] % 3 == 2);
        end
        c = nc;
        l++;
      end
    end
    return l + 1;
  endfunction

  localparam int LS = 3;

  logic clk = 1'b0;
  logic [NS-1:0] bs;
  logic [NB-1:0] bb;
  logic [2:0]  cs;
  logic [10:0] cb;
  int checks = 0, failures = 0;
  int hist_s[$], hist_b[$];
  int lb;

  wallace_ones_adder #(.N(NS)) dut_s (.clk(clk), .bits(bs), .count(cs));
  wallace_ones_adder               dut_b (.clk(clk), .bits(bb), .count(cb));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lb = latency_of(NB);
    if (latency_of(NS) != LS) begin
      failures++;
      $display("FAIL latency rule gives %0d for 7 inputs", latency_of(NS));
    end
    $display("latency: 7 inputs %0d, 2047 inputs %0d", LS, lb);
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(posedge clk);
      // input changes after the rising edge, is taken at the falling edge
      bs = NS'($urandom);
      for (int k = 0; k < NB; k++) bb[k] = ($urandom_range(0, 99) < (cyc % 100));
      if (cyc % 37 == 5) begin bs = '0; bb = '0; end
      if (cyc % 37 == 6) begin bs = '1; bb = '1; end
      hist_s.push_back($countones(bs));
      hist_b.push_back($countones(bb));
      @(negedge clk);
      #1;
      if (cyc >= LS) begin
        checks++;
        if (int'(cs) != hist_s[cyc - LS + 1]) begin
          failures++;
          $display("FAIL n=7 cyc=%0d got %0d want %0d", cyc, cs, hist_s[cyc - LS + 1]);
        end
      end
      if (cyc >= lb) begin
        checks++;
        if (int'(cb) != hist_b[cyc - lb + 1]) begin
          failures++;
          $display("FAIL n=2047 cyc=%0d got %0d want %0d", cyc, cb, hist_b[cyc - lb + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
