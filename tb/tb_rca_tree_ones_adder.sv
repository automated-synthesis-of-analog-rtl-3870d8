// tb_rca_tree_ones_adder: checks the pipelined adder-tree ones counter at
// the full group size of 3840 inputs (latency 12 falling edges: the 1-bit
// full-adder stage and 11 pairwise stages) and at 7 inputs (an odd
// leftover at every stage; latency 3). Random words with a varying density
// of ones, plus all-zero and all-one words, are compared with their
// population count at the exact latency.
module tb_rca_tree_ones_adder;
  localparam int NB = 3840, LB = 12;
  localparam int NS = 7,    LS = 3;
  logic clk = 1'b0;
  logic [NB-1:0] bb;
  logic [NS-1:0] bs;
  logic [11:0] cb;
  logic [2:0]  cs;
  int checks = 0, failures = 0;
  int hb[$], hs[$];

  rca_tree_ones_adder            dut_b (.clk(clk), .bits(bb), .count(cb));
  rca_tree_ones_adder #(.N(NS)) dut_s (.clk(clk), .bits(bs), .count(cs));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(posedge clk);
      for (int k = 0; k < NB; k++) bb[k] = ($urandom_range(0, 99) < (cyc % 101));
      bs = NS'($urandom);
      if (cyc % 41 == 7) begin bb = '0; bs = '0; end
      if (cyc % 41 == 8) begin bb = '1; bs = '1; end
      hb.push_back($countones(bb));
      hs.push_back($countones(bs));
      @(negedge clk);
      #1;
      if (cyc >= LB) begin
        checks++;
        if (int'(cb) != hb[cyc - LB + 1]) begin
          failures++;
          $display("FAIL 3840 cyc=%0d got %0d want %0d", cyc, cb, hb[cyc - LB + 1]);
        end
      end
      if (cyc >= LS) begin
        checks++;
        if (int'(cs) != hs[cyc - LS + 1]) begin
          failures++;
          $display("FAIL 7 cyc=%0d got %0d want %0d", cyc, cs, hs[cyc - LS + 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
