// tb_ref_comparator: checks the reference comparator model: Q is 1 exactly
// when (INP - INN) - (REFP - REFN) exceeds the offset, sampled on the
// rising clock edge and held while the clock is low.
module tb_ref_comparator;
  import adc_pkg::*;
  localparam int OFF = -35000;
  logic   ck = 1'b0;
  uvolt_t inp, inn, refp, refn;
  logic   q;
  int checks = 0, failures = 0;

  ref_comparator dut (
    .INP(inp), .INN(inn), .REFP(refp), .REFN(refn), .CK(ck), .OFFSET_UV(OFF), .Q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, r, expv;
    for (int i = 0; i < 400; i++) begin
      x = int'($urandom_range(0, 400000)) - 200000;
      r = int'($urandom_range(0, 300000)) - 150000;
      if (i % 40 == 0) x = r + OFF;       // at the trip point
      if (i % 40 == 1) x = r + OFF + 1;
      inp  = uvolt_t'(800000 + x / 2);
      inn  = uvolt_t'(800000 - (x - x / 2));
      refp = uvolt_t'(850000 + r);
      refn = uvolt_t'(850000);
      expv = (x - r > OFF);
      #5 ck = 1'b1;
      #1 checks++;
      if (q != expv[0]) begin
        failures++;
        $display("FAIL x=%0d r=%0d q=%0d", x, r, q);
      end
      #4 ck = 1'b0;
      inp = uvolt_t'(800000 - x);
      #1 checks++;
      if (q != expv[0]) begin
        failures++;
        $display("FAIL hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
