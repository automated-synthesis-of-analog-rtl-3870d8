// tb_nand3_comparator: checks the NAND3 comparator model.
// Drives differential inputs around the instance's offset (+-20 mV) and
// checks that Q changes only on the rising clock edge, is 1 exactly when
// INP - INN exceeds the offset, and holds its value while the clock is low
// even if the inputs move.
module tb_nand3_comparator;
  import adc_pkg::*;
  localparam int OFF = 20000;
  logic   ck = 1'b0;
  uvolt_t inp, inn;
  logic   q;
  int checks = 0, failures = 0;

  nand3_comparator dut (.INP(inp), .INN(inn), .CK(ck), .OFFSET_UV(OFF), .Q(q));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int diff, expv;
    inn = 900000;
    for (int i = 0; i < 400; i++) begin
      diff = int'($urandom_range(0, 80000)) - 40000 + OFF;
      if (i % 50 == 0) diff = OFF;          // exactly at the trip point: 0
      if (i % 50 == 1) diff = OFF + 1;      // one microvolt above: 1
      inp = uvolt_t'(900000 + diff);
      expv = (diff > OFF);
      #5 ck = 1'b1;
      #1 check(q == expv[0], $sformatf("decision diff=%0d q=%0d", diff, q));
      #4 ck = 1'b0;
      // move the input the other way during the reset phase: Q must hold
      inp = uvolt_t'(900000 + 2*OFF - diff);
      #1 check(q == expv[0], "hold while clock low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
