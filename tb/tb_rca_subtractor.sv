// tb_rca_subtractor: checks the 6-bit ripple-carry subtractor exhaustively
// (all 4096 operand pairs) against signed integer subtraction.
module tb_rca_subtractor;
  logic [5:0] a, b;
  logic signed [6:0] diff;
  int checks = 0, failures = 0;

  rca_subtractor dut (.a(a), .b(b), .diff(diff));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a = 6'(i);
        b = 6'(j);
        #1;
        checks++;
        if (int'(diff) != i - j) begin
          failures++;
          $display("FAIL %0d - %0d gave %0d", i, j, diff);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
