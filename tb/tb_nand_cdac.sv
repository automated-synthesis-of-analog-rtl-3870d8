// tb_nand_cdac: checks the NAND3 DAC model for all 32 codes of a 5-bit
// DAC: every bit at 0 pulls the held node down by 5.625 mV times its
// binary weight, and the all-ones (reset) code leaves the node unchanged.
module tb_nand_cdac;
  import adc_pkg::*;
  uvolt_t vh, vo;
  logic [4:0] dac;
  int checks = 0, failures = 0;

  nand_cdac dut (.vhold(vh), .dac(dac), .vout(vo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    for (int r = 0; r < 10; r++) begin
      vh = uvolt_t'(700000 + $urandom_range(0, 400000));
      for (int c = 0; c < 32; c++) begin
        dac = 5'(c);
        #1;
        want = int'(vh) - 5625 * (31 - c);
        checks++;
        if (int'(vo) != want) begin
          failures++;
          $display("FAIL code %0d got %0d want %0d", c, vo, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
