// tb_sample_hold: checks that the sample-and-hold model follows its input
// while track is high and holds the value present when track fell,
// however the input moves afterwards.
module tb_sample_hold;
  import adc_pkg::*;
  logic   track;
  uvolt_t vin, vout;
  int checks = 0, failures = 0;

  sample_hold dut (.track(track), .vin(vin), .vout(vout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    uvolt_t held;
    track = 1'b1;
    for (int i = 0; i < 200; i++) begin
      track = 1'b1;
      for (int k = 0; k < 3; k++) begin
        vin = uvolt_t'($urandom_range(0, 1800000));
        #1;
        checks++;
        if (vout != vin) begin failures++; $display("FAIL track"); end
      end
      held = vin;
      track = 1'b0;
      for (int k = 0; k < 3; k++) begin
        #1;
        vin = uvolt_t'($urandom_range(0, 1800000));
        #1;
        checks++;
        if (vout != held) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
