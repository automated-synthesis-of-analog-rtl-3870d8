// tb_decimator: checks the decimate-by-8 register. With dec_en low the
// output follows the input one falling edge later; with dec_en high it
// changes exactly once every 8 cycles and then equals the input sampled at
// that edge.
module tb_decimator;
  logic clk = 1'b0;
  logic dec_en;
  logic [11:0] din, dout;
  int checks = 0, failures = 0;

  decimator dut (.clk(clk), .dec_en(dec_en), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] last;
    int updates, since, first_upd;
    dec_en = 1'b0;
    for (int i = 0; i < 50; i++) begin
      @(posedge clk);
      din = 12'(i * 37 + 5);
      @(negedge clk);
      #1;
      checks++;
      if (dout != din) begin
        failures++;
        $display("FAIL pass-through %0d", i);
      end
    end
    dec_en  = 1'b1;
    updates = 0;
    since   = 0;
    first_upd = -1;
    last    = dout;
    for (int i = 0; i < 400; i++) begin
      @(posedge clk);
      din = 12'(i * 53 + 11);      // a new value every cycle
      @(negedge clk);
      #1;
      since++;
      if (dout != last) begin
        updates++;
        checks++;
        if (dout != din) begin
          failures++;
          $display("FAIL decimated value");
        end
        if (first_upd >= 0 && since != 8) begin
          failures++;
          $display("FAIL update spacing %0d", since);
        end
        if (first_upd < 0) first_upd = i;
        since = 0;
        last = dout;
      end
    end
    checks++;
    if (updates < 49 || updates > 51) begin
      failures++;
      $display("FAIL %0d updates in 400 cycles", updates);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
