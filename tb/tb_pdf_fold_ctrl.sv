// tb_pdf_fold_ctrl: checks the PDF-folding control of a left-group
// (RIGHT = 0) and a right-group (RIGHT = 1) comparator against a
// cycle-by-cycle reference model. The comparator answer is random and
// biased so that the "in range" answer is rare (polarity must toggle for
// a while before it locks). Checked every cycle: q is comp_q XOR swap;
// while unlocked and out of range, swap toggles on each falling edge; the
// first in-range answer sets locked and freezes swap; lock_rst restarts
// the search; fold_en = 0 clears both flip-flops.
module tb_pdf_fold_ctrl;
  logic clk = 1'b0;
  logic fold_en, lock_rst;
  logic cq0, cq1;
  logic sw0, q0, lk0, sw1, q1, lk1;
  int checks = 0, failures = 0;
  int toggles = 0, locks = 0;

  pdf_fold_ctrl #(.RIGHT(1'b0)) dut0 (.clk(clk), .fold_en(fold_en), .lock_rst(lock_rst),
                                     .comp_q(cq0), .swap(sw0), .q(q0), .locked(lk0));
  pdf_fold_ctrl #(.RIGHT(1'b1)) dut1 (.clk(clk), .fold_en(fold_en), .lock_rst(lock_rst),
                                     .comp_q(cq1), .swap(sw1), .q(q1), .locked(lk1));

  always #5 clk = ~clk;

  // reference state
  logic m_sw[2], m_lk[2];

  task automatic model_step(int r, logic cq);
    logic qq, inr;
    qq  = cq ^ m_sw[r];
    inr = (qq ^ r[0]) == 1'b0;
    if (!fold_en) begin
      m_sw[r] = 1'b0;
      m_lk[r] = 1'b0;
    end else if (lock_rst) begin
      m_lk[r] = 1'b0;
    end else if (!m_lk[r]) begin
      if (inr) begin
        m_lk[r] = 1'b1;
        if (r == 0) locks++;
      end else begin
        m_sw[r] = ~m_sw[r];
        if (r == 0) toggles++;
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fold_en  = 1'b0;
    lock_rst = 1'b0;
    cq0 = 1'b1;
    cq1 = 1'b0;
    @(negedge clk);
    m_sw[0] = 1'b0; m_lk[0] = 1'b0;
    m_sw[1] = 1'b0; m_lk[1] = 1'b0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(posedge clk);
      #1;
      fold_en  = (cyc % 500) > 3;
      lock_rst = (cyc % 100) == 50;
      // answers that are "out of range" 90% of the time
      cq0 = (($urandom_range(0, 9) != 0) ? 1'b1 : 1'b0) ^ sw0;   // q0 mostly 1
      cq1 = (($urandom_range(0, 9) != 0) ? 1'b0 : 1'b1) ^ sw1;   // q1 mostly 0
      #1;
      checks += 2;
      if (q0 != (cq0 ^ sw0)) begin failures++; $display("FAIL q0 xor"); end
      if (q1 != (cq1 ^ sw1)) begin failures++; $display("FAIL q1 xor"); end
      model_step(0, cq0);
      model_step(1, cq1);
      @(negedge clk);
      #1;
      checks += 4;
      if (sw0 != m_sw[0] || lk0 != m_lk[0]) begin
        failures++;
        $display("FAIL left cyc=%0d sw=%0d/%0d lk=%0d/%0d", cyc, sw0, m_sw[0], lk0, m_lk[0]);
      end
      if (sw1 != m_sw[1] || lk1 != m_lk[1]) begin
        failures++;
        $display("FAIL right cyc=%0d sw=%0d/%0d lk=%0d/%0d", cyc, sw1, m_sw[1], lk1, m_lk[1]);
      end
    end
    $display("polarity toggles %0d, locks %0d", toggles, locks);
    checks++;
    if (toggles < 10 || locks < 5) begin
      failures++;
      $display("FAIL folding mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
