// pdf_fold_ctrl: PDF-folding control for one comparator of a two-group
// stochastic flash converter.
//
// In a group whose offsets are centred on -a (the "left" group), a
// comparator whose offset puts its trip point below the signal range always
// answers 1 and carries no information; flipping the sign of its
// differential input (and of its output) mirrors that trip point about the
// group centre into the signal range. This block decides whether to flip.
//
// A polarity flip-flop (swap) drives the input-swapping switches and an
// XOR that restores the output polarity: q = comp_q ^ swap. While unlocked,
// swap toggles every cycle. The first time the corrected output shows the
// comparator inside the signal range, the lock flip-flop sets and swap
// stays as it is. For the left group (RIGHT = 0) "inside" means q = 0,
// for the right group (RIGHT = 1) q = 1; the right group inverts the
// XOR output fed back to the lock flip-flop.
//
// fold_en = 0 holds swap and locked at 0 (folding off, the plain
// two-group converter). lock_rst clears the lock so the search restarts.
// These two controls are this design's choice of how the lock flip-flop is
// reset; the document only says the lock flip-flop can be reset.
//
// Timing: comp_q changes at the rising clock edge (comparator decision);
// swap and locked load on the falling edge, so a new polarity is in place
// before the next decision. q is combinational from comp_q and swap.
module pdf_fold_ctrl #(
  parameter bit RIGHT = 1'b0
) (
  input  logic clk,
  input  logic fold_en,
  input  logic lock_rst,
  input  logic comp_q,
  output logic swap,
  output logic q,
  output logic locked
);

  logic in_range;

  assign q        = comp_q ^ swap;
  assign in_range = (q ^ RIGHT) == 1'b0;

  always_ff @(negedge clk) begin
    if (!fold_en) begin
      swap   <= 1'b0;
      locked <= 1'b0;
    end else if (lock_rst) begin
      locked <= 1'b0;
    end else if (!locked) begin
      if (in_range) locked <= 1'b1;
      else          swap   <= ~swap;
    end
  end

endmodule
