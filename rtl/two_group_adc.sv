// two_group_adc: two-group stochastic flash ADC with PDF folding.
//
// Two groups of comparators see the same differential input. Group A gets
// a differential reference of about -1.078 sigma and group B about +1.078
// sigma, which shifts the Gaussian trip-point distribution of each group to
// that mean. Between the two means the sum of the two Gaussian CDFs is close
// to a straight line (about 9 bits at best), so the sum of the two ones
// counts is a linear conversion of inputs in the range -a..+a without any
// calibration. Each group is split into N_SUB subgroups of SUB_SIZE
// comparators that can be switched off one by one (en_a, en_b) to trade
// resolution for power; a switched-off comparator contributes 0.
//
// PDF folding (fold_en = 1): every comparator has a pdf_fold_ctrl that
// swaps its differential input and reference and inverts its output until
// the comparator is seen inside the signal range, then locks. This mirrors
// useless trip points about the group mean into the signal range. With
// fold_en = 0 the converter is the plain two-group converter of the
// prototype. locked_a/locked_b show which folding controls have locked.
//
// Each group is summed by a pipelined ripple-carry adder tree (12-bit
// result for 3840 comparators); sum is the registered sum of both groups.
//
// The comparators are behavioural models (ref_comparator) with Gaussian
// offsets of standard deviation SIGMA_UV (140 mV on the prototype); the
// references are analog inputs. Everything else is synthesizable.
//
// Timing: comparators decide on the rising edge of clk; folding control,
// adder stages and the output register load on the falling edge. sum_a and
// sum_b trail the decision by NLEV + 1 falling edges (12 for 3840 per
// group), sum by one more.
module two_group_adc
  import adc_pkg::*;
#(
  parameter  int unsigned N_SUB    = 20,
  parameter  int unsigned SUB_SIZE = 192,
  parameter  int          SIGMA_UV = 140000,
  parameter  int unsigned SEED_A   = 2,
  parameter  int unsigned SEED_B   = 3,
  localparam int unsigned NG       = N_SUB * SUB_SIZE,
  localparam int unsigned W        = $clog2(NG + 1)
) (
  input  logic             clk,
  input  uvolt_t           inp,
  input  uvolt_t           inn,
  input  uvolt_t           refa_p,
  input  uvolt_t           refa_n,
  input  uvolt_t           refb_p,
  input  uvolt_t           refb_n,
  input  logic [N_SUB-1:0] en_a,
  input  logic [N_SUB-1:0] en_b,
  input  logic             fold_en,
  input  logic             lock_rst,
  output logic [W-1:0]     sum_a,
  output logic [W-1:0]     sum_b,
  output logic [W:0]       sum,
  output logic [NG-1:0]    locked_a,
  output logic [NG-1:0]    locked_b
);

  logic [NG-1:0] qa, qb;

  // One comparator with its folding switches and control.
  for (genvar i = 0; i < int'(NG); i++) begin : g_a
    logic   swap, raw, q, locked;
    uvolt_t ci_p, ci_n, cr_p, cr_n;
    assign ci_p = swap ? inn : inp;
    assign ci_n = swap ? inp : inn;
    assign cr_p = swap ? refa_n : refa_p;
    assign cr_n = swap ? refa_p : refa_n;
    ref_comparator u_cmp (
      .INP(ci_p), .INN(ci_n), .REFP(cr_p), .REFN(cr_n), .CK(clk),
      .OFFSET_UV(gauss_uv(SEED_A, i, SIGMA_UV)), .Q(raw)
    );
    pdf_fold_ctrl #(.RIGHT(1'b0)) u_fold (
      .clk(clk), .fold_en(fold_en), .lock_rst(lock_rst), .comp_q(raw),
      .swap(swap), .q(q), .locked(locked)
    );
    assign qa[i] = q & en_a[i / SUB_SIZE];
    assign locked_a[i] = locked;
  end

  for (genvar i = 0; i < int'(NG); i++) begin : g_b
    logic   swap, raw, q, locked;
    uvolt_t ci_p, ci_n, cr_p, cr_n;
    assign ci_p = swap ? inn : inp;
    assign ci_n = swap ? inp : inn;
    assign cr_p = swap ? refb_n : refb_p;
    assign cr_n = swap ? refb_p : refb_n;
    ref_comparator u_cmp (
      .INP(ci_p), .INN(ci_n), .REFP(cr_p), .REFN(cr_n), .CK(clk),
      .OFFSET_UV(gauss_uv(SEED_B, i, SIGMA_UV)), .Q(raw)
    );
    pdf_fold_ctrl #(.RIGHT(1'b1)) u_fold (
      .clk(clk), .fold_en(fold_en), .lock_rst(lock_rst), .comp_q(raw),
      .swap(swap), .q(q), .locked(locked)
    );
    assign qb[i] = q & en_b[i / SUB_SIZE];
    assign locked_b[i] = locked;
  end

  rca_tree_ones_adder #(.N(NG)) u_sum_a (.clk(clk), .bits(qa), .count(sum_a));
  rca_tree_ones_adder #(.N(NG)) u_sum_b (.clk(clk), .bits(qb), .count(sum_b));

  always_ff @(negedge clk) sum <= {1'b0, sum_a} + {1'b0, sum_b};

endmodule
