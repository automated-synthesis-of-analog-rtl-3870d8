// synth_adc_top: the four synthesizable analog-to-digital converters side
// by side.
//
//   sg_*   single-group stochastic flash ADC (2047 NAND3 comparators,
//          Wallace ones adder, un-Gaussian correction, decimate-by-8)
//   tg_*   two-group stochastic flash ADC (2 x 3840 comparators in 2 x 20
//          switchable subgroups, PDF folding, adder-tree ones adders)
//   dom_*  pseudo-differential domino-logic ADC (2 x 63 delay cells, 7 bits)
//   sar_*  DINOSAR, a 6-bit SAR ADC made only of NAND3-based parts
//
// The converters are independent; each has its own clock and ports.
// Analog inputs and references are microvolt integers (adc_pkg::uvolt_t)
// that drive the behavioural models of the analog cells. The domino
// converter's phase phi normally comes from a pulse generator that keeps
// the reset phase short; here it is an input. The group references of the
// two-group converter are inputs too. Parameters default to the sizes of
// the document's designs and only exist so that smaller copies can be
// simulated quickly.
module synth_adc_top
  import adc_pkg::*;
#(
  parameter  int unsigned SG_N        = 2047,
  parameter  int unsigned TG_N_SUB    = 20,
  parameter  int unsigned TG_SUB_SIZE = 192,
  parameter  int unsigned DOM_B       = 6,
  parameter  int unsigned SAR_N       = 6,
  localparam int unsigned SG_W        = $clog2(SG_N + 1),
  localparam int unsigned TG_NG       = TG_N_SUB * TG_SUB_SIZE,
  localparam int unsigned TG_W        = $clog2(TG_NG + 1)
) (
  // single-group stochastic flash
  input  logic                 sg_clk,
  input  uvolt_t               sg_inp,
  input  uvolt_t               sg_inn,
  input  logic                 sg_dec_en,
  output logic signed [SG_W:0] sg_out,
  output logic [SG_W-1:0]      sg_raw,
  // two-group stochastic flash
  input  logic                 tg_clk,
  input  uvolt_t               tg_inp,
  input  uvolt_t               tg_inn,
  input  uvolt_t               tg_refa_p,
  input  uvolt_t               tg_refa_n,
  input  uvolt_t               tg_refb_p,
  input  uvolt_t               tg_refb_n,
  input  logic [TG_N_SUB-1:0]  tg_en_a,
  input  logic [TG_N_SUB-1:0]  tg_en_b,
  input  logic                 tg_fold_en,
  input  logic                 tg_lock_rst,
  output logic [TG_W-1:0]      tg_sum_a,
  output logic [TG_W-1:0]      tg_sum_b,
  output logic [TG_W:0]        tg_sum,
  output logic [TG_NG-1:0]     tg_locked_a,
  output logic [TG_NG-1:0]     tg_locked_b,
  // domino logic
  input  logic                 dom_phi,
  input  uvolt_t               dom_vinp,
  input  uvolt_t               dom_vinn,
  output logic signed [DOM_B:0] dom_out,
  // DINOSAR
  input  logic                 sar_clk,
  input  logic                 sar_rst_n,
  input  uvolt_t               sar_vinp,
  input  uvolt_t               sar_vinn,
  output logic [SAR_N-1:0]     sar_dout,
  output logic                 sar_valid
);

  sg_stochastic_adc #(.N(SG_N)) u_sg (
    .clk(sg_clk), .inp(sg_inp), .inn(sg_inn), .dec_en(sg_dec_en),
    .out(sg_out), .raw_count(sg_raw)
  );

  two_group_adc #(.N_SUB(TG_N_SUB), .SUB_SIZE(TG_SUB_SIZE)) u_tg (
    .clk(tg_clk), .inp(tg_inp), .inn(tg_inn),
    .refa_p(tg_refa_p), .refa_n(tg_refa_n), .refb_p(tg_refb_p), .refb_n(tg_refb_n),
    .en_a(tg_en_a), .en_b(tg_en_b), .fold_en(tg_fold_en), .lock_rst(tg_lock_rst),
    .sum_a(tg_sum_a), .sum_b(tg_sum_b), .sum(tg_sum),
    .locked_a(tg_locked_a), .locked_b(tg_locked_b)
  );

  domino_adc #(.B(DOM_B)) u_dom (
    .phi(dom_phi), .vinp(dom_vinp), .vinn(dom_vinn), .out(dom_out)
  );

  dinosar_adc #(.N(SAR_N)) u_sar (
    .clk(sar_clk), .rst_n(sar_rst_n), .vinp(sar_vinp), .vinn(sar_vinn),
    .dout(sar_dout), .valid(sar_valid)
  );

endmodule
