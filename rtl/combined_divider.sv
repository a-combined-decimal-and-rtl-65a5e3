// combined_divider -- combined BID decimal64 / binary64 floating-point divider.
//
// One digit-recurrence datapath divides either two binary64 numbers (radix 16,
// two overlapped radix-4 digits per cycle) or two decimal64 numbers whose
// significands are binary integers (BID encoding, radix 10). The radix is
// chosen per operation by is_bfp (the CR signal). Blocks:
//   bid_normalize   decimal only: scales both significands by powers of ten
//                   with one shared rectangular multiplier (4 cycles)
//   recurrence      carry-save residual, selection by comparison (1 + N cycles)
//   convert_round   on-the-fly conversion and roundTiesToEven (2 cycles)
//   div_controller  counter / sequencer
//   exp_update      exponent, carry-out renormalization
// The sign is sx ^ sd. exact_stop tells that a decimal division ended early
// because its quotient became exact at the preferred exponent.
// Interface: operands are given unpacked (sign, biased exponent, significand;
// binary64 significands with the hidden 1 at bit 52). A start pulse while
// idle latches them; done pulses 24 cycles later for decimal (17 digits kept,
// less when the quotient becomes exact at the preferred exponent) and 17
// cycles later for binary; sq/eq/mq are valid from done until the next start.
// Only finite, non-zero (and, for binary, normal) operands and
// roundTiesToEven are supported; eq is not range-checked.
module combined_divider
  import div_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               is_bfp,
  input  logic               sx,
  input  logic               sd,
  input  logic [10:0]        ex,
  input  logic [10:0]        ed,
  input  logic [MW-1:0]      mx,
  input  logic [MW-1:0]      md,
  output logic               busy,
  output logic               done,
  output logic               sq,
  output logic signed [12:0] eq,
  output logic [QW-1:0]      mq,
  output logic               exact_stop   // decimal quotient ended early, exact
);
  // operand registers
  logic          sx_r, sd_r;
  logic [10:0]   ex_r, ed_r;
  logic [MW-1:0] mx_r, md_r;

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      sx_r <= sx;
      sd_r <= sd;
      ex_r <= ex;
      ed_r <= ed;
      mx_r <= mx;
      md_r <= md;
    end
  end

  // controller
  logic       norm_en, rec_init, rec_step, cr_shift, cr_round, r16;
  logic [1:0] norm_phase;
  logic [4:0] count;
  logic       w_sign, w_zero, x_lt_d;
  logic [4:0] e_x, e_d;
  logic signed [5:0] jp;

  assign jp = 6'(signed'({1'b0, e_d})) - 6'(signed'({1'b0, e_x}));

  div_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .radix16(is_bfp),
    .w_zero(w_zero), .jp(jp),
    .norm_en(norm_en), .norm_phase(norm_phase), .rec_init(rec_init),
    .rec_step(rec_step), .cr_shift(cr_shift), .cr_round(cr_round),
    .count(count), .r16(r16), .busy(busy), .done(done), .early_stop(exact_stop));

  // normalization (decimal)
  logic [OPW-1:0] x_norm, d_norm, x_in, d_in;

  bid_normalize u_norm (
    .clk(clk), .en(norm_en), .phase(norm_phase), .mx(mx_r), .md(md_r),
    .x_norm(x_norm), .d_norm(d_norm), .e_x(e_x), .e_d(e_d));

  // binary significands are already normalized: align 1.f52 to 1.f60
  assign x_in = r16 ? {mx_r[52:0], 8'd0} : x_norm;
  assign d_in = r16 ? {md_r[52:0], 8'd0} : d_norm;

  // recurrence
  sdigit_t qd;

  recurrence u_rec (
    .clk(clk), .rst_n(rst_n), .init(rec_init), .step(rec_step), .radix16(r16),
    .x(x_in), .d(d_in), .q(qd), .w_sign(w_sign), .w_zero(w_zero),
    .x_lt_d(x_lt_d));

  // conversion and rounding
  logic [QW-1:0] q_acc;

  convert_round u_cr (
    .clk(clk), .clear(rec_init), .shift(cr_shift), .round(cr_round),
    .radix16(r16), .half(r16 && x_lt_d), .q_in(qd), .w_sign(w_sign),
    .w_zero(w_zero), .q(q_acc));

  // exponent update and sign
  exp_update u_exp (
    .radix16(r16), .ex(ex_r), .ed(ed_r), .e_x(e_x), .e_d(e_d),
    .count(count), .x_lt_d(x_lt_d), .q(q_acc), .eq(eq), .mq(mq));

  assign sq = sx_r ^ sd_r;

  // start is only honoured when idle
  property p_done_after_start;
    @(posedge clk) disable iff (!rst_n) done |-> !busy;
  endproperty
  a_done_idle: assert property (p_done_after_start);
endmodule
