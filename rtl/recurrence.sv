// recurrence -- combined radix-10 / radix-16 digit-recurrence division unit.
//
// Implements the retimed recurrence with split quotient digit q = k*qH + qL:
//     v[j] = r*w[j-1] - qH*(k*d)        (k = 5, r = 10  or  k = 4, r = 16)
//     w[j] = v[j]     - qL*d
// with the residual kept in carry-save form. The registers rws/rwc hold
// r*w[j]; a 4:2 carry-save stage forms it from w[j] as 8w + 2w (radix 10) or
// 8w + 8w (radix 16). Negative multiples of d enter a 3:2 CSA inverted, with
// the carry-in in the free LSB of the carry vector. The digits are selected by
// sel_function from the top YW bits of rws/rwc, with constants from mk_table
// preloaded at init; 5d is precomputed at init.
//
// Interface: rst_n only clears the enable of the bound assertion. init
// (one cycle) loads r*w[0], d, 5d, the multiples' estimates
// and the constants; each step cycle produces one digit into q (registered,
// signed, -10..10) and the next r*w. w_sign/w_zero come from SZD on the
// registered residual, i.e. they belong to the w whose digit was just
// registered. Numbers are fixed point with RES_FRAC fraction bits; d must lie
// in [1,2). An assertion checks the convergence bound |w| <= rho*d after
// every step.
// Initial residual: radix 10 uses w[0] = x (the normalization unit scales x
// so that x/d is in [0.01,0.1)); radix 16 uses x/16, as in the paper, so
// the quotient x/d lies in [1,2) or, when x < d, in [1/2,1). x_lt_d reports
// the second case (a compare at init) for the rounding position and the
// exponent.
module recurrence
  import div_pkg::*;
#(
  parameter int W    = RES_W,
  parameter int FRAC = RES_FRAC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init,
  input  logic           step,
  input  logic           radix16,
  input  logic [FRAC:0]  x,
  input  logic [FRAC:0]  d,
  output sdigit_t        q,
  output logic           w_sign,
  output logic           w_zero,
  output logic           x_lt_d
);
  logic [W-1:0] rws, rwc;
  logic [W-1:0] d_r, d5_r;
  logic         r16;
  logic [7:0]   m_h2, m_h1, m_l2, m_l1;
  logic [7:0]   t_h2, t_h1, t_l2, t_l1;
  logic [YW-1:0] kd_p, kd_n, kd2_p, kd2_n;

  // ---- constants and multiples, preloaded at init ----
  logic [W-1:0] d_in, d5_in, kd_in, kd2_in, nkd_in, nkd2_in;
  always_comb begin
    d_in    = W'(d);
    d5_in   = (d_in << 2) + d_in;
    kd_in   = radix16 ? (d_in << 2) : d5_in;
    kd2_in  = d_in << 3;
    nkd_in  = -kd_in;
    nkd2_in = -kd2_in;
  end

  mk_table u_mk (.radix16(radix16), .d_idx(d[FRAC-1 -: 3]),
                 .m_h2(t_h2), .m_h1(t_h1), .m_l2(t_l2), .m_l1(t_l1));

  // ---- one iteration ----
  logic signed [2:0] q_h, q_l;
  logic [W-1:0] kd, mh, ml;
  logic         cin_h, cin_l;
  logic [W-1:0] vs, vc, ws, wc, s1, c1, nrws, nrwc;

  sel_function u_sel (
    .radix16(r16), .ys(rws[W-1 -: YW]), .yc(rwc[W-1 -: YW]),
    .kd_p(kd_p), .kd_n(kd_n), .kd2_p(kd2_p), .kd2_n(kd2_n),
    .m_h2(m_h2), .m_h1(m_h1), .m_l2(m_l2), .m_l1(m_l1),
    .q_h(q_h), .q_l(q_l));

  always_comb begin
    kd = r16 ? (d_r << 2) : d5_r;
    // q_H multiple: -8d, -kd, 0, kd, 8d (subtracted)
    unique case (q_h)
      3'sd2:   begin mh = ~(d_r << 3); cin_h = 1'b1; end
      3'sd1:   begin mh = ~kd;         cin_h = 1'b1; end
      -3'sd1:  begin mh = kd;          cin_h = 1'b0; end
      -3'sd2:  begin mh = d_r << 3;    cin_h = 1'b0; end
      default: begin mh = '0;          cin_h = 1'b0; end
    endcase
    vs = rws ^ rwc ^ mh;
    vc = (((rws & rwc) | (rws & mh) | (rwc & mh)) << 1) | W'(cin_h);
    // q_L multiple: -2d, -d, 0, d, 2d (subtracted)
    unique case (q_l)
      3'sd2:   begin ml = ~(d_r << 1); cin_l = 1'b1; end
      3'sd1:   begin ml = ~d_r;        cin_l = 1'b1; end
      -3'sd1:  begin ml = d_r;         cin_l = 1'b0; end
      -3'sd2:  begin ml = d_r << 1;    cin_l = 1'b0; end
      default: begin ml = '0;          cin_l = 1'b0; end
    endcase
    ws = vs ^ vc ^ ml;
    wc = (((vs & vc) | (vs & ml) | (vc & ml)) << 1) | W'(cin_l);
    // 4:2 CSA: r*w = 8w + 2w (radix 10) or 8w + 8w (radix 16)
    s1   = (ws << 3) ^ (wc << 3) ^ (r16 ? ws << 3 : ws << 1);
    c1   = (((ws << 3) & (wc << 3)) | ((ws << 3) & (r16 ? ws << 3 : ws << 1))
            | ((wc << 3) & (r16 ? ws << 3 : ws << 1))) << 1;
    nrws = s1 ^ c1 ^ (r16 ? wc << 3 : wc << 1);
    nrwc = ((s1 & c1) | (s1 & (r16 ? wc << 3 : wc << 1))
            | (c1 & (r16 ? wc << 3 : wc << 1))) << 1;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      r16    <= radix16;
      d_r    <= d_in;
      d5_r   <= d5_in;
      m_h2   <= t_h2;
      m_h1   <= t_h1;
      m_l2   <= t_l2;
      m_l1   <= t_l1;
      kd_p   <= kd_in[W-1 -: YW];
      kd_n   <= nkd_in[W-1 -: YW];
      kd2_p  <= kd2_in[W-1 -: YW];
      kd2_n  <= nkd2_in[W-1 -: YW];
      q      <= '0;
      if (radix16) begin
        x_lt_d <= x < d;
        rws    <= W'(x);
        rwc    <= '0;
      end else begin
        x_lt_d <= 1'b0;
        rws    <= W'(x) << 3;
        rwc    <= W'(x) << 1;
      end
    end else if (step) begin
      rws <= nrws;
      rwc <= nrwc;
      q   <= r16 ? sdigit_t'(4 * int'(q_h) + int'(q_l))
                 : sdigit_t'(5 * int'(q_h) + int'(q_l));
    end
  end

  // Convergence invariant |w| <= rho*d, checked on the registered r*w:
  // radix 10: 9*|10w| <= 70*d, radix 16: 3*|16w| <= 32*d.
  logic         live;
  logic [W-1:0] rw_sum, rw_abs;
  always_ff @(posedge clk) begin
    if (!rst_n)    live <= 1'b0;
    else if (init) live <= 1'b1;
  end
  always_comb begin
    rw_sum = rws + rwc;
    rw_abs = rw_sum[W-1] ? -rw_sum : rw_sum;
  end
  always_ff @(posedge clk) begin
    if (rst_n && live && !init)
      a_bound: assert (r16 ? ((W+6)'(rw_abs) * 3 <= (W+6)'(d_r) * 32)
                           : ((W+6)'(rw_abs) * 9 <= (W+6)'(d_r) * 70))
        else $error("residual out of bound");
  end

  szd #(.W(W)) u_szd (.rws(rws), .rwc(rwc), .w_sign(w_sign), .w_zero(w_zero));
endmodule
