// tb_sel_function -- for random divisors d in [1,2) and residuals w with
// |w| <= rho*d (rho = 7/9 for radix 10, 2/3 for radix 16), split at random
// into carry-save form r*w = rws + rwc, checks that the selected digit
// q = k*q_H + q_L keeps the next residual r*w - q*d within rho*d, and that
// the digits lie in their sets. The selection constants come from mk_table.
module tb_sel_function;
  logic        radix16;
  logic [13:0] ys, yc, kd_p, kd_n, kd2_p, kd2_n;
  logic [7:0]  m_h2, m_h1, m_l2, m_l1;
  logic [2:0]  d_idx;
  logic signed [2:0] q_h, q_l;
  int checks = 0, failures = 0;

  mk_table u_mk (.radix16(radix16), .d_idx(d_idx), .m_h2(m_h2), .m_h1(m_h1),
                 .m_l2(m_l2), .m_l1(m_l1));
  sel_function dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [95:0] s96_t;

  task automatic check(input bit r16, input logic [60:0] d, input int u);
    s96_t sd, w, rw, wn, kd, m;
    logic [65:0] rws, rwc;
    int k, r, q;
    r16 = r16;
    k = r16 ? 4 : 5;
    r = r16 ? 16 : 10;
    sd = s96_t'(d);
    // w = u/2^31 * rho * d
    w  = r16 ? (sd * 2 * s96_t'(u)) / 3 : (sd * 7 * s96_t'(u)) / 9;
    w  = w >>> 31;
    rw = w * r;
    rws = 66'({$urandom, $urandom, $urandom});
    rwc = 66'(rw) - rws;
    radix16 = r16;
    d_idx = d[59:57];
    ys = rws[65:52];
    yc = rwc[65:52];
    kd = sd * k;
    m  = -kd;
    kd_p = 14'(kd >>> 52);
    kd_n = 14'(m >>> 52);
    kd = sd * 8;
    m  = -kd;
    kd2_p = 14'(kd >>> 52);
    kd2_n = 14'(m >>> 52);
    #1;
    q  = k * int'(q_h) + int'(q_l);
    wn = rw - s96_t'(q) * sd;
    if (wn < 0) wn = -wn;
    checks++;
    if ((r16 ? (3 * wn > 2 * sd) : (9 * wn > 7 * sd)) ||
        (!r16 && (q_h > 1 || q_h < -1))) begin
      failures++;
      $display("FAIL r16=%0b d=%h u=%0d qh=%0d ql=%0d", r16, d, u, q_h, q_l);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [60:0] d;
      int u;
      d = {1'b1, 28'($urandom), $urandom};
      u = (i % 10 == 0) ? ((i % 20 == 0) ? 32'h7fffffff : -32'h7fffffff) : $urandom;
      check(i[0], d, u);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
