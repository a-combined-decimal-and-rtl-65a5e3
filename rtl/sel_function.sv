// sel_function -- combined radix-10 / radix-16 quotient-digit selection.
//
// Selection by comparison. The residual estimate y = ys + yc (two's
// complement, 6 integer and 8 fraction bits, taken from the top of the
// carry-save r*w) is compared with +-m_H2 and +-m_H1 to give q_H
// (radix 16: -2..2, radix 10: -1..1). In parallel, for every q_H candidate c
// the estimate of v = r*w - c*k*d is formed as ys + yc + T(-c*k*d), where T()
// are the top bits of the exact multiples, and compared with +-m_L2, +-m_L1;
// the q_L of the candidate equal to q_H is then selected (speculative q_L).
// Constants arrive in units of 1/8 and are aligned to the 8 fraction bits
// here. Combinational. The structure (comparisons with preloaded constants,
// speculative q_L, mux by q_H) follows the paper; the estimate precision
// and the comparison arithmetic are this design's own.
module sel_function
  import div_pkg::*;
(
  input  logic          radix16,
  input  logic [YW-1:0] ys,
  input  logic [YW-1:0] yc,
  input  logic [YW-1:0] kd_p,   // T(+k*d)
  input  logic [YW-1:0] kd_n,   // T(-k*d)
  input  logic [YW-1:0] kd2_p,  // T(+2k*d), radix 16 only
  input  logic [YW-1:0] kd2_n,  // T(-2k*d), radix 16 only
  input  logic [7:0]    m_h2,
  input  logic [7:0]    m_h1,
  input  logic [7:0]    m_l2,
  input  logic [7:0]    m_l1,
  output logic signed [2:0] q_h,
  output logic signed [2:0] q_l
);
  typedef logic signed [15:0] s16_t;

  // constant in 1/8 units -> 8 fraction bits
  function automatic s16_t cst(input logic [7:0] m);
    return s16_t'({8'd0, m}) <<< 5;
  endfunction

  function automatic logic signed [2:0] pick(input s16_t v, input s16_t c2, input s16_t c1);
    if (v >= c2)       return 3'sd2;
    else if (v >= c1)  return 3'sd1;
    else if (v >= -c1) return 3'sd0;
    else if (v >= -c2) return -3'sd1;
    else               return -3'sd2;
  endfunction

  s16_t y, h2, h1, l2, l1;
  s16_t v_m2, v_m1, v_0, v_p1, v_p2;  // estimates of v for q_H = -2..2
  logic signed [2:0] ql_m2, ql_m1, ql_0, ql_p1, ql_p2;

  always_comb begin
    y  = s16_t'($signed(ys + yc));
    h2 = radix16 ? cst(m_h2) : 16'sh7fff;  // radix 10 has no q_H = +-2
    h1 = cst(m_h1);
    l2 = cst(m_l2);
    l1 = cst(m_l1);
    q_h = pick(y, h2, h1);

    v_p1 = s16_t'($signed(ys + yc + kd_n));
    v_m1 = s16_t'($signed(ys + yc + kd_p));
    v_p2 = s16_t'($signed(ys + yc + kd2_n));
    v_m2 = s16_t'($signed(ys + yc + kd2_p));
    v_0  = y;
    ql_p2 = pick(v_p2, l2, l1);
    ql_p1 = pick(v_p1, l2, l1);
    ql_0  = pick(v_0,  l2, l1);
    ql_m1 = pick(v_m1, l2, l1);
    ql_m2 = pick(v_m2, l2, l1);

    unique case (q_h)
      3'sd2:   q_l = ql_p2;
      3'sd1:   q_l = ql_p1;
      3'sd0:   q_l = ql_0;
      -3'sd1:  q_l = ql_m1;
      default: q_l = ql_m2;
    endcase
  end
endmodule
