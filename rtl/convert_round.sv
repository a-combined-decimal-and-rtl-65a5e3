// convert_round -- combined on-the-fly conversion and rounding unit.
//
// Assimilates the signed quotient digits into a two's complement integer,
//     Q <- r*Q + digit      (r*Q formed as 8Q + 2Q or 8Q + 8Q)
// one cycle late: on shift the digit held from the previous cycle is added
// and the incoming digit q_in is held. On round the held digit is q_R, the
// last digit kept, and q_in is the rounding digit B; with the sign and
// zero flags of the final residual the unit assimilates q_R - 1, q_R or
// q_R + 1 (roundTiesToEven):
//     t  = B - w_sign                 (tail in units of one digit, >= -r)
//     t < 0  ->  borrow: q_R - 1, t + r
//     round up when the tail exceeds U = r/2, or equals U and either the
//     residual is non-zero or the kept digit is odd.
// This is the paper's rule R = U - w_sign - (w_zero AND NOT LSB) checked
// against r and 0, except that a tie below q_R (B = -U, exact) is also
// resolved to the even neighbour.
// half (radix 16 only) selects the paper's U = 4 case: the dividend was
// x/16 with x < d, so the quotient is below 1 and its last significant bit
// is the top bit of the rounding digit. The unit then keeps that bit as
// well: it rounds the remaining three bits of the digit (tie at 4, even
// on the kept bit) and returns 2*(r*Q + q_R') + bit, where q_R' is again
// q_R - 1, q_R or q_R + 1. clear zeroes Q and the held digit. One operation
// per clock; Q is registered.
module convert_round
  import div_pkg::*;
#(
  parameter int QWIDTH = QW
) (
  input  logic              clk,
  input  logic              clear,
  input  logic              shift,
  input  logic              round,
  input  logic              radix16,
  input  logic              half,
  input  sdigit_t           q_in,
  input  logic              w_sign,
  input  logic              w_zero,
  output logic [QWIDTH-1:0] q
);
  sdigit_t hold;

  // SD -> two's complement digit and its neighbours
  logic signed [5:0] qr, qr_m1, qr_p1, t, tp, u, r;
  logic              borrow, up, up_h, carry, lo;
  logic [2:0]        tail;
  logic signed [5:0] dsel;
  logic [1:0]        mzp;   // 0: q_R-1, 1: q_R, 2: q_R+1
  logic [QWIDTH-1:0] rq, addend, sum;

  always_comb begin
    qr    = 6'(signed'(hold));
    qr_m1 = qr - 6'sd1;
    qr_p1 = qr + 6'sd1;
    r     = radix16 ? 6'sd16 : 6'sd10;
    u     = radix16 ? 6'sd8  : 6'sd5;
    t     = 6'(signed'(q_in)) - 6'(w_sign);
    borrow = t < 0;
    tp    = borrow ? t + r : t;
    up    = (tp > u) || (tp == u && (!w_zero || (borrow ? qr_m1[0] : qr[0])));
    // U = 4: bit 3 of the tail is kept, bits 2..0 are rounded
    tail  = tp[2:0];
    up_h  = (tail > 3'd4) || (tail == 3'd4 && (!w_zero || tp[3]));
    carry = half ? up_h && tp[3] : up;
    lo    = tp[3] ^ up_h;
    unique case ({borrow, carry})
      2'b10:   mzp = 2'd0;
      2'b01:   mzp = 2'd2;
      default: mzp = 2'd1;
    endcase
    if (round) begin
      unique case (mzp)
        2'd0:    dsel = qr_m1;
        2'd2:    dsel = qr_p1;
        default: dsel = qr;
      endcase
    end else begin
      dsel = qr;
    end
    rq     = radix16 ? (q << 3) + (q << 3) : (q << 3) + (q << 1);
    addend = {{(QWIDTH-6){dsel[5]}}, dsel};
    sum    = rq + addend;
  end

  always_ff @(posedge clk) begin
    if (clear) begin
      q    <= '0;
      hold <= '0;
    end else if (shift || round) begin
      q    <= (round && half) ? {sum[QWIDTH-2:0], lo} : sum;
      hold <= q_in;
    end
  end
endmodule
