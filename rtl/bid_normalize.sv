// bid_normalize -- normalization unit for BID-encoded decimal64 significands.
//
// Brings both significands to a form the radix-10 recurrence can use, in the
// four cycles phase 0..3 (en must be high in each):
//   phase 0  Mx goes through the leading-one detector and the power-of-ten
//            table; the stage registers RMX (57 b) and RMY (32 b) load Mx and
//            10^ex, swapped when Mx is below 2^32 (signal th) so that the
//            small operand always takes the 32-bit port.
//   phase 1  the rectangular multiplier gives x16 = Mx*10^ex, a 16-digit
//            integer; Md goes through the LOD and table into RMX/RMY.
//   phase 2  the multiplier gives d16 = Md*10^ed.
//   phase 3  d'' = 10*d16 when x16 < d16, else 100*d16 (shift-and-add), so that
//            x16/d'' lies in [0.01, 0.1); x16 and d'' are then shifted left by
//            the same 1..7 bits so that d_norm is a 1.60 fixed-point fraction
//            in [1,2). e_d includes the extra factor of 10 or 100.
// Outputs are registered and valid from the cycle after phase 3 until the
// next phase 0. Zero significands are outside the supported range.
// The shared multiplier, the operand mux, the LOD, the 10^e table, the RMX/RMY
// swap and the 4-cycle budget follow the paper; the normalization target
// and the final alignment step are this design's own.
module bid_normalize
  import div_pkg::*;
#(
  parameter int PTW = 57,
  parameter int RYW = 32,
  parameter int PW  = 60
) (
  input  logic           clk,
  input  logic           en,
  input  logic [1:0]     phase,
  input  logic [MW-1:0]  mx,
  input  logic [MW-1:0]  md,
  output logic [OPW-1:0] x_norm,
  output logic [OPW-1:0] d_norm,
  output logic [4:0]     e_x,
  output logic [4:0]     e_d
);
  logic [MW-1:0]  m;          // operand selected by mx_xd
  logic [5:0]     lz;
  logic [4:0]     e;
  logic [PTW-1:0] pt;
  logic           th;
  logic [PTW-1:0] rmx;
  logic [RYW-1:0] rmy;
  logic [PW-1:0]  p;
  logic [PW-1:0]  x16, d16;

  assign m  = (phase == 2'd0) ? mx : md;
  assign th = (lz >= 6'(MW - RYW));  // operand fits the 32-bit port

  lod #(.N(MW), .LZW(6)) u_lod (.m(m), .lz(lz));
  exp10_table #(.PTW(PTW)) u_exp10 (.m(m), .lz(lz), .e(e), .pt(pt));
  rect_mult #(.AW(PTW), .BW(RYW), .PW(PW)) u_mult (.a(rmx), .b(rmy), .p(p));

  // phase 3 combinational: scale d by 10 or 100 and align
  logic          x_lt_d;
  logic [PW-1:0] dd;
  logic [5:0]    dlz;
  logic [2:0]    sh;
  always_comb begin
    x_lt_d = x16 < d16;
    dd     = x_lt_d ? (d16 << 3) + (d16 << 1)
                    : (d16 << 6) + (d16 << 5) + (d16 << 2);
    dlz    = 6'(PW);
    for (int i = 0; i < PW; i++)
      if (dd[i]) dlz = 6'(PW - 1 - i);
    // MSB of dd must land on bit 60 of a 61-bit word
    sh     = 3'(dlz + 6'(OPW - PW));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      unique case (phase)
        2'd0, 2'd1: begin
          if (th) begin
            rmx <= pt;
            rmy <= m[RYW-1:0];
          end else begin
            rmx <= PTW'(m);
            rmy <= pt[RYW-1:0];
          end
          if (phase == 2'd0) e_x <= e;
          else begin
            e_d <= e;
            x16 <= p;
          end
        end
        2'd2: d16 <= p;
        2'd3: begin
          e_d    <= e_d + (x_lt_d ? 5'd1 : 5'd2);
          d_norm <= OPW'(dd) << sh;
          x_norm <= OPW'(x16) << sh;
        end
      endcase
    end
  end
endmodule
