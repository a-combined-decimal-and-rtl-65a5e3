// mk_table -- quotient-digit selection constants for the combined recurrence.
//
// For the divisor interval given by the three fraction bits after the
// leading 1 of d (d in [1,2)), returns the comparison constants m_H2, m_H1,
// m_L2 and m_L1 in units of 1/8. Only the positive constants are stored; the
// negative ones are their two's complements (m_{-1} = -m_2, m_0 = -m_1).
// Radix 16 uses the constants of the paper's radix-16 table. The radix-10
// constants (m_H2 unused) are this design's own, chosen for d in [1,2),
// redundancy factor 7/9 and the estimate errors of sel_function (at most 2/256
// for q_H, 3/256 for q_L). Combinational.
module mk_table (
  input  logic       radix16,
  input  logic [2:0] d_idx,
  output logic [7:0] m_h2,
  output logic [7:0] m_h1,
  output logic [7:0] m_l2,
  output logic [7:0] m_l1
);
  typedef logic [7:0][7:0] row_t;
  localparam row_t R16_H2 = {8'd88, 8'd88, 8'd80, 8'd72, 8'd68, 8'd66, 8'd56, 8'd50};
  localparam row_t R16_H1 = {8'd28, 8'd28, 8'd24, 8'd24, 8'd20, 8'd20, 8'd16, 8'd16};
  localparam row_t R16_L2 = {8'd22, 8'd22, 8'd20, 8'd18, 8'd17, 8'd16, 8'd14, 8'd13};
  localparam row_t R16_L1 = {8'd7,  8'd7,  8'd6,  8'd6,  8'd5,  8'd5,  8'd4,  8'd4};
  localparam row_t R10_H1 = {8'd39, 8'd36, 8'd34, 8'd31, 8'd29, 8'd26, 8'd24, 8'd21};
  localparam row_t R10_L2 = {8'd23, 8'd22, 8'd21, 8'd19, 8'd17, 8'd16, 8'd14, 8'd13};
  localparam row_t R10_L1 = {8'd8,  8'd7,  8'd7,  8'd6,  8'd6,  8'd5,  8'd5,  8'd4};

  always_comb begin
    if (radix16) begin
      m_h2 = R16_H2[d_idx];
      m_h1 = R16_H1[d_idx];
      m_l2 = R16_L2[d_idx];
      m_l1 = R16_L1[d_idx];
    end else begin
      m_h2 = 8'd0;
      m_h1 = R10_H1[d_idx];
      m_l2 = R10_L2[d_idx];
      m_l1 = R10_L1[d_idx];
    end
  end
endmodule
