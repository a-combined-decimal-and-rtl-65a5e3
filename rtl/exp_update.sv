// exp_update -- quotient exponent and final normalization.
//
// Combinational. Forms the biased quotient exponent and, when rounding
// carried the quotient out of its range (2^53 for binary, 10^16 for
// decimal), divides the significand by the radix and adds one to the
// exponent.
//   binary : eq = Ex - Ed + 1023 - x_lt_d              (+1 on carry-out)
//   decimal: eq = Ex - Ed + 398 + e_d - e_x - count    (+1 on carry-out)
// where e_x, e_d are the powers of ten applied by the normalization unit
// and count the number of quotient digits kept. eq is a signed 13-bit value
// and is not range-checked. Biases follow the 64-bit format parameters; the
// formulas follow from this design's operand scaling.
module exp_update
  import div_pkg::*;
#(
  parameter int BIAS_BIN = BIAS_B,
  parameter int BIAS_DEC = BIAS_D
) (
  input  logic               radix16,
  input  logic [10:0]        ex,
  input  logic [10:0]        ed,
  input  logic [4:0]         e_x,
  input  logic [4:0]         e_d,
  input  logic [4:0]         count,
  input  logic               x_lt_d,
  input  logic [QW-1:0]      q,
  output logic signed [12:0] eq,
  output logic [QW-1:0]      mq
);
  localparam logic [QW-1:0] TEN16 = QW'(pow10(16));
  localparam logic [QW-1:0] TEN15 = QW'(pow10(15));
  logic ovf;
  logic signed [12:0] base;

  always_comb begin
    base = 13'(signed'({2'b0, ex})) - 13'(signed'({2'b0, ed}));
    if (radix16) begin
      ovf = q[QW-1];
      mq  = ovf ? q >> 1 : q;
      eq  = base + 13'(BIAS_BIN) - 13'(x_lt_d) + 13'(ovf);
    end else begin
      ovf = q == TEN16;
      mq  = ovf ? TEN15 : q;
      eq  = base + 13'(BIAS_DEC) + 13'(e_d) - 13'(e_x) - 13'(count) + 13'(ovf);
    end
  end
endmodule
