// szd -- sign-and-zero detection of the carry-save residual.
//
// Assimilates the two W-bit residual vectors with a carry-propagate adder and
// reports the sign (w_sign) and whether the residual is exactly zero
// (w_zero). Since the registers hold r*w, sign and zero are those of w.
// Combinational.
module szd #(
  parameter int W = 66
) (
  input  logic [W-1:0] rws,
  input  logic [W-1:0] rwc,
  output logic         w_sign,
  output logic         w_zero
);
  logic [W-1:0] sum;
  assign sum    = rws + rwc;
  assign w_sign = sum[W-1];
  assign w_zero = (sum == '0);
endmodule
