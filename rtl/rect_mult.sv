// rect_mult -- rectangular multiplier of the BID normalization unit.
//
// Unsigned AW x BW multiply, product truncated to PW bits (the normalized
// BID significands it forms are below 10^16, so no bit is lost).
// Combinational; written as a word-level product for synthesis to map.
module rect_mult #(
  parameter int AW = 57,
  parameter int BW = 32,
  parameter int PW = 60
) (
  input  logic [AW-1:0] a,
  input  logic [BW-1:0] b,
  output logic [PW-1:0] p
);
  logic [AW+BW-1:0] full;
  assign full = a * b;
  assign p    = full[PW-1:0];
endmodule
