// lod -- leading-one detector of the BID normalization unit.
//
// Returns the number of leading zero bits of an N-bit significand (N when the
// input is zero). Purely combinational: a priority search from the MSB. The
// block is named in the normalization datapath; its internal structure is a
// plain priority encoder chosen here.
module lod #(
  parameter int N   = 54,
  parameter int LZW = 6
) (
  input  logic [N-1:0]   m,
  output logic [LZW-1:0] lz
);
  always_comb begin
    lz = LZW'(N);
    for (int i = 0; i < N; i++)
      if (m[i]) lz = LZW'(N - 1 - i);
  end
endmodule
