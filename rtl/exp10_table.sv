// exp10_table -- decimal shift amount and power-of-ten table of the BID
// normalization unit.
//
// From the leading-zero count lz of a 54-bit BID significand m it finds the
// number of decimal digits n of m and returns e = 16 - n together with
// pt = 10^e. The digit count is estimated from the bit length b = 54 - lz as
// n0 = floor((b-1)*log10(2)) + 1 (the digit count of 2^(b-1)) and corrected
// by one compare, m >= 10^n0. Both tables are filled at elaboration by
// constant functions. Combinational. The block names follow the normalization
// diagram; the way the digit count is found is this design's own. A zero
// significand gives e = 0.
module exp10_table
  import div_pkg::*;
#(
  parameter int PTW = 57
) (
  input  logic [MW-1:0]  m,
  input  logic [5:0]     lz,
  output logic [4:0]     e,
  output logic [PTW-1:0] pt
);
  // digit count of 2^(b-1) for b = 1..54 (entry 0 unused)
  typedef logic [54:0][4:0] ndig_tab_t;
  typedef logic [16:0][63:0] p10_tab_t;

  function automatic ndig_tab_t gen_ndig();
    ndig_tab_t t;
    logic [63:0] p;
    t[0] = '0;
    for (int b = 1; b <= 54; b++) begin
      p = 64'd1 << (b - 1);
      t[b] = 5'd1;
      for (int k = 1; k <= 16; k++)
        if (p >= pow10(k)) t[b] = 5'(k + 1);
    end
    return t;
  endfunction

  function automatic p10_tab_t gen_p10();
    p10_tab_t t;
    for (int k = 0; k <= 16; k++) t[k] = pow10(k);
    return t;
  endfunction

  localparam ndig_tab_t NDIG = gen_ndig();
  localparam p10_tab_t  P10  = gen_p10();

  logic [5:0] b;
  logic [4:0] n0, n;

  always_comb begin
    b  = 6'(MW) - lz;
    n0 = NDIG[b];
    n  = n0;
    if (b != 0 && n0 <= 5'd16 && {10'd0, m} >= P10[n0]) n = n0 + 5'd1;
    e  = (b == 0 || n > 5'(DEC_DIGITS)) ? 5'd0 : 5'(DEC_DIGITS) - n;
    pt = PTW'(P10[e]);
  end
endmodule
