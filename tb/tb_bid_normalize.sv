// tb_bid_normalize -- runs the four normalization cycles on random and
// boundary BID significands and checks, against values computed here:
//   x16 = Mx*10^(16-digits(Mx)), d16 likewise, d'' = 10*d16 if x16 < d16
//   else 100*d16; d_norm = d'' shifted so that its MSB is bit 60, x_norm =
//   x16 shifted by the same amount; e_x, e_d (e_d with the extra 1 or 2);
//   and that x_norm/d_norm lies in [0.01, 0.1).
module tb_bid_normalize;
  logic        clk = 0, en = 0;
  logic [1:0]  phase = 0;
  logic [53:0] mx, md;
  logic [60:0] x_norm, d_norm;
  logic [4:0]  e_x, e_d;
  int checks = 0, failures = 0;

  bid_normalize dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ndig(input logic [63:0] v);
    int n = 0;
    while (v != 0) begin v = v / 10; n++; end
    return n;
  endfunction

  function automatic logic [63:0] p10(input int n);
    logic [63:0] v = 1;
    for (int i = 0; i < n; i++) v = v * 10;
    return v;
  endfunction

  task automatic check(input logic [53:0] a, input logic [53:0] b);
    logic [63:0] x16, d16, dd;
    int ex_w, ed_w, sh;
    logic [127:0] lhs, rhs;
    ex_w = 16 - ndig(64'(a));
    ed_w = 16 - ndig(64'(b));
    x16  = 64'(a) * p10(ex_w);
    d16  = 64'(b) * p10(ed_w);
    dd   = (x16 < d16) ? d16 * 10 : d16 * 100;
    ed_w = ed_w + ((x16 < d16) ? 1 : 2);
    sh   = 0;
    while (((dd << sh) >> 60) == 0) sh++;
    mx = a; md = b;
    for (int p = 0; p < 4; p++) begin
      @(negedge clk);
      en = 1; phase = 2'(p);
    end
    @(negedge clk);
    en = 0;
    mx = '0; md = '0;
    checks++;
    if (d_norm !== 61'(dd << sh) || x_norm !== 61'(x16 << sh) ||
        e_x !== 5'(ex_w) || e_d !== 5'(ed_w)) begin
      failures++;
      $display("FAIL mx=%0d md=%0d: x=%h d=%h ex=%0d ed=%0d want %h %h %0d %0d",
               a, b, x_norm, d_norm, e_x, e_d, 61'(x16 << sh), 61'(dd << sh), ex_w, ed_w);
    end
    // 0.01 <= x/d < 0.1
    lhs = 128'(x_norm) * 100;
    rhs = 128'(d_norm);
    checks++;
    if (lhs < rhs || 128'(x_norm) * 10 >= rhs || d_norm[60] !== 1'b1) begin
      failures++;
      $display("FAIL range mx=%0d md=%0d", a, b);
    end
  endtask

  function automatic logic [53:0] rnd();
    logic [63:0] v = {$urandom, $urandom} % p10(1 + $urandom % 16);
    return (v == 0) ? 54'd1 : 54'(v);
  endfunction

  initial begin
    check(54'd1, 54'd1);
    check(54'd9999999999999999, 54'd1);
    check(54'd1, 54'd9999999999999999);
    check(54'd4294967295, 54'd4294967296);
    check(54'd1000000000000000, 54'd999999999999999);
    repeat (500) check(rnd(), rnd());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
