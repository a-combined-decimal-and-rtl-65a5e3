// tb_recurrence -- runs the recurrence for random and exact cases in both
// radices and checks, with wide integers computed here, that after n steps
// the digits q_1..q_n satisfy r^n*w[0] - Q*d = w[n] with |w[n]| <= rho*d,
// and that w_sign and w_zero give the sign and zeroness of w[n]. Radix 16
// starts from x/16 and must flag x < d on x_lt_d; radix 10 starts from x.
module tb_recurrence;
  logic       clk = 0, rst_n = 0, init = 0, step = 0, radix16 = 0;
  logic [60:0] x, d;
  logic [4:0]  q;
  logic        w_sign, w_zero, x_lt_d;
  int checks = 0, failures = 0;

  recurrence dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [255:0] big_t;

  task automatic run(input bit r16, input logic [60:0] xa, input logic [60:0] da, input int n);
    big_t qq, w, dd, r, scale;
    logic signed [4:0] dig;
    @(negedge clk);
    radix16 = r16; x = xa; d = da; init = 1;
    @(negedge clk);
    init = 0; step = 1;
    x = '0; d = '0;
    qq = 0;
    r = r16 ? 16 : 10;
    for (int j = 0; j < n; j++) begin
      @(negedge clk);
      dig = signed'(q);
      qq = qq * r + big_t'(dig);
    end
    step = 0;
    #1;
    // r^n * w0 in units of 2^-60
    scale = 1;
    for (int j = 0; j < (r16 ? n - 1 : n); j++) scale = scale * r;
    w  = scale * big_t'(xa);
    dd = big_t'(da);
    w  = w - qq * dd;
    checks++;
    if ((r16 ? (3 * (w < 0 ? -w : w) > 2 * dd) : (9 * (w < 0 ? -w : w) > 7 * dd)) ||
        w_sign !== (w < 0) || w_zero !== (w == 0) || (r16 && x_lt_d !== (xa < da))) begin
      failures++;
      $display("FAIL r16=%0b x=%h d=%h n=%0d sign=%b zero=%b", r16, xa, da, n, w_sign, w_zero);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [60:0] da, xa;
      da = {1'b1, 28'($urandom), $urandom};
      if (i[0]) begin
        xa = {1'b1, 28'($urandom), $urandom};
        run(1, xa, da, 1 + $urandom % 15);
      end else begin
        // x/d in [0.01, 0.1)
        xa = 61'((64'(da) / 100) + (64'({$urandom, $urandom}) % (64'(da) / 100 * 9)));
        run(0, xa, da, 1 + $urandom % 18);
      end
    end
    // exact quotients: residual must reach zero
    run(0, 61'h0400000000000000 / 10, 61'h1000000000000000, 6);   // 0.1/4
    run(0, 61'h1000000000000000 / 25, 61'h1000000000000000, 6);   // 1/25
    run(1, 61'h1000000000000000, 61'h1000000000000000, 4);
    run(1, 61'h1000000000000000, 61'h1800000000000000, 15);
    run(1, 61'h1800000000000000, 61'h1000000000000000, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
