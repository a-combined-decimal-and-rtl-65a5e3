// tb_convert_round -- feeds random signed-digit sequences (one digit per
// cycle, then a rounding digit B with the sign/zero of the final residual)
// and checks Q against round-half-even of (Q_n*r + B + delta)/D computed
// here on the assimilated integer, where delta is a small remainder whose
// sign is given by w_sign / w_zero. D = r normally; in the radix-16 half
// mode D = 8, so one bit of B is kept. Ties (tail exactly D/2) are forced
// often. Also checks one digit is taken per cycle.
module tb_convert_round;
  logic        clk = 0, clear = 0, shift = 0, round = 0, radix16 = 0;
  logic        half = 0;
  logic [4:0]  q_in = '0;
  logic        w_sign = 0, w_zero = 0;
  logic [53:0] q;
  int checks = 0, failures = 0;

  convert_round dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit r16, input bit hf, input int n);
    longint acc, num, res, fl, rem, r, a, dv;
    int dig, b, sgn;
    r = r16 ? 16 : 10;
    a = r16 ? 10 : 7;
    @(negedge clk);
    radix16 = r16; half = hf; clear = 1;
    @(negedge clk);
    clear = 0; shift = 1;
    acc = 0;
    for (int j = 0; j < n; j++) begin
      dig = (j == 0) ? 1 : int'($urandom % (2 * a + 1)) - int'(a);
      acc = acc * r + dig;
      q_in = 5'(dig);
      @(negedge clk);
    end
    shift = 0; round = 1;
    dv = hf ? 8 : r;
    case ($urandom % 3)
      0: b = int'(dv / 2);
      1: b = -int'(dv / 2);
      default: b = int'($urandom % (2 * a + 1)) - int'(a);
    endcase
    sgn = int'($urandom % 3) - 1;          // sign of delta
    q_in = 5'(b);
    w_sign = sgn < 0;
    w_zero = sgn == 0;
    @(negedge clk);
    round = 0;
    // reference
    num = acc * r + b;
    fl  = num / dv;
    rem = num % dv;
    if (rem < 0) begin rem += dv; fl -= 1; end
    if (sgn < 0 && rem == 0) begin fl -= 1; rem = dv; end
    // value = fl + (rem + delta)/dv, with rem in 1..dv when delta < 0
    if (2 * rem > dv) res = fl + 1;
    else if (2 * rem < dv) res = fl;
    else if (sgn > 0) res = fl + 1;
    else if (sgn < 0) res = fl;
    else res = fl + (fl & 1);
    checks++;
    if (q !== 54'(res)) begin
      failures++;
      $display("FAIL r16=%0b half=%0b n=%0d acc=%0d B=%0d sgn=%0d: q=%0d want %0d", r16, hf, n, acc, b, sgn, q, res);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < 4500; i++)
      run(i % 3 != 0, i % 3 == 2,
          i % 3 == 0 ? 1 + $urandom % 17 : 1 + $urandom % (i % 3 == 2 ? 13 : 14));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
