// tb_exp10_table -- checks the digit shift e = 16 - (number of decimal
// digits of m) and pt = 10^e, for values around every power of ten and
// random values of every length. Digits are counted here by repeated
// division by ten.
module tb_exp10_table;
  logic [53:0] m;
  logic [5:0]  lz;
  logic [4:0]  e;
  logic [56:0] pt;
  int checks = 0, failures = 0;

  exp10_table dut (.m(m), .lz(lz), .e(e), .pt(pt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] v);
    int n;
    logic [63:0] t, p;
    n = 0;
    t = v;
    while (t != 0) begin t = t / 10; n++; end
    p = 1;
    for (int i = 0; i < 16 - n; i++) p = p * 10;
    m  = 54'(v);
    lz = 6'(54 - $clog2(v + 64'd1));
    #1;
    checks++;
    if (e !== 5'(16 - n) || pt !== 57'(p)) begin
      failures++;
      $display("FAIL m=%0d e=%0d pt=%0d want %0d %0d", v, e, pt, 16 - n, p);
    end
  endtask

  initial begin
    logic [63:0] p10;
    p10 = 1;
    for (int k = 0; k <= 16; k++) begin
      if (k > 0) check(p10 - 1);
      if (k < 16) begin
        check(p10);
        check(p10 + 1);
      end
      p10 = p10 * 10;
    end
    for (int k = 1; k <= 16; k++) begin
      p10 = 1;
      for (int i = 0; i < k; i++) p10 = p10 * 10;
      repeat (50) begin
        logic [63:0] v;
        v = {$urandom, $urandom} % p10;
        if (v == 0) v = 1;
        check(v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
