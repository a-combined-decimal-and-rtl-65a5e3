// tb_rect_mult -- random 57 x 32 products, including all-ones operands,
// against a 128-bit product truncated to 60 bits.
module tb_rect_mult;
  logic [56:0] a;
  logic [31:0] b;
  logic [59:0] p;
  int checks = 0, failures = 0;

  rect_mult dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [56:0] x, input logic [31:0] y);
    logic [127:0] full;
    a = x; b = y;
    #1;
    full = 128'(x) * 128'(y);
    checks++;
    if (p !== full[59:0]) begin
      failures++;
      $display("FAIL %h * %h = %h want %h", x, y, p, full[59:0]);
    end
  endtask

  initial begin
    check('1, '1);
    check(57'd0, 32'd12345);
    for (int i = 0; i < 2000; i++)
      check(57'({$urandom, $urandom}) >> ($urandom % 57), $urandom >> ($urandom % 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
