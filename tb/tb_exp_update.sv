// tb_exp_update -- random exponents, shifts and counts against the
// exponent formulas, and the carry-out renormalization (2^53 -> 2^52,
// 10^16 -> 10^15, exponent + 1).
module tb_exp_update;
  logic        radix16, x_lt_d;
  logic [10:0] ex, ed;
  logic [4:0]  e_x, e_d, count;
  logic [53:0] q, mq;
  logic signed [12:0] eq;
  int checks = 0, failures = 0;

  exp_update dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int want_e;
      logic [53:0] want_q;
      radix16 = i[0];
      ex = 11'($urandom); ed = 11'($urandom);
      e_x = 5'($urandom % 16); e_d = 5'($urandom % 18); count = 5'(1 + $urandom % 17);
      x_lt_d = 1'($urandom);
      case (i % 8)
        1: q = 54'd1 << 53;
        2: q = 54'd10000000000000000;
        default: q = radix16 ? {2'b01, 52'($urandom)} : 54'({$urandom, $urandom} % 64'd10000000000000000);
      endcase
      #1;
      if (radix16) begin
        want_e = int'(ex) - int'(ed) + 1023 - int'(x_lt_d);
        want_q = q;
        if (q == 54'd1 << 53) begin want_q = 54'd1 << 52; want_e++; end
      end else begin
        want_e = int'(ex) - int'(ed) + 398 + int'(e_d) - int'(e_x) - int'(count);
        want_q = q;
        if (q == 54'd10000000000000000) begin want_q = 54'd1000000000000000; want_e++; end
      end
      checks++;
      if (eq !== 13'(want_e) || mq !== want_q) begin
        failures++;
        $display("FAIL r16=%0b eq=%0d want %0d mq=%0d want %0d", radix16, eq, want_e, mq, want_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
