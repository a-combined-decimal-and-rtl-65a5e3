// tb_szd -- sign and zero of random carry-save pairs, including pairs whose
// sum is exactly zero, +1 or -1.
module tb_szd;
  logic [65:0] rws, rwc;
  logic        w_sign, w_zero;
  int checks = 0, failures = 0;

  szd dut (.rws(rws), .rwc(rwc), .w_sign(w_sign), .w_zero(w_zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [65:0] s, input logic signed [66:0] total);
    // rwc chosen so that rws + rwc == total (mod 2^66)
    logic [65:0] c;
    c   = 66'(total) - s;
    rws = s; rwc = c;
    #1;
    checks++;
    if (w_sign !== (total < 0) || w_zero !== (total == 0)) begin
      failures++;
      $display("FAIL total=%0d sign=%b zero=%b", total, w_sign, w_zero);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [65:0] s;
      logic signed [66:0] t;
      s = {2'($urandom), $urandom, $urandom};
      case (i % 4)
        0: t = 0;
        1: t = 1;
        2: t = -1;
        default: t = 67'(signed'({2'($urandom), $urandom, $urandom})) >>> 2;
      endcase
      check(s, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
