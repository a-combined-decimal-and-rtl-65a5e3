// tb_mk_table -- radix-16 constants against the published table; radix-10
// constants against the conditions that make selection correct: for each
// divisor interval [1+i/8, 1+(i+1)/8), redundancy 7/9, q_H estimate error
// below 2/256 and q_L estimate error below 3/256, every threshold must lie
// where both neighbouring digits keep the next residual bounded. The checks
// are done in exact integer arithmetic (everything scaled by 9*8*256).
module tb_mk_table;
  logic       radix16;
  logic [2:0] d_idx;
  logic [7:0] m_h2, m_h1, m_l2, m_l1;
  int checks = 0, failures = 0;

  mk_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int T_H2[8] = '{50, 56, 66, 68, 72, 80, 88, 88};
  localparam int T_H1[8] = '{16, 16, 20, 20, 24, 24, 28, 28};
  localparam int T_L2[8] = '{13, 14, 16, 17, 18, 20, 22, 22};
  localparam int T_L1[8] = '{4, 4, 5, 5, 6, 6, 7, 7};

  // threshold m (1/8 units) between digit q-1 and q: it must be at least
  // (k*q - a)*dhi and m + err at most (k*(q-1) + a)*dlo, with a = c + 7/9.
  // Scaled by 9*8*256 = 18432: values x/8 -> x*2304, d = (8+i)/8.
  function automatic bit ok(input int m, input int kq, input int kqm1,
                            input int c, input int i, input int err256);
    longint lo, hi, mm;
    mm = longint'(m) * 2304;
    // (k*q - c - 7/9) * dhi  ->  ((kq - c)*9 - 7) * (9+i) * 256
    lo = longint'((kq - c) * 9 - 7) * (9 + i) * 256;
    hi = longint'((kqm1 + c) * 9 + 7) * (8 + i) * 256;
    return (mm >= lo) && (mm + longint'(err256) * 72 <= hi);
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      d_idx = 3'(i);
      radix16 = 1;
      #1;
      checks++;
      if (m_h2 != 8'(T_H2[i]) || m_h1 != 8'(T_H1[i]) || m_l2 != 8'(T_L2[i]) || m_l1 != 8'(T_L1[i])) begin
        failures++;
        $display("FAIL radix-16 row %0d", i);
      end
      radix16 = 0;
      #1;
      // q_H step: r*w compared; digits qH*5, containment |v| <= (2 + 7/9) d
      checks++;
      if (!ok(int'(m_h1), 5, 0, 2, i, 2)) begin failures++; $display("FAIL r10 mH1 row %0d", i); end
      // q_L step: v compared; containment |w| <= 7/9 d
      checks++;
      if (!ok(int'(m_l2), 2, 1, 0, i, 3)) begin failures++; $display("FAIL r10 mL2 row %0d", i); end
      checks++;
      if (!ok(int'(m_l1), 1, 0, 0, i, 3)) begin failures++; $display("FAIL r10 mL1 row %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
