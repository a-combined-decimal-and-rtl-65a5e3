// tb_lod -- checks the leading-one detector against the bit length of the
// input ($clog2(m+1)) for every MSB position, with random lower bits, and
// for zero.
module tb_lod;
  logic [53:0] m;
  logic [5:0]  lz;
  int checks = 0, failures = 0;

  lod dut (.m(m), .lz(lz));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [53:0] v);
    logic [6:0] want;
    m = v;
    #1;
    want = 7'(54 - $clog2({10'd0, v} + 64'd1));
    checks++;
    if (lz !== want[5:0]) begin
      failures++;
      $display("FAIL m=%h lz=%0d want %0d", v, lz, want);
    end
  endtask

  initial begin
    check('0);
    for (int p = 0; p < 54; p++)
      repeat (20) check((54'd1 << p) | (54'({$urandom, $urandom}) & ((54'd1 << p) - 54'd1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
