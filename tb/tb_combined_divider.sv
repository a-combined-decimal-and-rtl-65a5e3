// tb_combined_divider -- end-to-end test of the combined BID/binary divider.
//
// Drives directed and random decimal64 (BID) and binary64 divisions through
// the top at its default parameters and compares sign, exponent and
// significand with a reference computed here by wide integer division:
//   binary : Q = RNE(x * 2^52 / d) (or 2^53 when x < d), e = Ex-Ed+1023(-1)
//   decimal: the 16-digit RNE quotient; an exact quotient is instead given
//            with the fewest digits whose exponent does not exceed the
//            preferred exponent Ex-Ed.
// Also checks the start-to-done latency (24 cycles decimal, 17 binary; an
// exact decimal quotient may finish earlier) and counts the mechanisms the
// design has: both radices, the normalization operand swap (th) both ways,
// divisor scaling by 10 and by 100, binary x<d (rounding with U = 4 inside
// the last digit), early stop on an exact decimal quotient, and the three
// rounding choices q_R-1, q_R, q_R+1 and a round-half-even tie (decimal
// only: a binary quotient of two 53-bit significands is never a midpoint).
module tb_combined_divider;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, is_bfp = 1'b0;
  logic sx, sd;
  logic [10:0] ex, ed;
  logic [53:0] mx, md;
  logic busy, done, sq, exact_stop;
  logic signed [12:0] eq;
  logic [53:0] mq;
  int checks = 0, failures = 0, cycle = 0;

  combined_divider u_dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #5_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ----
  int n_dec = 0, n_bin = 0, n_th0 = 0, n_th1 = 0, n_s10 = 0, n_s100 = 0;
  int n_xltd = 0, n_early = 0, n_rm = 0, n_r0 = 0, n_rp = 0, n_tie = 0;
  always @(posedge clk) begin
    if (u_dut.u_norm.en && u_dut.u_norm.phase <= 2'd1) begin
      if (u_dut.u_norm.th) n_th1++; else n_th0++;
    end
    if (u_dut.u_norm.en && u_dut.u_norm.phase == 2'd3) begin
      if (u_dut.u_norm.x_lt_d) n_s10++; else n_s100++;
    end
    if (u_dut.u_cr.round) begin
      case (u_dut.u_cr.mzp)
        2'd0: n_rm++;
        2'd2: n_rp++;
        default: n_r0++;
      endcase
      if (u_dut.u_cr.w_zero && u_dut.u_cr.tp == u_dut.u_cr.u) n_tie++;
    end
  end

  // ---- reference models ----
  typedef logic [255:0] big_t;

  function automatic big_t p10(input int n);
    big_t v = 1;
    for (int i = 0; i < n; i++) v = v * 10;
    return v;
  endfunction

  task automatic ref_bin(input logic [53:0] x, input logic [53:0] d,
                         input logic [10:0] exa, input logic [10:0] eda,
                         output logic [53:0] q, output int e);
    big_t num, qq, rr;
    int sh;
    sh  = (x < d) ? 53 : 52;
    num = big_t'(x) << sh;
    qq  = num / big_t'(d);
    rr  = num % big_t'(d);
    if (2 * rr > big_t'(d) || (2 * rr == big_t'(d) && qq[0])) qq = qq + 1;
    e = int'(exa) - int'(eda) + 1023 - ((x < d) ? 1 : 0);
    if (qq == (big_t'(1) << 53)) begin qq = qq >> 1; e++; end
    q = 54'(qq);
  endtask

  task automatic ref_dec(input logic [53:0] x, input logic [53:0] d,
                         input logic [10:0] exa, input logic [10:0] eda,
                         output logic [53:0] q, output int e);
    big_t num, qq, rr;
    int s, pref;
    pref = int'(exa) - int'(eda);
    s = 0;
    while (big_t'(x) * p10(s) < p10(15) * big_t'(d)) s++;
    if (big_t'(x) * p10(s) >= p10(16) * big_t'(d)) $display("ref scale error");
    num = big_t'(x) * p10(s);
    qq  = num / big_t'(d);
    rr  = num % big_t'(d);
    e   = pref - s;
    if (rr == 0) begin
      while (e < pref && qq % 10 == 0) begin qq = qq / 10; e++; end
    end else if (2 * rr > big_t'(d) || (2 * rr == big_t'(d) && qq[0])) begin
      qq = qq + 1;
      if (qq == p10(16)) begin qq = p10(15); e++; end
    end
    q = 54'(qq);
    e = e + 398;
  endtask

  task automatic run(input logic bfp, input logic [53:0] x, input logic [53:0] d,
                     input logic [10:0] exa, input logic [10:0] eda,
                     input logic sxa, input logic sda);
    logic [53:0] qref;
    int eref, lat;
    if (bfp) ref_bin(x, d, exa, eda, qref, eref);
    else     ref_dec(x, d, exa, eda, qref, eref);
    @(negedge clk);
    is_bfp = bfp; mx = x; md = d; ex = exa; ed = eda; sx = sxa; sd = sda;
    start = 1'b1;
    lat = -1;   // the first falling edge follows the start edge itself
    // count clock edges from the one that takes start to the one that
    // raises done, sampling between edges
    do begin
      @(negedge clk);
      start = 1'b0;
      mx = '0; md = '0;   // operands must have been latched
      lat++;
    end while (!done && lat < 100);
    checks++;
    if (mq !== qref || eq !== 13'(eref) || sq !== (sxa ^ sda)) begin
      failures++;
      $display("FAIL %s x=%0d d=%0d ex=%0d ed=%0d: got %0d e%0d s%0b, want %0d e%0d",
               bfp ? "bin" : "dec", x, d, exa, eda, mq, eq, sq, qref, eref);
    end
    checks++;
    if (bfp ? (lat != 17) : (u_dut.u_ctrl.early_stop ? (lat >= 24) : (lat != 24))) begin
      failures++;
      $display("FAIL latency %0d (%s, early=%0b)", lat, bfp ? "bin" : "dec",
               u_dut.u_ctrl.early_stop);
    end
    if (bfp) begin
      n_bin++;
      if (u_dut.u_rec.x_lt_d) n_xltd++;
    end else begin
      n_dec++;
      if (u_dut.u_ctrl.early_stop) n_early++;
    end
  endtask

  function automatic logic [53:0] rnd_dec();
    int n = 1 + ($urandom % 16);
    logic [63:0] v = {$urandom, $urandom};
    v = v % 64'(p10(n));
    if (v == 0) v = 1;
    return 54'(v);
  endfunction

  function automatic logic [53:0] rnd_bin();
    return {1'b0, 1'b1, 20'($urandom), $urandom};
  endfunction

  int NRAND = 3000;
  initial begin
    sx = 0; sd = 0; ex = 0; ed = 0; mx = 0; md = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed decimal cases
    run(0, 54'd1, 54'd1, 11'd398, 11'd398, 0, 0);        // 1/1 exact, preferred exp
    run(0, 54'd105, 54'd5, 11'd395, 11'd398, 1, 0);      // 0.105 / 5
    run(0, 54'd1, 54'd3, 11'd398, 11'd398, 0, 1);        // 1/3
    run(0, 54'd2, 54'd3, 11'd398, 11'd398, 0, 0);        // 2/3 rounds up
    run(0, 54'd9999999999999999, 54'd2, 11'd400, 11'd398, 0, 0);  // tie
    run(0, 54'd9999999999999997, 54'd2, 11'd400, 11'd398, 0, 0);  // tie
    run(0, 54'd9999999999999999, 54'd9999999999999999, 11'd398, 11'd398, 0, 0);
    run(0, 54'd1, 54'd9999999999999999, 11'd398, 11'd398, 0, 0);
    run(0, 54'd9999999999999999, 54'd1, 11'd398, 11'd390, 0, 0);
    run(0, 54'd1000, 54'd8, 11'd398, 11'd398, 0, 0);      // exact, 125
    run(0, 54'd4294967296, 54'd4294967295, 11'd300, 11'd310, 0, 0);
    // directed binary cases
    run(1, 54'h10000000000000, 54'h10000000000000, 11'd1023, 11'd1023, 0, 0);  // 1/1
    run(1, 54'h10000000000000, 54'h18000000000000, 11'd1023, 11'd1023, 0, 0);  // 1/1.5
    run(1, 54'h1fffffffffffff, 54'h10000000000000, 11'd1023, 11'd1000, 1, 1);
    run(1, 54'h10000000000000, 54'h1fffffffffffff, 11'd1023, 11'd1023, 0, 0);
    run(1, 54'h1fffffffffffff, 54'h1ffffffffffffe, 11'd1023, 11'd1023, 0, 0);
    for (int i = 0; i < NRAND; i++) begin
      logic [53:0] a, b;
      logic [10:0] e1, e2;
      logic bfp;
      bfp = 1'($urandom);
      e1 = 11'(300 + $urandom % 900);
      e2 = 11'(300 + $urandom % 900);
      if (bfp) begin a = rnd_bin(); b = rnd_bin(); end
      else begin
        a = rnd_dec(); b = rnd_dec();
        if ($urandom % 4 == 0) a = 54'(64'(b) * (1 + $urandom % 1000) % p10(16));  // exact
        if (a == 0) a = 1;
      end
      run(bfp, a, b, e1, e2, 1'($urandom), 1'($urandom));
    end
    $display("mechanisms: dec=%0d bin=%0d th0=%0d th1=%0d d*10=%0d d*100=%0d x<d=%0d early=%0d round-=%0d round0=%0d round+=%0d tie=%0d",
             n_dec, n_bin, n_th0, n_th1, n_s10, n_s100, n_xltd, n_early, n_rm, n_r0, n_rp, n_tie);
    if (n_dec == 0) failures++;
    if (n_bin == 0) failures++;
    if (n_th0 == 0) failures++;
    if (n_th1 == 0) failures++;
    if (n_s10 == 0) failures++;
    if (n_s100 == 0) failures++;
    if (n_xltd == 0) failures++;
    if (n_early == 0) failures++;
    if (n_rm == 0) failures++;
    if (n_r0 == 0) failures++;
    if (n_rp == 0) failures++;
    if (n_tie == 0) failures++;
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
