// tb_div_controller -- checks the phase sequence and its lengths: decimal
// NORM 4, INIT 1, 17 recurrence + 1 rounding-digit steps, ROUND 1, done 24
// edges after start; binary 17 edges with no NORM; a decimal early stop
// when w_zero is seen with count >= jp, and no stop while count < jp.
module tb_div_controller;
  logic clk = 0, rst_n = 0, start = 0, radix16 = 0, w_zero = 0;
  logic signed [5:0] jp = 0;
  logic norm_en, rec_init, rec_step, cr_shift, cr_round, r16, busy, done, early_stop;
  logic [1:0] norm_phase;
  logic [4:0] count;
  int checks = 0, failures = 0;

  div_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // zero_at: raise w_zero while count >= zero_at (-1: never)
  task automatic run(input bit r16a, input int zero_at, input int jpa,
                     input int e_lat, input int e_norm, input int e_steps,
                     input int e_count, input bit e_early);
    int lat, nn, ni, ns, nr;
    logic [1:0] ph_seen;
    @(negedge clk);
    radix16 = r16a; jp = 6'(jpa); start = 1;
    lat = -1; nn = 0; ni = 0; ns = 0; nr = 0;
    do begin
      @(negedge clk);
      start = 0;
      lat++;
      w_zero = (zero_at >= 0 && rec_step && int'(count) >= zero_at);
      if (norm_en) begin
        checks++;
        if (norm_phase !== 2'(nn)) begin failures++; $display("FAIL phase order"); end
        nn++;
      end
      if (rec_init) ni++;
      if (rec_step) ns++;
      if (cr_round) nr++;
    end while (!done && lat < 100);
    checks++;
    if (lat != e_lat || nn != e_norm || ni != 1 || ns != e_steps || nr != 1 ||
        count != 5'(e_count) || early_stop != e_early || busy) begin
      failures++;
      $display("FAIL r16=%0b zero_at=%0d jp=%0d: lat=%0d norm=%0d init=%0d steps=%0d round=%0d count=%0d early=%0b",
               r16a, zero_at, jpa, lat, nn, ni, ns, nr, count, early_stop);
    end
    w_zero = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, -1, 0, 24, 4, 18, 17, 0);     // decimal, full length
    run(1, -1, 0, 17, 0, 15, 14, 0);     // binary
    run(1, 3, 0, 17, 0, 15, 14, 0);      // binary ignores w_zero
    run(0, 5, 3, 12, 4, 6, 5, 1);        // exact after 5 digits, jp = 3
    run(0, 2, 7, 14, 4, 8, 7, 1);        // exact after 2, waits for jp = 7
    run(0, 1, -4, 8, 4, 2, 1, 1);        // exact after 1, jp < 0
    run(0, -1, 17, 24, 4, 18, 17, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
