// tero_trng_fips_tb: runs the generator at its default parameters the way it
// is evaluated: for 1, 2, 3 and 4 extracted bits per control period it
// collects a 20,000-bit sequence and applies the four FIPS 140-2 statistical
// tests (monobit, poker, runs, long run) to it, printing a P/F string per
// setting in the order monobit, poker, runs, long run. It also prints the
// range and mean of the oscillation counts, the quantity shown in the count
// histograms.
//
// What is checked: every period gives exactly one accepted sample (the model
// runs at its default, healthy working conditions, so no alarm may occur),
// results come every 40 cycles, the number of periods needed for 20,000 bits
// is 20000 / bits (rounded up), and the 1-bit sequence passes all four
// tests. The statistics of the wider settings depend on the count
// distribution of the source model and are reported, not checked.
module tero_trng_fips_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8, X = 4, PERIOD = 40, NBITS = 20000;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, alarm_clr = 1'b0;
  logic [W-1:0] th_low = 8'd30, th_high = 8'd120;
  logic [1:0] bits_sel = 2'd0;
  logic [X-1:0] rnd_data;
  logic [2:0] rnd_nbits;
  logic rnd_valid, alarm, alarm_sticky;
  logic [W-1:0] osc_count;

  int checks = 0, failures = 0;
  bit seq[NBITS];
  int nseq = 0, nsamples = 0, cyc = 0, last_valid = -1;
  bit collecting = 1'b0;
  int cnt_min = 1000, cnt_max = 0;
  longint cnt_sum = 0, cnt_n = 0;

  tero_trng dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && alarm) check(1'b0, $sformatf("alarm for count %0d", osc_count));
    if (rst_n && rnd_valid && collecting) begin
      if (last_valid >= 0)
        check(cyc - last_valid == PERIOD, $sformatf("%0d cycles between samples", cyc - last_valid));
      last_valid = cyc;
      nsamples++;
      if (int'(osc_count) < cnt_min) cnt_min = osc_count;
      if (int'(osc_count) > cnt_max) cnt_max = osc_count;
      cnt_sum += osc_count; cnt_n++;
      for (int i = 0; i < int'(rnd_nbits); i++)
        if (nseq < NBITS) begin seq[nseq] = rnd_data[i]; nseq++; end
    end
  end

  // FIPS 140-2 tests on seq[]; returns the four verdicts as a string.
  function automatic string fips(output bit all_pass);
    int ones, f[16], run_len, long_run;
    int runs[2][7];  // [bit][length 1..6, 6 = 6 and longer]
    real x;
    bit pm, pp, pr, pl;
    string s;
    ones = 0;
    foreach (seq[i]) ones += seq[i];
    pm = ones > 9725 && ones < 10275;
    foreach (f[i]) f[i] = 0;
    for (int i = 0; i < NBITS / 4; i++)
      f[{seq[4*i+3], seq[4*i+2], seq[4*i+1], seq[4*i]}]++;
    x = 0.0;
    foreach (f[i]) x += real'(f[i]) * real'(f[i]);
    x = 16.0 / 5000.0 * x - 5000.0;
    pp = x > 2.16 && x < 46.17;
    foreach (runs[b, l]) runs[b][l] = 0;
    run_len = 1; long_run = 1;
    for (int i = 1; i <= NBITS; i++) begin
      if (i < NBITS && seq[i] == seq[i-1]) run_len++;
      else begin
        runs[seq[i-1]][(run_len > 6 ? 6 : run_len)]++;
        if (run_len > long_run) long_run = run_len;
        run_len = 1;
      end
    end
    pr = 1'b1;
    for (int b = 0; b < 2; b++) begin
      pr &= runs[b][1] >= 2315 && runs[b][1] <= 2685;
      pr &= runs[b][2] >= 1114 && runs[b][2] <= 1386;
      pr &= runs[b][3] >= 527  && runs[b][3] <= 723;
      pr &= runs[b][4] >= 240  && runs[b][4] <= 384;
      pr &= runs[b][5] >= 103  && runs[b][5] <= 209;
      pr &= runs[b][6] >= 103  && runs[b][6] <= 209;
    end
    pl = long_run < 26;
    s = {pm ? "P" : "F", pp ? "P" : "F", pr ? "P" : "F", pl ? "P" : "F"};
    $display("  ones=%0d poker=%0.2f longest run=%0d", ones, x, long_run);
    all_pass = pm && pp && pr && pl;
    return s;
  endfunction

  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    for (int s = 0; s < 4; s++) begin
      bit ok;
      string r;
      int need;
      @(posedge clk iff rnd_valid);   // let the new setting settle
      @(negedge clk);
      bits_sel = 2'(s);
      @(posedge clk iff rnd_valid);
      @(negedge clk);
      nseq = 0; nsamples = 0; last_valid = -1; collecting = 1'b1;
      wait (nseq == NBITS);
      @(negedge clk);
      collecting = 1'b0;
      need = (NBITS + s) / (s + 1);
      check(nsamples == need, $sformatf("%0d samples for %0d bits at %0d bits each", nsamples, NBITS, s + 1));
      r = fips(ok);
      $display("FIPS 140-2, %0d extracted bit(s) per period: %s", s + 1, r);
      if (s == 0) check(ok, "1-bit sequence fails a FIPS 140-2 test");
    end
    $display("oscillation counts: min %0d max %0d mean %0.1f over %0d periods",
             cnt_min, cnt_max, real'(cnt_sum) / real'(cnt_n), cnt_n);
    check(!alarm_sticky, "alarm during the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #25ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
