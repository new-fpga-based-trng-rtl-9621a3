// tero_trng_tb: end-to-end test of the generator at its default parameters
// (100 MHz clock, 40-cycle control period, 8-bit counter, up to 4 bits per
// sample). It changes the working conditions of the TERO model between
// phases and checks, for every control period, that exactly one result
// comes out and that it is the right one:
//   - healthy source: the captured count equals the number of oscillations
//     the model made, the count passes the window and the random data are
//     its 1..4 low bits (each bit-number setting is used);
//   - weak source (too few oscillations), stopped source (none), too many
//     oscillations, and a source so fast that the counter wraps: each must
//     raise an alarm and give no data;
//   - the sticky alarm holds until cleared; with the enable low nothing
//     happens.
// It also checks the rate: one result every 40 cycles, i.e. with 4 bits per
// sample 10 Mbit/s at 100 MHz. Every one of these mechanisms is counted and
// one that never happened counts as a failure.
module tero_trng_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8, X = 4, PERIOD = 40;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, alarm_clr = 1'b0;
  logic [W-1:0] th_low = 8'd30, th_high = 8'd120;
  logic [1:0] bits_sel = 2'd3;
  logic [X-1:0] rnd_data;
  logic [2:0] rnd_nbits;
  logic rnd_valid, alarm, alarm_sticky;
  logic [W-1:0] osc_count;

  int checks = 0, failures = 0;
  int n_pass = 0, n_low = 0, n_stop = 0, n_high = 0, n_ovf = 0, n_clear = 0, n_idle = 0;
  int n_sel[4] = '{0, 0, 0, 0};
  int n_rate = 0;

  tero_trng dut (.*);

  always #5 clk = ~clk;   // 100 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---------------------------------------------------------------------
  // Result monitor: one decision per control period, checked against the
  // oscillation count the TERO model drew.
  // An alarm comes out one cycle before data would have, so the decision
  // time of a period is the alarm cycle or the cycle before rnd_valid.
  int cyc = 0, last_evt = -1, evt;
  always @(posedge clk) begin
    int unsigned n;
    bit exact, exp_pass;
    cyc++;
    evt = alarm ? cyc : cyc - 1;
    if (rst_n && (rnd_valid || alarm)) begin
      n = dut.u_tero.last_count;
      // The oscillation fits in the 20-cycle high phase only if it ends
      // before the capture; otherwise the count is cut short.
      exact = (dut.u_tero.half_ps == 500) && (n < 190);
      exp_pass = exact && n >= th_low && n <= th_high;
      check(!(rnd_valid && alarm), "data and alarm together");
      if (alarm) begin
        check(!exp_pass, $sformatf("alarm for a good count %0d", n));
        if (exact) check(osc_count == W'(n), $sformatf("count %0d, model made %0d", osc_count, n));
        if (n == 0) n_stop++;
        else if (!exact) n_ovf++;
        else if (n < th_low) n_low++;
        else if (n > th_high) n_high++;
      end
      if (rnd_valid) begin
        check(exp_pass, $sformatf("data for a bad count %0d", n));
        check(osc_count == W'(n), $sformatf("count %0d, model made %0d", osc_count, n));
        check(rnd_nbits == 3'(bits_sel) + 3'd1, "wrong number of bits");
        check(rnd_data == X'(n % (1 << (bits_sel + 1))),
              $sformatf("data %0h from count %0d with %0d bits", rnd_data, n, bits_sel + 1));
        n_pass++;
        n_sel[bits_sel]++;
      end
      if (last_evt >= 0 && en) begin
        check(evt - last_evt == PERIOD, $sformatf("%0d cycles between results", evt - last_evt));
        if (evt - last_evt == PERIOD && rnd_valid && bits_sel == 2'd3) n_rate++;
      end
      last_evt = evt;
    end
  end

  task automatic wait_results(input int k);
    repeat (k) @(posedge clk iff (rnd_valid || alarm));
  endtask

  task automatic set_source(input int unsigned lo, input int unsigned hi, input int unsigned half);
    // Called right after a result, while the control signal is low.
    dut.u_tero.osc_min = lo;
    dut.u_tero.osc_max = hi;
    dut.u_tero.half_ps = half;
  endtask

  // The reset is applied as a falling edge so that it reaches the
  // asynchronously reset flip-flops.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    // healthy source with every bit-number setting
    for (int s = 3; s >= 0; s--) begin
      @(negedge clk) bits_sel = 2'(s);
      wait_results(12);
    end
    check(!alarm_sticky, "alarm with a healthy source");
    @(negedge clk) bits_sel = 2'd3;
    wait_results(1); set_source(5, 20, 500);    wait_results(6);  // weak
    wait_results(1); set_source(0, 0, 500);     wait_results(4);  // stopped
    wait_results(1); set_source(130, 180, 500); wait_results(6);  // too many
    wait_results(1); set_source(450, 480, 200); wait_results(4);  // counter wraps
    wait_results(1); set_source(40, 100, 500);  wait_results(2);  // healthy again
    check(alarm_sticky, "sticky alarm lost");
    @(negedge clk) alarm_clr = 1'b1;
    @(negedge clk) alarm_clr = 1'b0;
    check(!alarm_sticky, "sticky alarm not cleared");
    if (!alarm_sticky) n_clear++;
    wait_results(8);
    check(!alarm_sticky, "alarm after recovery");
    // disable: the running period completes, then nothing
    @(negedge clk) en = 1'b0;
    repeat (2 * PERIOD) @(negedge clk);
    begin
      int n_before;
      n_before = n_pass + n_low + n_stop + n_high + n_ovf;
      repeat (5 * PERIOD) @(negedge clk);
      check(n_pass + n_low + n_stop + n_high + n_ovf == n_before, "results while disabled");
      check(dut.u_seq.tero_ctrl == 1'b0, "control signal active while disabled");
      if (n_pass + n_low + n_stop + n_high + n_ovf == n_before) n_idle++;
    end
    last_evt = -1;
    en = 1'b1;
    wait_results(4);

    $display("mechanisms: pass=%0d weak=%0d stopped=%0d too_many=%0d wrapped=%0d cleared=%0d idle=%0d full_rate=%0d",
             n_pass, n_low, n_stop, n_high, n_ovf, n_clear, n_idle, n_rate);
    $display("bits settings used: 1b=%0d 2b=%0d 3b=%0d 4b=%0d", n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    check(n_pass > 0, "no accepted sample");
    check(n_low > 0, "weak source never detected");
    check(n_stop > 0, "stopped source never detected");
    check(n_high > 0, "too many oscillations never detected");
    check(n_ovf > 0, "counter wrap never detected");
    check(n_clear > 0, "sticky alarm never cleared");
    check(n_idle > 0, "idle never checked");
    check(n_rate > 0, "full rate never reached");
    foreach (n_sel[i]) check(n_sel[i] > 0, $sformatf("%0d-bit extraction never used", i + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
