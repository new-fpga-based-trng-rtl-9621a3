// tero_cell_tb: checks the behavioural TERO model. For a number of control
// periods it counts the output pulses while the control signal is high and
// compares them with the oscillation count the model drew and with the
// allowed range; it checks the oscillation period, that the output is quiet
// once the oscillation has died out and that it returns to 0 with the control
// signal low. It then narrows the range to a single value and stops the
// source completely (range 0..0), which must give no pulses at all.
module tero_cell_tb;
  timeunit 1ns; timeprecision 1ps;

  logic ctrl = 1'b0;
  logic tero_out;
  int checks = 0, failures = 0;
  int pulses;
  realtime t_first, t_last;

  tero_cell dut (.ctrl, .tero_out);

  always @(posedge tero_out) begin
    if (pulses == 0) t_first = $realtime;
    t_last = $realtime;
    pulses++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_period(input int unsigned lo, input int unsigned hi);
    int settled;
    pulses = 0;
    ctrl = 1'b1;
    #200;                                   // long enough for 100+ oscillations
    settled = pulses;
    #20;
    check(pulses == settled, "output still toggling after the oscillation died out");
    check(pulses == int'(dut.last_count) || (pulses == int'(dut.last_count) + 1),
          $sformatf("pulses %0d vs drawn count %0d", pulses, dut.last_count));
    check(dut.last_count >= lo && dut.last_count <= hi,
          $sformatf("drawn count %0d outside %0d..%0d", dut.last_count, lo, hi));
    if (pulses > 2)
      check((t_last - t_first) / (pulses - 1) > 0.99 && (t_last - t_first) / (pulses - 1) < 1.01,
            "oscillation period is not 1 ns");
    ctrl = 1'b0;
    #5;
    check(tero_out == 1'b0, "output not back to 0 with ctrl low");
    #45;
  endtask

  initial begin
    int unsigned mn, mx;
    #10;
    mn = 1000; mx = 0;
    for (int p = 0; p < 40; p++) begin
      one_period(40, 100);
      // pulses counts a final rise to a stable 1 as well: use the drawn count
      if (dut.last_count < mn) mn = dut.last_count;
      if (dut.last_count > mx) mx = dut.last_count;
    end
    check(mx > mn + 5, "oscillation count does not vary between periods");
    dut.osc_min = 77; dut.osc_max = 77;
    for (int p = 0; p < 5; p++) one_period(77, 77);
    dut.osc_min = 0; dut.osc_max = 0;
    pulses = 0; ctrl = 1'b1; #200;
    check(pulses <= 1, "a stopped source still oscillates");
    ctrl = 1'b0; #50;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
