// ctrl_sequencer_tb: runs the control sequencer with its default period and
// checks the timing of every period against a cycle-by-cycle reference:
// control high for exactly 20 of every 40 cycles, counter reset exactly when
// the control signal is low, one sample strobe per period in the last high
// cycle, and periods that start and stop only at period boundaries when the
// enable changes.
module ctrl_sequencer_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int PERIOD = 40, HIGH = 20;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic tero_ctrl, cnt_rst, sample;
  int checks = 0, failures = 0;
  int cycle = 0;

  ctrl_sequencer dut (.clk, .rst_n, .en, .tero_ctrl, .cnt_rst, .sample);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Reference: count ctrl-high runs and check their length and the strobe.
  int high_len = 0, periods = 0, samples = 0, rise_gap = 0, last_rise = -1;
  logic ctrl_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cycle++;
    // cnt_rst is low during reset and rises on the first clock after it
    if (cycle == 1) check(!cnt_rst && !tero_ctrl, "outputs after reset");
    else check(cnt_rst == !tero_ctrl, "cnt_rst is not the inverse of tero_ctrl");
    if (tero_ctrl) high_len++;
    if (sample) begin
      samples++;
      check(tero_ctrl, "sample outside the high phase");
      check(high_len == HIGH, $sformatf("sample after %0d high cycles, expected %0d", high_len, HIGH));
    end
    if (tero_ctrl && !ctrl_d) begin
      if (last_rise >= 0)
        check((cycle - last_rise) % PERIOD == 0, $sformatf("period start %0d cycles after the last", cycle - last_rise));
      last_rise = cycle;
      periods++;
    end
    if (!tero_ctrl && ctrl_d) begin
      check(high_len == HIGH, $sformatf("high phase of %0d cycles", high_len));
      high_len = 0;
    end
    ctrl_d = tero_ctrl;
  end

  // The reset is applied as a falling edge so that it reaches the
  // asynchronously reset flip-flops.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (100) @(posedge clk);
    check(periods == 0 && samples == 0, "activity while disabled");
    en = 1'b1;
    repeat (PERIOD * 10 + 45) @(posedge clk);
    check(periods == 10 || periods == 11, $sformatf("%0d periods in 10.x period times", periods));
    check(samples == periods || samples == periods - 1, "sample count differs from period count");
    @(negedge clk);
    en = 1'b0;               // mid-period: the running period must complete
    repeat (PERIOD * 3) @(posedge clk);
    check(!tero_ctrl && cnt_rst, "still running after disable");
    check(samples == periods, "a period was cut short");
    en = 1'b1;
    repeat (PERIOD * 5) @(posedge clk);
    check(samples >= 14, $sformatf("only %0d samples", samples));
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
