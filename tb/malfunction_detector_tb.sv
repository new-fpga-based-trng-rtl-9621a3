// malfunction_detector_tb: presents random counts, overflow flags and
// threshold windows to the detector with a sample strobe and checks, one
// cycle later, the pass / alarm pulses and the captured count against a
// reference computed here. It also checks the edge values of the window,
// that nothing happens without a strobe, and that the sticky alarm holds
// until cleared.
module malfunction_detector_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic sample = 1'b0, ovf = 1'b0, alarm_clr = 1'b0;
  logic [W-1:0] count = '0, th_low = '0, th_high = '0;
  logic [W-1:0] count_q;
  logic pass, alarm, alarm_sticky;
  int checks = 0, failures = 0;

  malfunction_detector #(.COUNT_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic one(input int c, input bit o, input int lo, input int hi, input bit strobe);
    bit exp_ok;
    logic [W-1:0] prev_q;
    prev_q = count_q;
    @(negedge clk);
    count = W'(c); ovf = o; th_low = W'(lo); th_high = W'(hi); sample = strobe;
    @(negedge clk);
    sample = 1'b0;
    exp_ok = !o && c >= lo && c <= hi;
    if (strobe) begin
      check(pass == exp_ok && alarm == !exp_ok,
            $sformatf("count %0d ovf %0b window %0d..%0d: pass %0b alarm %0b", c, o, lo, hi, pass, alarm));
      check(count_q == W'(c), "captured count wrong");
      if (!exp_ok) check(alarm_sticky, "sticky alarm not set");
    end else begin
      check(!pass && !alarm && count_q == prev_q, "activity without sample strobe");
    end
    @(negedge clk);
    check(!pass && !alarm, "pass/alarm longer than one cycle");
  endtask

  // The reset is applied as a falling edge so that it reaches the
  // asynchronously reset flip-flops.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(50, 0, 30, 120, 1);
    check(!alarm_sticky, "sticky alarm set without a failure");
    one(30, 0, 30, 120, 1);   // lower edge included
    one(120, 0, 30, 120, 1);  // upper edge included
    one(29, 0, 30, 120, 1);
    one(121, 0, 30, 120, 1);
    one(60, 1, 30, 120, 1);   // overflow always fails
    one(0, 0, 30, 120, 1);    // stopped source
    one(10, 0, 30, 120, 0);   // no strobe
    check(alarm_sticky, "sticky alarm lost");
    @(negedge clk); alarm_clr = 1'b1; @(negedge clk); alarm_clr = 1'b0;
    check(!alarm_sticky, "sticky alarm not cleared");
    for (int i = 0; i < 300; i++) begin
      int lo, hi;
      lo = $urandom_range(100, 0);
      hi = $urandom_range(255, lo);
      one($urandom_range(255, 0), ($urandom_range(9, 0) == 0), lo, hi, ($urandom_range(4, 0) != 0));
    end
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
