// async_counter_tb: feeds the ripple counter bursts of a random number of
// pulses, with a random pulse width, and checks after each burst that the
// count equals the number of pulses (modulo 2**N) and that the overflow flag
// is set exactly when the burst went past 2**N - 1. The reset must clear
// count and flag between bursts.
module async_counter_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 8;
  logic clk_in = 1'b0, rst = 1'b0;
  logic [N-1:0] q;
  logic ovf;
  int checks = 0, failures = 0;

  async_counter #(.N(N)) dut (.clk_in, .rst, .q, .ovf);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    #1 rst = 1'b1;  // the reset acts on its rising edge
    #4;
    check(q == '0 && ovf == 1'b0, "reset does not clear the counter");
    for (int b = 0; b < 60; b++) begin
      rst = 1'b0;
      #2;
      case (b)
        0: n = 0;
        1: n = 1;
        2: n = 255;
        3: n = 256;
        4: n = 300;
        default: n = $urandom_range(200, 0);
      endcase
      for (int i = 0; i < n; i++) begin
        clk_in = 1'b1; #(0.5 + 0.001 * $urandom_range(500, 0));
        clk_in = 1'b0; #(0.5 + 0.001 * $urandom_range(500, 0));
      end
      #3;
      check(q == N'(n), $sformatf("burst %0d: count %0d, expected %0d", b, q, n % 256));
      check(ovf == (n >= 256), $sformatf("burst %0d: ovf %0b for %0d pulses", b, ovf, n));
      rst = 1'b1;
      #2;
      check(q == '0 && !ovf, "reset does not clear the counter");
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
