// bit_extractor_tb: gives the extractor random accepted counts with every
// bit-number selection and checks, one cycle after `pass`, the valid pulse,
// the number of bits and that the data are the count's low bits with the
// unused high bits zero. Without `pass` the outputs must hold.
module bit_extractor_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8, X = 4;
  logic clk = 1'b0, rst_n = 1'b1, pass = 1'b0;
  logic [W-1:0] count_q = '0;
  logic [1:0] bits_sel = '0;
  logic [X-1:0] rnd_data;
  logic [2:0] rnd_nbits;
  logic rnd_valid;
  int checks = 0, failures = 0;

  bit_extractor #(.COUNT_W(W), .XMAX(X)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // The reset is applied as a falling edge so that it reaches the
  // asynchronously reset flip-flops.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      int c, s, nb;
      logic [X-1:0] exp_d, old_d;
      bit p;
      c = $urandom_range(255, 0);
      s = $urandom_range(3, 0);
      p = ($urandom_range(3, 0) != 0);
      old_d = rnd_data;
      @(negedge clk);
      count_q = W'(c); bits_sel = 2'(s); pass = p;
      @(negedge clk);
      pass = 1'b0;
      nb = s + 1;
      exp_d = X'(c % (1 << nb));
      if (p) begin
        check(rnd_valid, "no valid pulse");
        check(rnd_nbits == 3'(nb), $sformatf("nbits %0d, expected %0d", rnd_nbits, nb));
        check(rnd_data == exp_d, $sformatf("count %0h sel %0d: data %0h, expected %0h", c, s, rnd_data, exp_d));
      end else begin
        check(!rnd_valid && rnd_data == old_d, "output changed without pass");
      end
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
