// Test of the ripple counter: random numbers of pulses at random spacing,
// value compared after settling, asynchronous clear, and wrap-around of an
// 8-bit counter.
module tb_ripple_counter;
  timeunit 1ns; timeprecision 1ps;
  logic clr = 0, cnt_clk = 0;
  logic [7:0] count;
  int checks = 0, failures = 0;

  ripple_counter #(.COUNT_W(8)) dut (.*);

  initial begin
    #1 clr = 1; #5 clr = 0;
    for (int t = 0; t < 30; t++) begin
      int n;
      n = $urandom_range(0, 600);
      clr = 1; #2 clr = 0; #2;
      checks++;
      if (count != 0) begin failures++; $display("FAIL: clear left %0d", count); end
      repeat (n) begin
        #($urandom_range(1, 5)) cnt_clk = 1;
        #($urandom_range(1, 5)) cnt_clk = 0;
      end
      #5;
      checks++;
      if (count != 8'(n)) begin failures++; $display("FAIL: %0d pulses counted as %0d", n, count); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
