// Test of the reference divider with 4 stages: tick must be high for
// exactly one rising clk32 edge in every 16, and the first tick must come
// after the last stage first rises (8 periods after reset).
module tb_ref_divider;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 0, clk32 = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = -1, n = 0;

  ref_divider #(.DIV_STAGES(4)) dut (.*);

  always #10 clk32 = ~clk32;

  always @(posedge clk32) if (!rst) begin
    cyc++;
    if (tick) begin
      checks++;
      if (last < 0) begin
        if (cyc != 9) begin failures++; $display("FAIL: first tick at cycle %0d", cyc); end
      end else if (cyc - last != 16) begin
        failures++; $display("FAIL: ticks %0d cycles apart", cyc - last);
      end
      last = cyc; n++;
    end
  end

  initial begin
    #1 rst = 1; #4 rst = 0;
    repeat (16 * 10 + 4) @(posedge clk32);
    checks++; if (n != 10) begin failures++; $display("FAIL: %0d ticks, expected 10", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
