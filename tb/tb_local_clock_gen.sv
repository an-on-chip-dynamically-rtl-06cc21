// Test of the gated local clock: it toggles with the set period while en
// is high and rests low once en falls.
module tb_local_clock_gen;
  timeunit 1ns; timeprecision 1ps;
  logic en = 0, clk;
  int checks = 0, failures = 0;
  int edges = 0;
  realtime last = 0;

  local_clock_gen #(.PERIOD_PS(4000)) dut (.*);

  always @(posedge clk) begin
    if (edges > 0) begin
      checks++;
      if ($realtime - last < 3.99 || $realtime - last > 4.01) begin
        failures++; $display("FAIL: period %0.2f", $realtime - last);
      end
    end
    last = $realtime;
    edges++;
  end

  initial begin
    #50;
    checks++; if (edges != 0 || clk) begin failures++; $display("FAIL: runs while disabled"); end
    en = 1; #39;   // rising edges at 2, 6, ..., 38 ns after en
    en = 0;
    #20;
    checks++; if (edges != 10) begin failures++; $display("FAIL: %0d edges, expected 10", edges); end
    checks++; if (clk) begin failures++; $display("FAIL: clock not at rest"); end
    edges = 0; #100;
    checks++; if (edges != 0) begin failures++; $display("FAIL: edges while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
