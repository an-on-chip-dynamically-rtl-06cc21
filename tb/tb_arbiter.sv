// Test of the clocked arbiter with two random four-phase clients.
// Checks mutual exclusion at all times, that every request is granted
// within a bound (both clients can wait for the other's hold time plus a
// few local clock periods), that a grant is only withdrawn after its
// request falls, and that both clients get grants while the other waits.
module tb_arbiter;
  timeunit 1ns; timeprecision 1ps;
  logic rst = 0, r1 = 0, r2 = 0, g1, g2;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n_contend = 0;

  arbiter #(.LCLK_PERIOD_PS(4000)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $realtime, what); end
  endtask

  always @(g1 or g2) if (!rst) check(!(g1 && g2), "both grants high");
  always @(negedge g1) if (!rst) check(!r1, "g1 withdrawn while r1 high");
  always @(negedge g2) if (!rst) check(!r2, "g2 withdrawn while r2 high");
  always @(posedge g1) if (r2 && !g2) n_contend++;
  always @(posedge g2) if (r1 && !g1) n_contend++;

  task automatic client(int id);
    for (int i = 0; i < 200; i++) begin
      realtime t0;
      #($urandom_range(0, 60));
      t0 = $realtime;
      if (id == 1) begin r1 = 1; wait (g1); end
      else         begin r2 = 1; wait (g2); end
      check($realtime - t0 < 80.0 + 16.0, $sformatf("client %0d waited %0.1f ns", id, $realtime - t0));
      #($urandom_range(1, 80));
      if (id == 1) begin r1 = 0; wait (!g1); n1++; end
      else         begin r2 = 0; wait (!g2); n2++; end
    end
  endtask

  initial begin
    #1 rst = 1; #10 rst = 0; #10;
    check(!g1 && !g2, "grant after reset");
    fork client(1); client(2); join
    check(n1 == 200 && n2 == 200, "not all requests served");
    check(n_contend > 0, "no contention happened");
    $display("served %0d/%0d, contended %0d", n1, n2, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
