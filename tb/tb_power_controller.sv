// Self-checking test of power_controller with short delays.  Raises the
// over-current input and checks the detection latency (three edges through
// the synchroniser), the pcse pulse, that the supply stays off for exactly
// OFF_CYCLES cycles, the settle time, the restored pulse, a second fault
// during the settle time, and that the controller ignores a quiet sensor.
module tb_power_controller;
  localparam int unsigned OFF = 17, SET = 9;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, oc = 0;
  logic pwr, pcse, restored, off;
  int   pcse_n = 0, rest_n = 0;

  power_controller #(.OFF_CYCLES(OFF), .SETTLE_CYCLES(SET)) dut (
    .clk(clk), .rst_n(rst_n), .overcurrent_i(oc),
    .power_en_o(pwr), .pcse_o(pcse), .restored_o(restored), .off_o(off)
  );

  always #5 clk = ~clk;
  always @(negedge clk) begin
    if (pcse) pcse_n++;
    if (restored) rest_n++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // Count cycles until cond is seen after a clock edge.
  int t_edge;

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    check(pwr && !off && pcse_n == 0, "quiet sensor keeps the chip on");
    // fault
    @(negedge clk) oc = 1;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (pwr);
    check(n == 3, $sformatf("power off after %0d edges", n));
    check(pcse && off, "pcse pulse with power off");
    @(negedge clk) oc = 0;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!pwr);
    check(n == OFF, $sformatf("off for %0d cycles", n));
    check(off && !restored, "settling");
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!restored);
    check(n == SET, $sformatf("settle for %0d cycles", n));
    check(!off && pwr, "on again");
    @(posedge clk); #1;
    check(!restored && pcse_n == 1 && rest_n == 1, "single pulses");
    // fault again, then a second over-current during settle
    @(negedge clk) oc = 1;
    repeat (4) @(posedge clk);
    @(negedge clk) oc = 0;
    #1 check(!pwr, "second fault powers off");
    repeat (OFF) @(posedge clk);
    #1 check(pwr && off, "settling after second fault");
    @(negedge clk) oc = 1;
    repeat (4) @(posedge clk);
    #1 check(!pwr, "fault during settle powers off again");
    @(negedge clk) oc = 0;
    repeat (OFF + SET + 5) @(posedge clk);
    #1 check(pwr && !off && rest_n == 2, "recovered after repeated fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
