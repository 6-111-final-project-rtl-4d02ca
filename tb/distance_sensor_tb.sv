// distance_sensor_tb: a sonar model answers each trigger pulse with an echo
// whose length is a random distance times 148 us (inches) or 58 us (cm),
// and the test checks the reported distance for both units, the trigger
// width (TRIGGER_US), the trigger period, and that a missing echo makes the
// block trigger again after PERIOD_US. The clock is scaled to 5 ticks per us.
//
// The 148 and 58 divisors, the 10 us trigger and the 40 ms period follow the
// original design and the sensor's data.
module distance_sensor_tb;
  localparam int HZ = 5_000_000, PER = 6000, TRIG = 10, TICK = 5;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic echo_i, trig_i, dv_i, echo_c, trig_c, dv_c;
  logic [9:0] dist_i, dist_c;
  int want_i, want_c, silent = 0, n_i = 0, n_c = 0;
  int trig_len, trig_start_prev = -1, period_seen = -1, cyc = 0;

  distance_sensor #(.CLK_HZ(HZ), .INCHES(1'b1), .PERIOD_US(PER), .TRIGGER_US(TRIG)) dut_i (
    .clk(clk), .rst(rst), .echo(echo_i), .trigger(trig_i), .distance(dist_i), .distance_valid(dv_i));
  distance_sensor #(.CLK_HZ(HZ), .INCHES(1'b0), .PERIOD_US(PER), .TRIGGER_US(TRIG)) dut_c (
    .clk(clk), .rst(rst), .echo(echo_c), .trigger(trig_c), .distance(dist_c), .distance_valid(dv_c));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sonar for the inch instance; measures the trigger too.
  initial begin
    echo_i = 0;
    forever begin
      @(posedge trig_i);
      if (trig_start_prev >= 0) period_seen = cyc - trig_start_prev;
      trig_start_prev = cyc;
      trig_len = cyc;
      @(negedge trig_i);
      trig_len = cyc - trig_len;
      if (silent > 0) silent--;
      else begin
        want_i = $urandom_range(1, 30);
        repeat (20 * TICK) @(posedge clk);
        echo_i = 1;
        repeat (want_i * 148 * TICK + TICK / 2) @(posedge clk);
        echo_i = 0;
      end
    end
  end
  initial begin
    echo_c = 0;
    forever begin
      @(negedge trig_c);
      want_c = $urandom_range(1, 90);
      repeat (20 * TICK) @(posedge clk);
      echo_c = 1;
      repeat (want_c * 58 * TICK + TICK / 2) @(posedge clk);
      echo_c = 0;
    end
  end
  always @(posedge clk) begin
    if (dv_i) begin n_i++; checks++; if (dist_i != 10'(want_i)) begin failures++; $display("FAIL: %0d in, expected %0d", dist_i, want_i); end end
    if (dv_c) begin n_c++; checks++; if (dist_c != 10'(want_c)) begin failures++; $display("FAIL: %0d cm, expected %0d", dist_c, want_c); end end
  end

  int n_before;
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (n_i == 3);
    check(trig_len == TRIG * TICK, $sformatf("trigger lasts %0d clocks", trig_len));
    check(period_seen >= PER * TICK, $sformatf("trigger period %0d clocks", period_seen));
    // Missing echo: the block retriggers after one period and still works.
    n_before = n_i;
    silent = 1;
    wait (silent == 0);
    wait (n_i == n_before + 1);
    check(period_seen >= PER * TICK && period_seen <= PER * TICK + 20 * TICK,
          $sformatf("retrigger after a missing echo, %0d clocks", period_seen));
    wait (n_c >= 4);
    check(n_c >= 4, "centimetre instance reports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
