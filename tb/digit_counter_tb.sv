// digit_counter_tb: feeds random distances (and values above 999) to the
// decimal digit counter and checks that after the next refresh period the
// three digits equal the value in decimal, capped at 999, that they hold
// steady between refreshes, and that a change shows within two periods.
//
// Counting up to the value follows the original design; the periodic refresh
// being checked is this design's choice.
module digit_counter_tb;
  localparam int R = 1000;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [9:0] value;
  logic [3:0] o, t, h;

  digit_counter dut (.clk(clk), .rst(rst), .value(value), .ones(o), .tens(t), .hundreds(h));

  int want;
  bit moved;
  logic [11:0] snap;
  initial begin
    value = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      value = (n == 0) ? 10'd0 : (n == 1) ? 10'd999 : (n == 2) ? 10'd1023 : 10'($urandom_range(0, 1023));
      want = (value > 999) ? 999 : int'(value);
      repeat (2 * R) @(negedge clk);
      checks++;
      if (h * 100 + t * 10 + o != want || o > 9 || t > 9 || h > 9) begin
        failures++;
        $display("FAIL: value %0d shows %0d%0d%0d", value, h, t, o);
      end
      snap = {h, t, o}; moved = 0;
      repeat (R / 2) begin @(negedge clk); if ({h, t, o} != snap) moved = 1; end
      checks++;
      if (moved) begin failures++; $display("FAIL: digits changed with a steady value"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
