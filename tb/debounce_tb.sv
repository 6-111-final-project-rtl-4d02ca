// debounce_tb: bounces a button input with short pulses and checks
// that the clean output does not move, then holds the new level and checks
// that the output follows exactly COUNT + 4 clocks after the input settled
// (two synchroniser stages, one compare, COUNT stable clocks, one output
// register), for both a press and a release.
//
// The stable-count idea follows the original design; the exact latency
// checked is that of this implementation.
module debounce_tb;
  localparam int C = 50;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic noisy, clean;
  int t;

  debounce #(.COUNT(C)) dut (.clk(clk), .rst(rst), .noisy(noisy), .clean(clean));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic settle(input logic level);
    bit moved = 0;
    logic lvl_before;
    lvl_before = clean;
    repeat (40) begin
      @(negedge clk); noisy = !noisy;
      repeat ($urandom_range(C / 2 - 2)) begin @(negedge clk); if (clean != lvl_before) moved = 1; end
    end
    noisy = !level;
    repeat (3) begin @(negedge clk); if (clean != lvl_before) moved = 1; end
    check(!moved, "output steady while bouncing");
    noisy = level;
    t = 0;
    while (clean != level && t < 10 * C) begin @(negedge clk); t++; end
    check(t == C + 4, $sformatf("output followed %0d clocks after settling", t));
  endtask

  initial begin
    noisy = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (C + 10) @(negedge clk);
    check(clean == 0, "starts released");
    settle(1);
    settle(0);
    settle(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
