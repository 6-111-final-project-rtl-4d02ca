// button_command_tb: presses random combinations of the four direction
// buttons and checks the command code three clocks later against the
// priority up > down > right > left, with no button giving STOP.
//
// The codes and the button meanings follow the original design; the priority
// order among buttons pressed together is this design's choice.
module button_command_tb;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic u, d, r, l;
  logic [2:0] command, expect_c;

  button_command dut (.clk(clk), .rst(rst), .up(u), .down(d), .right(r), .left(l), .command(command));

  initial begin
    {u, d, r, l} = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      {u, d, r, l} = (i < 16) ? 4'(i) : 4'($urandom);
      expect_c = u ? 3'd1 : d ? 3'd2 : r ? 3'd3 : l ? 3'd4 : 3'd0;
      repeat (2) @(negedge clk);
      if (expect_c != 3'd0) begin  // the previous command was STOP
        checks++;
        if (command != 3'd0) begin failures++; $display("FAIL: command changed too early"); end
      end
      @(negedge clk);
      checks++;
      if (command != expect_c) begin
        failures++;
        $display("FAIL: buttons %b give %0d, expected %0d", {u, d, r, l}, command, expect_c);
      end
      {u, d, r, l} = 0;
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
