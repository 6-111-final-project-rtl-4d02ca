// motor_control_tb: applies every 3-bit command and compares the four motor
// driver pins {left A, left B, right A, right B} with a table written from
// the command meanings: forward both wheels forward, backward both back,
// right = left wheel forward only, left = right wheel forward only, and
// everything else (stop and unused codes) all pins low.
//
// The command meanings follow the original design; the pin encoding (10
// forward, 01 back) is this design's.
module motor_control_tb;
  int checks = 0, failures = 0;
  logic [2:0] command;
  logic [3:0] motor;
  logic [3:0] expect_m;

  motor_control dut (.command(command), .motor(motor));

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int c = 0; c < 8; c++) begin
        command = 3'(c);
        case (c)
          1: expect_m = 4'b1010;  // forward
          2: expect_m = 4'b0101;  // backward
          3: expect_m = 4'b1000;  // right turn
          4: expect_m = 4'b0010;  // left turn
          default: expect_m = 4'b0000;
        endcase
        #5;
        checks++;
        if (motor !== expect_m) begin
          failures++;
          $display("FAIL: command %0d gives %b, expected %b", c, motor, expect_m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
