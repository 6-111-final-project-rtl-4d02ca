// button_command: the controller's d-pad, turning four debounced buttons
// into the 3-bit robot command placed in the low bits of the command payload.
//
// Up is FORWARD (1), down BACKWARD (2), right RIGHT (3), left LEFT (4) and no
// button STOP (0), so the robot stops as soon as the buttons are released.
// If several buttons are held, the first in that order wins. The buttons
// come from the 100 MHz debouncers and pass two flip-flops of the 50 MHz
// clock; the command is registered, three clocks after a button settles.
//
// Following the source design: the code table and the priority order.
// Own choice: the clock-domain synchroniser.
module button_command
  import eth_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       up,
  input  logic       down,
  input  logic       right,
  input  logic       left,
  output logic [2:0] command
);
  logic [3:0] s1, s2;   // {up, down, right, left}

  always_ff @(posedge clk) begin
    if (rst) begin
      s1      <= '0;
      s2      <= '0;
      command <= CMD_STOP;
    end else begin
      s1 <= {up, down, right, left};
      s2 <= s1;
      if (s2[3])      command <= CMD_FORWARD;
      else if (s2[2]) command <= CMD_BACKWARD;
      else if (s2[1]) command <= CMD_RIGHT;
      else if (s2[0]) command <= CMD_LEFT;
      else            command <= CMD_STOP;
    end
  end
endmodule
