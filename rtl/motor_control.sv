// motor_control: command decoder for the two-motor L9110 driver.
//
// The 3-bit command (STOP 0, FORWARD 1, BACKWARD 2, RIGHT 3, LEFT 4) selects
// the two inputs of each motor channel. For one channel, IA=1/IB=0 turns the
// motor one way, IA=0/IB=1 the other way and equal inputs stop it. Motor A
// is the left motor and motor B the right one. FORWARD runs both forward,
// BACKWARD both backward, RIGHT only the left motor forward and LEFT only the
// right motor forward. Any other code stops both motors.
//
// Interface: motor = {AIA, AIB, BIA, BIB}. Purely combinational; the command
// comes from a register in the robot top, so the pins change one clock after
// a new command is received.
//
// Following the source design: the codes, the motion table and the channel
// wiring. Own choice: unused codes 5-7 stop the motors.
module motor_control
  import eth_pkg::*;
(
  input  logic [2:0] command,
  output logic [3:0] motor
);
  localparam logic [1:0] M_OFF = 2'b00, M_FWD = 2'b10, M_BACK = 2'b01;

  logic [1:0] left_m, right_m;
  always_comb begin
    unique case (command)
      CMD_FORWARD:  begin left_m = M_FWD;  right_m = M_FWD;  end
      CMD_BACKWARD: begin left_m = M_BACK; right_m = M_BACK; end
      CMD_RIGHT:    begin left_m = M_FWD;  right_m = M_OFF;  end
      CMD_LEFT:     begin left_m = M_OFF;  right_m = M_FWD;  end
      default:      begin left_m = M_OFF;  right_m = M_OFF;  end
    endcase
  end
  assign motor = {left_m, right_m};
endmodule
