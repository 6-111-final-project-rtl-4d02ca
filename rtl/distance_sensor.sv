// distance_sensor: HC-SR04 ultrasonic range finder controller.
//
// The machine waits PERIOD_US in IDLE, raises trigger for TRIGGER_US, then
// waits in ECHO for the echo pulse. It counts whole microseconds while echo is
// high; when echo falls it divides the count by 148 (inches, INCHES=1) or 58
// (centimetres, INCHES=0) by repeated subtraction, stores the result in
// distance, pulses distance_valid and goes back to IDLE. If the echo has not
// both begun and ended within PERIOD_US of the trigger, it triggers again.
// Range of the sensor is 2 cm to 400 cm, so 10 bits hold every reading.
//
// Timing: a microsecond is CLK_HZ/1e6 clocks. The division takes at most
// 700 clocks. The echo input passes through two flip-flops first.
//
// Following the source design: the states (IDLE, TRIGGER, ECHO, READ,
// TRANSMIT), the 40 ms and 10 us times, the 148/58 divisors. Own choices:
// the echo synchroniser and the serial division.
module distance_sensor #(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter bit          INCHES     = 1'b1,
  parameter int unsigned PERIOD_US  = 40_000,
  parameter int unsigned TRIGGER_US = 10
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       echo,
  output logic       trigger,
  output logic [9:0] distance,
  output logic       distance_valid
);
  localparam int unsigned TICK    = CLK_HZ / 1_000_000;
  localparam int unsigned TW      = $clog2(TICK + 1);
  localparam int unsigned UW      = $clog2(PERIOD_US + 1);
  localparam logic [UW-1:0] DIVISOR = INCHES ? UW'(148) : UW'(58);

  typedef enum logic [2:0] {S_IDLE, S_TRIGGER, S_ECHO, S_READ, S_TRANSMIT} ds_state_e;
  ds_state_e     state;
  logic [TW-1:0] tick_cnt;
  logic          us_tick;
  logic [UW-1:0] us_cnt;      // microseconds in the current state
  logic [UW-1:0] echo_us;     // length of the echo pulse
  logic [UW-1:0] rem;
  logic [9:0]    quot;
  logic [1:0]    echo_sync;
  logic          echo_seen;

  assign us_tick = (tick_cnt == TW'(TICK - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= S_IDLE;
      tick_cnt       <= '0;
      us_cnt         <= '0;
      echo_us        <= '0;
      rem            <= '0;
      quot           <= '0;
      echo_sync      <= '0;
      echo_seen      <= 1'b0;
      trigger        <= 1'b0;
      distance       <= '0;
      distance_valid <= 1'b0;
    end else begin
      echo_sync      <= {echo_sync[0], echo};
      distance_valid <= 1'b0;
      tick_cnt       <= us_tick ? '0 : tick_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (us_tick) us_cnt <= us_cnt + 1'b1;
          if (us_tick && us_cnt == UW'(PERIOD_US - 1)) begin
            state    <= S_TRIGGER;
            us_cnt   <= '0;
            tick_cnt <= '0;
            trigger  <= 1'b1;
          end
        end
        S_TRIGGER: begin
          if (us_tick) us_cnt <= us_cnt + 1'b1;
          if (us_tick && us_cnt == UW'(TRIGGER_US - 1)) begin
            trigger   <= 1'b0;
            state     <= S_ECHO;
            us_cnt    <= '0;
            echo_us   <= '0;
            echo_seen <= 1'b0;
          end
        end
        S_ECHO: begin
          if (us_tick) begin
            us_cnt <= us_cnt + 1'b1;
            if (echo_sync[1]) begin
              echo_us   <= echo_us + 1'b1;
              echo_seen <= 1'b1;
            end
          end
          if (echo_seen && !echo_sync[1]) begin
            state <= S_READ;
            rem   <= echo_us;
            quot  <= '0;
          end else if (us_tick && us_cnt == UW'(PERIOD_US - 1)) begin
            state    <= S_TRIGGER;       // no complete echo: try again
            us_cnt   <= '0;
            tick_cnt <= '0;
            trigger  <= 1'b1;
          end
        end
        S_READ: begin
          if (rem >= DIVISOR) begin
            rem  <= rem - DIVISOR;
            quot <= quot + 1'b1;
          end else begin
            state <= S_TRANSMIT;
          end
        end
        default: begin  // S_TRANSMIT
          distance       <= quot;
          distance_valid <= 1'b1;
          state          <= S_IDLE;
          us_cnt         <= '0;
        end
      endcase
    end
  end
endmodule
