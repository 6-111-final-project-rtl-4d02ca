// hc_sr04_model: behavioural model of the ultrasonic distance sensor (not
// synthesizable). After each trigger pulse it waits ECHO_DELAY_US and then
// holds echo high for distance_in * 148 us, the round-trip time of sound
// per inch. CYCLES_PER_US is the testbench clock rate.
//
// The 148 us per inch figure follows the original design; the echo delay is
// this model's own choice.
module hc_sr04_model #(
  parameter int CYCLES_PER_US = 50,
  parameter int ECHO_DELAY_US = 20
) (
  input  logic clk,
  input  logic trigger,
  input  int   distance_in,
  output logic echo
);
  int pulses = 0;
  initial begin
    echo = 0;
    forever begin
      @(negedge trigger);
      pulses++;
      repeat (ECHO_DELAY_US * CYCLES_PER_US) @(posedge clk);
      echo = 1;
      repeat (distance_in * 148 * CYCLES_PER_US) @(posedge clk);
      echo = 0;
    end
  end
endmodule
