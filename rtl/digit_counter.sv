// digit_counter: binary to three decimal digits by counting.
//
// Every REFRESH clocks a new conversion starts: a binary counter and three
// BCD digit registers are cleared, and each clock the ones digit counts up,
// carrying into the tens when it is 9 and the tens into the hundreds when
// both are 9, until the binary counter equals value (or reaches 999). At the
// end of the refresh period the three digits are copied to the outputs, so
// the outputs always show a finished conversion, refreshed every REFRESH
// clocks. Values from 999 up show 999; REFRESH must exceed 999.
//
// Following the source design: conversion by BCD counting and the refresh
// threshold of 1000. Own choice: the outputs are updated once per period.
module digit_counter #(
  parameter int unsigned REFRESH = 1000
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [9:0] value,
  output logic [3:0] ones,
  output logic [3:0] tens,
  output logic [3:0] hundreds
);
  localparam int unsigned RW = $clog2(REFRESH);
  logic [RW-1:0] refresh;
  logic [9:0]    cnt;
  logic [3:0]    o, t, h;

  always_ff @(posedge clk) begin
    if (rst) begin
      refresh  <= '0;
      cnt    <= '0;
      {o, t, h} <= '0;
      {ones, tens, hundreds} <= '0;
    end else if (refresh == RW'(REFRESH - 1)) begin
      refresh  <= '0;
      ones     <= o;
      tens     <= t;
      hundreds <= h;
      cnt    <= '0;
      {o, t, h} <= '0;
    end else begin
      refresh <= refresh + 1'b1;
      if (cnt != value && cnt != 10'd999) begin
        cnt <= cnt + 1'b1;
        o <= (o == 4'd9) ? 4'd0 : o + 1'b1;
        if (o == 4'd9) begin
          t <= (t == 4'd9) ? 4'd0 : t + 1'b1;
          if (t == 4'd9) h <= (h == 4'd9) ? 4'd0 : h + 1'b1;
        end
      end
    end
  end
endmodule
