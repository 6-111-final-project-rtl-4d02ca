// number_display: shows the distance reading as three decimal digits.
//
// A digit_counter turns the 10-bit value into hundreds, tens and ones; three
// 48 x 48 digit sprites draw them at (NUM_X, NUM_Y), (NUM_X+50, NUM_Y) and
// (NUM_X+100, NUM_Y), hundreds on the left. The sprites never overlap, so
// the output is the OR of their pixels.
//
// Timing: pixel belongs to the raster position of two clocks earlier; the
// digits change at most once per 1000 clocks.
//
// Following the source design: positions (700, 50) with 50-pixel spacing,
// the digit counter, three sprites and the OR.
module number_display #(
  parameter int unsigned NUM_X = 700,
  parameter int unsigned NUM_Y = 50
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [9:0]  value,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [11:0] pixel
);
  logic [3:0]  ones, tens, hundreds;
  logic [11:0] pxl_100, pxl_10, pxl_1;

  digit_counter count (.clk(clk), .rst(rst), .value(value),
                       .ones(ones), .tens(tens), .hundreds(hundreds));

  picture_number d100 (.clk(clk), .x(11'(NUM_X)),       .y(10'(NUM_Y)), .hcount(hcount), .vcount(vcount),
                       .digit(hundreds), .pixel(pxl_100));
  picture_number d10  (.clk(clk), .x(11'(NUM_X + 50)),  .y(10'(NUM_Y)), .hcount(hcount), .vcount(vcount),
                       .digit(tens), .pixel(pxl_10));
  picture_number d1   (.clk(clk), .x(11'(NUM_X + 100)), .y(10'(NUM_Y)), .hcount(hcount), .vcount(vcount),
                       .digit(ones), .pixel(pxl_1));

  assign pixel = pxl_100 | pxl_10 | pxl_1;
endmodule
