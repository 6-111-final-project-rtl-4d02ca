// picture_number: one digit sprite of the number display.
//
// The sprite occupies WIDTH x HEIGHT pixels with its top-left corner at
// (x, y). For the current raster position it forms the glyph address
// 2304*digit + (hcount - x) + (vcount - y)*WIDTH, reads the 4-bit gray value
// from its glyph memory and outputs it on all three colour channels inside
// the box and black outside.
//
// Timing: pixel belongs to the raster position of two clocks earlier (one
// clock of memory read, one of output register); the in-box test is delayed
// to match.
//
// Following the source design: the address formula and the gray-to-RGB
// mapping. Own choice: the in-box delay.
module picture_number #(
  parameter int unsigned WIDTH  = 48,
  parameter int unsigned HEIGHT = 48
) (
  input  logic        clk,
  input  logic [10:0] x,
  input  logic [9:0]  y,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [3:0]  digit,
  output logic [11:0] pixel
);
  logic        inbox, inbox_d;
  logic [14:0] addr;
  logic [3:0]  gray;

  assign inbox = (hcount >= x) && (hcount < x + 11'(WIDTH)) &&
                 (vcount >= y) && (vcount < y + 10'(HEIGHT));
  assign addr  = inbox ? 15'(2304 * int'(digit) + int'(11'(hcount - x)) + int'(10'(vcount - y)) * WIDTH) : '0;

  digit_rom rom (.clk(clk), .addr(addr), .data(gray));

  always_ff @(posedge clk) begin
    inbox_d <= inbox;
    pixel   <= inbox_d ? {gray, gray, gray} : 12'h000;
  end
endmodule
