// digit_rom: read-only glyph memory for the digits 0-9.
//
// Ten 48 x 48 glyphs of 4-bit grayscale, stored one after another: the word
// for pixel (x, y) of digit d is at address 2304*d + 48*y + x (23040 words).
// The read is registered: data is valid one clock after addr. Out-of-range
// addresses read 0.
//
// The glyphs are seven-segment shapes: bars 6 pixels thick (top bar rows
// 4-9, middle 21-26, bottom 38-43, columns 10-37; left bars columns 8-13 and
// right bars 34-39, upper rows 6-23 and lower rows 24-41), full brightness
// (15) on a black ground. Each word is computed from its address, so the
// memory needs no initialisation file; the original glyph artwork is not
// part of this design.
module digit_rom (
  input  logic        clk,
  input  logic [14:0] addr,
  output logic [3:0]  data
);
  localparam int unsigned W = 48;

  function automatic logic [3:0] glyph(input logic [14:0] a);
    int unsigned d, r, gx, gy;
    logic [6:0] segs;   // gfedcba
    logic on;
    d = int'(a) / (W * W);
    r = int'(a) % (W * W);
    gy = r / W;
    gx = r % W;
    unique case (d)
      0: segs = 7'b0111111;  1: segs = 7'b0000110;  2: segs = 7'b1011011;
      3: segs = 7'b1001111;  4: segs = 7'b1100110;  5: segs = 7'b1101101;
      6: segs = 7'b1111101;  7: segs = 7'b0000111;  8: segs = 7'b1111111;
      9: segs = 7'b1101111;  default: segs = 7'b0000000;
    endcase
    on = 1'b0;
    if (segs[0] && gy >= 4  && gy < 10 && gx >= 10 && gx < 38) on = 1'b1;  // a
    if (segs[1] && gx >= 34 && gx < 40 && gy >= 6  && gy < 24) on = 1'b1;  // b
    if (segs[2] && gx >= 34 && gx < 40 && gy >= 24 && gy < 42) on = 1'b1;  // c
    if (segs[3] && gy >= 38 && gy < 44 && gx >= 10 && gx < 38) on = 1'b1;  // d
    if (segs[4] && gx >= 8  && gx < 14 && gy >= 24 && gy < 42) on = 1'b1;  // e
    if (segs[5] && gx >= 8  && gx < 14 && gy >= 6  && gy < 24) on = 1'b1;  // f
    if (segs[6] && gy >= 21 && gy < 27 && gx >= 10 && gx < 38) on = 1'b1;  // g
    return on ? 4'hF : 4'h0;
  endfunction

  always_ff @(posedge clk) data <= glyph(addr);
endmodule
