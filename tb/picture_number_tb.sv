// picture_number_tb: places one digit picture at a random screen position
// and moves the raster position over it; checks that, two clocks later, a
// segment sample point shows white (0xFFF) when the digit uses it and black
// otherwise, and that every position just outside the 48x48 box is black.
//
// The 48x48 picture and its address follow the original design; the two-
// clock latency is this design's.
module picture_number_tb;
  import glyph_ref_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [10:0] x, h;
  logic [9:0]  y, v;
  logic [3:0]  digit;
  logic [11:0] pixel;

  picture_number dut (.clk(clk), .x(x), .y(y), .hcount(h), .vcount(v), .digit(digit), .pixel(pixel));

  // The raster moves one position per clock; pixel is compared two clocks on.
  logic [11:0] want_q[$];
  task automatic at(input int px, input int py, input logic [11:0] want);
    @(negedge clk); h = 11'(px); v = 10'(py);
    want_q.push_back(want);
  endtask
  always @(posedge clk) begin
    if (want_q.size() > 2) begin
      checks++;
      if (pixel != want_q[0]) begin failures++; $display("FAIL: pixel %h expected %h", pixel, want_q[0]); end
      void'(want_q.pop_front());
    end
  end

  initial begin
    h = 0; v = 0; x = 0; y = 0; digit = 0;
    repeat (3) at(0, 0, 12'h000);
    for (int n = 0; n < 10; n++) begin
      x = 11'($urandom_range(1, 900)); y = 10'($urandom_range(1, 700)); digit = 4'(n);
      repeat (2) at(0, 0, 12'h000);
      for (int s = 0; s < 7; s++) at(x + sx(s), y + sy(s), seg_on(n, s) ? 12'hFFF : 12'h000);
      at(x - 1, y + 24, 12'h000);
      at(x + 48, y + 24, 12'h000);
      at(x + 24, y - 1, 12'h000);
      at(x + 24, y + 48, 12'h000);
      repeat (2) at(0, 0, 12'h000);
    end
    repeat (3) @(posedge clk);
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
