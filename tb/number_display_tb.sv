// number_display_tb: shows random three-digit distances and reads back the
// screen at the segment sample points of the three digit pictures, placed
// at x = 700, 750, 800 and y = 50; each must be white exactly when the
// digit of the value (hundreds, tens, ones) uses that segment. Also checks
// that the area between and around the pictures stays black.
//
// The digit positions at x = 700, 750 and 800, y = 50, follow the original
// design.
module number_display_tb;
  import glyph_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [9:0]  value, v;
  logic [10:0] h;
  logic [11:0] pixel;

  number_display dut (.clk(clk), .rst(rst), .value(value), .hcount(h), .vcount(v), .pixel(pixel));

  task automatic probe(input int px, input int py, input logic [11:0] want, input string what);
    @(negedge clk); h = 11'(px); v = 10'(py);
    repeat (2) @(negedge clk);
    checks++;
    if (pixel != want) begin failures++; $display("FAIL: value %0d %s at (%0d,%0d) = %h", value, what, px, py, pixel); end
  endtask

  int dg[3];
  initial begin
    value = 0; h = 0; v = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 6; n++) begin
      value = (n == 0) ? 10'd808 : 10'($urandom_range(0, 999));
      repeat (2100) @(negedge clk);
      dg[0] = value / 100; dg[1] = (value / 10) % 10; dg[2] = value % 10;
      for (int p = 0; p < 3; p++)
        for (int s = 0; s < 7; s++)
          probe(700 + 50 * p + sx(s), 50 + sy(s), seg_on(dg[p], s) ? 12'hFFF : 12'h000,
                $sformatf("digit %0d segment %0d", p, s));
      probe(699, 74, 12'h000, "left of the number");
      probe(748, 74, 12'h000, "gap between digits");
      probe(848, 74, 12'h000, "right of the number");
      probe(724, 49, 12'h000, "above the number");
      probe(724, 98, 12'h000, "below the number");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
