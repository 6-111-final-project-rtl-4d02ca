// camera_display_tb: writes random colours into the picture memory on the
// 50 MHz side and reads the screen on the 65 MHz side. At screen position
// (hcount, vcount) inside the 240 x 320 window the pixel two clocks later
// must be the word at 320*hcount + vcount (the picture is stored rotated);
// outside it must be black. In double mode the same holds with both
// coordinates halved, over a 480 x 640 window.
//
// The address formula and the rotated window follow the original design; the
// plain halving in double mode is this design's choice.
module camera_display_tb;
  logic wclk = 0, pclk = 0;
  always #10 wclk = !wclk;
  always #7.7 pclk = !pclk;
  int checks = 0, failures = 0;
  logic        we, dbl;
  logic [16:0] wa;
  logic [11:0] wd, pixel;
  logic [10:0] h;
  logic [9:0]  v;
  logic [11:0] model [76800];

  camera_display dut (.wclk(wclk), .wr_en(we), .wr_addr(wa), .wr_data(wd), .pclk(pclk),
                      .hcount(h), .vcount(v), .double_on(dbl), .pixel(pixel));

  task automatic probe(input int px, input int py, input string what);
    int hh, vv;
    logic [11:0] want;
    @(negedge pclk); h = 11'(px); v = 10'(py);
    repeat (2) @(negedge pclk);
    hh = dbl ? px / 2 : px; vv = dbl ? py / 2 : py;
    want = (hh < 240 && vv < 320) ? model[320 * hh + vv] : 12'h000;
    checks++;
    if (pixel != want) begin failures++; $display("FAIL: %s (%0d,%0d) = %h, expected %h", what, px, py, pixel, want); end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; dbl = 0; h = 0; v = 0;
    foreach (model[i]) model[i] = 0;
    @(negedge wclk);
    for (int i = 0; i < 3000; i++) begin
      wa = (i < 4) ? 17'(i == 0 ? 0 : i == 1 ? 319 : i == 2 ? 76480 : 76799) : 17'($urandom_range(0, 76799));
      wd = 12'($urandom) | 12'h001;
      we = 1;
      model[wa] = wd;
      @(negedge wclk);
    end
    we = 0;
    repeat (3) @(negedge wclk);
    // Normal size: corners and random points, then outside.
    probe(0, 0, "origin"); probe(0, 319, "corner"); probe(239, 0, "corner"); probe(239, 319, "corner");
    for (int i = 0; i < 200; i++) begin
      wa = 17'($urandom_range(0, 76799));
      probe(int'(wa) / 320, int'(wa) % 320, "inside");
    end
    probe(240, 10, "right of window"); probe(10, 320, "below window"); probe(1000, 700, "far");
    dbl = 1;
    probe(0, 0, "2x origin"); probe(1, 1, "2x origin"); probe(479, 639, "2x corner"); probe(478, 638, "2x corner");
    for (int i = 0; i < 200; i++) probe($urandom_range(0, 479), $urandom_range(0, 639), "2x inside");
    probe(480, 10, "2x right"); probe(10, 640, "2x below");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
