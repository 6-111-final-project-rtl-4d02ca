// vga_display_tb: drives the whole display path (timing, number pictures,
// pixel unpacker, picture memory, mode switches, pin delay) with a fixed
// distance and a few camera pixel records, and checks the VGA pins over
// whole frames in each switch setting: 00 all black, 01 number only,
// 10 camera only, 11 both, and 10 with double size. The screen position of
// each pin sample is taken from the timing generator three clocks earlier,
// the pin delay of this design. Also checks the hsync pulse (136 clocks)
// and vsync pulse (6 lines of 1344 clocks) on the pins.
//
// The 1024x768 timing, the switch modes and the active-low syncs follow the
// original design; the three-clock pin delay is this design's.
module vga_display_tb;
  import glyph_ref_pkg::*;
  localparam int P = 6;
  localparam int VALUE = 123;
  logic c50 = 0, c65 = 0, rst = 1;
  always #10 c50 = !c50;
  always #7.7 c65 = !c65;
  int checks = 0, failures = 0;

  logic [2:0]       sw;
  logic [P*29-1:0]  cam;
  logic [3:0]       r, g, b;
  logic             hs, vs;

  vga_display #(.PIXELS(P)) dut (.clk_50mhz(c50), .clk_65mhz(c65), .rst(rst), .sw(sw),
    .sensor_value(10'(VALUE)), .camera_data(cam), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs), .vga_vs(vs));

  // Camera records: (address, colour); addresses chosen inside the picture.
  int          rec_addr[P];
  logic [11:0] rec_rgb[P];
  // Probe table for the current mode: key h*1024+v -> expected colour.
  logic [11:0] probes[int];

  function automatic void add_probes(input logic [2:0] m);
    int dg[3];
    probes.delete();
    dg[0] = VALUE / 100; dg[1] = (VALUE / 10) % 10; dg[2] = VALUE % 10;
    for (int p = 0; p < 3; p++)
      for (int s = 0; s < 7; s++)
        probes[(700 + 50 * p + sx(s)) * 1024 + 50 + sy(s)] = (m[0] && seg_on(dg[p], s)) ? 12'hFFF : 12'h000;
    for (int k = 0; k < P; k++) begin
      int hh, vv;
      hh = rec_addr[k] / 320; vv = rec_addr[k] % 320;
      if (m[2]) begin
        probes[(2 * hh) * 1024 + 2 * vv]         = m[1] ? rec_rgb[k] : 12'h000;
        probes[(2 * hh + 1) * 1024 + 2 * vv + 1] = m[1] ? rec_rgb[k] : 12'h000;
      end else begin
        probes[hh * 1024 + vv] = m[1] ? rec_rgb[k] : 12'h000;
      end
    end
    probes[600 * 1024 + 400] = 12'h000;
    probes[1100 * 1024 + 100] = 12'h000;   // horizontal blanking
    probes[100 * 1024 + 780] = 12'h000;    // vertical blanking
  endfunction

  // Position three clocks back.
  logic [10:0] hq[3];
  logic [9:0]  vq[3];
  int hit = 0, bad = 0, hs_low = 0, hs_w = -1, vs_low = 0, vs_w = -1;
  always @(posedge c65) begin
    if (!rst) begin
      int key;
      key = int'(hq[2]) * 1024 + int'(vq[2]);
      if (probes.exists(key)) begin
        hit++;
        if ({r, g, b} != probes[key]) begin
          bad++;
          if (bad < 10) $display("FAIL: sw=%b (%0d,%0d) = %h, expected %h", sw, hq[2], vq[2], {r, g, b}, probes[key]);
        end
      end
      if (!hs) hs_low++; else begin if (hs_low != 0) hs_w = hs_low; hs_low = 0; end
      if (!vs) vs_low++; else begin if (vs_low != 0) vs_w = vs_low; vs_low = 0; end
    end
    hq[2] <= hq[1]; hq[1] <= hq[0]; hq[0] <= dut.hcount;
    vq[2] <= vq[1]; vq[1] <= vq[0]; vq[0] <= dut.vcount;
  end

  task automatic run_frame(input logic [2:0] m);
    int h0;
    // Switch in vertical blanking, then run one full frame.
    wait (dut.vcount == 10'd790);
    @(negedge c65);
    sw = m;
    add_probes(m);
    h0 = hit;
    wait (dut.vcount == 10'd0);
    wait (dut.vcount == 10'd789);
    checks++;
    if (hit - h0 != probes.size()) begin failures++; $display("FAIL: sw=%b %0d of %0d probes seen", m, hit - h0, probes.size()); end
  endtask

  int b0;
  initial begin
    sw = 0;
    for (int k = 0; k < P; k++) begin
      rec_addr[k] = (k == 0) ? 0 : (k == 1) ? 76799 : $urandom_range(0, 76799);
      rec_rgb[k]  = 12'($urandom) | 12'h010;
      cam[29 * k +: 29] = {rec_rgb[k], 17'(rec_addr[k])};
    end
    hq = '{default: 0}; vq = '{default: 0};
    repeat (3) @(posedge c65);
    rst = 0;
    foreach (sw_list[i]) begin
      b0 = bad;
      run_frame(sw_list[i]);
      checks++;
      if (bad != b0) begin failures++; $display("FAIL: sw=%b had %0d wrong pixels", sw_list[i], bad - b0); end
    end
    checks++; if (hs_w != 136) begin failures++; $display("FAIL: hsync pulse %0d clocks", hs_w); end
    checks++; if (vs_w != 6 * 1344) begin failures++; $display("FAIL: vsync pulse %0d clocks", vs_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [2:0] sw_list[5] = '{3'b001, 3'b010, 3'b011, 3'b000, 3'b110};

  initial begin
    repeat (8_000_000) @(posedge c65);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
