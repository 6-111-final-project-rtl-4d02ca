// xvga_tb: runs the 1024x768 timing generator (1344 x 806 clocks per frame)
// for a little over two frames and checks at every clock, from the counters
// it outputs, that hsync is low exactly for hcount 1048..1183, vsync low
// exactly for lines 771..776, blank high outside the 1024x768 picture, that
// the counters step by one and wrap at 1344 and 806, and that a frame lasts
// 1,083,264 clocks.
//
// The 1024x768 timing numbers follow the original design.
module xvga_tb;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [10:0] hc;
  logic [9:0]  vc;
  logic        hs, vs, bl;

  xvga dut (.clk(clk), .rst(rst), .hcount(hc), .vcount(vc), .hsync(hs), .vsync(vs), .blank(bl));

  int errs = 0, frames = 0, last_frame = -1, period = 0, cyc = 0;
  logic [10:0] ph; logic [9:0] pv;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    ph = hc; pv = vc;
    repeat (2 * 1344 * 806 + 5000) begin
      @(negedge clk); cyc++;
      if (hs != !(hc >= 1048 && hc < 1184)) errs++;
      if (vs != !(vc >= 771 && vc < 777)) errs++;
      if (bl != (hc >= 1024 || vc >= 768)) errs++;
      if (hc != ((ph == 1343) ? 0 : ph + 1)) errs++;
      if (vc != ((ph != 1343) ? pv : (pv == 805) ? 0 : pv + 1)) errs++;
      if (hc == 0 && vc == 0) begin
        if (last_frame >= 0) period = cyc - last_frame;
        last_frame = cyc; frames++;
      end
      ph = hc; pv = vc;
    end
    checks++; if (errs != 0) begin failures++; $display("FAIL: %0d timing errors", errs); end
    checks++; if (frames < 2) begin failures++; $display("FAIL: %0d frames", frames); end
    checks++; if (period != 1344 * 806) begin failures++; $display("FAIL: frame period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
