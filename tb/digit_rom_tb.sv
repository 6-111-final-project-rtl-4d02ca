// digit_rom_tb: reads the digit picture memory at a sample point of each
// segment of each digit 0..9 (address 2304*digit + x + 48*y) and checks
// that the pixel is full white exactly when the digit uses that segment,
// that the corners are black, and that the read takes one clock.
//
// The 48x48 size and the address layout follow the original design; the
// seven-segment glyph shapes are this design's.
module digit_rom_tb;
  import glyph_ref_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [14:0] addr;
  logic [3:0]  data;

  digit_rom dut (.clk(clk), .addr(addr), .data(data));

  task automatic probe(input int d, input int x, input int y, input logic [3:0] want, input string what);
    @(negedge clk); addr = 15'(2304 * d + x + 48 * y);
    @(posedge clk); #1;
    checks++;
    if (data != want) begin failures++; $display("FAIL: digit %0d %s (%0d,%0d) = %h", d, what, x, y, data); end
  endtask

  initial begin
    addr = 0;
    for (int d = 0; d < 10; d++) begin
      for (int s = 0; s < 7; s++) probe(d, sx(s), sy(s), seg_on(d, s) ? 4'hF : 4'h0, $sformatf("segment %0d", s));
      probe(d, 0, 0, 4'h0, "corner");
      probe(d, 47, 47, 4'h0, "corner");
    end
    // Latency: change the address, data follows only after the edge.
    @(negedge clk); addr = 15'(2304 * 8 + 24 + 48 * 24);
    @(posedge clk); #1;
    @(negedge clk); addr = 15'(2304 * 8);
    #1 checks++; if (data != 4'hF) failures++;
    @(posedge clk); #1;
    checks++; if (data != 4'h0) failures++;
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
