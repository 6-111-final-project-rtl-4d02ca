// display_8hex_tb: shows random 32-bit values on the eight-digit display
// and, at every clock, decodes the active-low segment and digit-select pins
// back to a hex digit with its own table; checks that exactly one digit is
// on, that the digit on the leftmost strobe shows the top nibble and so on,
// and that every digit position is visited in one refresh cycle.
//
// The eight-digit multiplexed display follows the boards' usual use; the
// expected strobe order is this design's.
module display_8hex_tb;
  localparam int B = 4;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [31:0] data;
  logic [6:0]  seg;
  logic [7:0]  strobe;

  display_8hex #(.BITS(B)) dut (.clk(clk), .rst(rst), .data(data), .seg(seg), .strobe(strobe));

  // Segments a..g lit for each hex digit, written as strings.
  function automatic int decode(input logic [6:0] lit);  // lit = {g,f,e,d,c,b,a}
    string pat[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                       "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};
    for (int v = 0; v < 16; v++) begin
      logic [6:0] m = 0;
      for (int k = 0; k < pat[v].len(); k++) m[pat[v][k] - "a"] = 1'b1;
      if (m == lit) return v;
    end
    return -1;
  endfunction

  int pos, seen;
  initial begin
    data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 6; n++) begin
      data = $urandom;
      seen = 0;
      repeat (3) @(posedge clk);
      repeat (2 ** (B + 1)) begin
        @(posedge clk); #1;
        pos = -1;
        for (int k = 0; k < 8; k++) if (!strobe[k]) pos = (pos == -1) ? k : -2;
        checks++;
        if (pos < 0) begin failures++; $display("FAIL: strobe %b", strobe); end
        else begin
          seen |= 1 << pos;
          checks++;
          if (decode(~seg) != int'(data[pos*4 +: 4])) begin
            failures++;
            $display("FAIL: digit %0d shows %0d, expected %h", pos, decode(~seg), data[pos*4 +: 4]);
          end
        end
      end
      checks++;
      if (seen != 255) begin failures++; $display("FAIL: positions visited %b", seen); end
    end
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
