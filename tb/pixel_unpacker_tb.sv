// pixel_unpacker_tb: loads random pixel records into the packed camera
// field and checks that the unpacker writes record 0, 1, 2 ... in turn, one
// per clock starting the clock after reset, each with its 17-bit address
// and 12-bit colour, and starts over after the last record; then changes the
// field and checks that the new records appear within one round.
//
// The record layout follows the original design; the one-record-per-clock
// round is this design's.
module pixel_unpacker_tb;
  localparam int P = 6;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic [P*29-1:0] cam;
  logic [16:0] wa;
  logic [11:0] wd;
  logic        we;

  pixel_unpacker #(.PIXELS(P)) dut (.clk(clk), .rst(rst), .camera_data(cam), .wr_addr(wa), .wr_data(wd), .wr_en(we));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int k;
  bit seen[P];
  initial begin
    for (int i = 0; i < P; i++) cam[29*i +: 29] = 29'($urandom);
    @(negedge clk);
    check(!we, "no writes in reset");
    rst = 0;
    for (int n = 0; n < 3 * P; n++) begin
      @(negedge clk);
      k = n % P;
      check(we && wa == cam[29*k +: 17] && wd == cam[29*k + 17 +: 12], $sformatf("write %0d is record %0d", n, k));
    end
    for (int i = 0; i < P; i++) cam[29*i +: 29] = 29'($urandom);
    foreach (seen[i]) seen[i] = 0;
    repeat (P + 1) begin
      @(negedge clk);
      for (int i = 0; i < P; i++) if (we && wa == cam[29*i +: 17] && wd == cam[29*i + 17 +: 12]) seen[i] = 1;
    end
    foreach (seen[i]) check(seen[i], $sformatf("new record %0d written", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
