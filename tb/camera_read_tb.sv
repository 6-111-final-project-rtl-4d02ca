// camera_read_tb: plays a small camera frame (vsync pulse, rows framed by
// href, two bytes per pixel, high byte first) into the capture block and
// checks each assembled 16-bit pixel in order, the pixel count per row and
// per frame, that nothing is captured while href or vsync say so, and the
// frame_done pulse at the next vsync.
//
// The byte order (high byte first) and the href/vsync framing follow the
// camera's usual protocol as the original design uses it; the frame_done
// pulse is this design's.
module camera_read_tb;
  localparam int W = 7, H = 5;
  logic pclk = 0, rst = 1;
  always #10 pclk = !pclk;
  int checks = 0, failures = 0;

  logic        vsync, href;
  logic [7:0]  data;
  logic [15:0] pixel;
  logic        pv, fd;
  logic [15:0] sent[$];
  int          got = 0, bad = 0, frames = 0;

  camera_read dut (.pclk(pclk), .rst(rst), .vsync(vsync), .href(href), .data(data),
                   .pixel(pixel), .pixel_valid(pv), .frame_done(fd));

  always @(posedge pclk) begin
    if (!rst && pv) begin
      if (sent.size() == 0 || pixel != sent[0]) begin
        bad++;
        $display("FAIL: pixel %0d is %h", got, pixel);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      got++;
    end
    if (!rst && fd) frames++;
  end

  task automatic frame(input int w, input int h);
    logic [15:0] p;
    @(negedge pclk); vsync = 1;
    repeat (5) @(negedge pclk);
    vsync = 0;
    repeat (4) @(negedge pclk);
    for (int r = 0; r < h; r++) begin
      for (int c = 0; c < w; c++) begin
        p = 16'($urandom);
        sent.push_back(p);
        href = 1; data = p[15:8]; @(negedge pclk);
        data = p[7:0]; @(negedge pclk);
      end
      href = 0; data = 8'($urandom);
      repeat (3) @(negedge pclk);
    end
  endtask

  initial begin
    vsync = 1; href = 0; data = 0;
    repeat (3) @(posedge pclk);
    rst = 0;
    frame(W, H);
    @(negedge pclk); vsync = 1;
    repeat (3) @(negedge pclk);
    checks++; if (bad != 0) failures++;
    checks++; if (got != W * H) begin failures++; $display("FAIL: %0d pixels", got); end
    checks++; if (frames != 1) begin failures++; $display("FAIL: %0d frame ends", frames); end
    // Bytes with href low are ignored even inside a frame.
    got = 0;
    frame(3, 2);
    @(negedge pclk); vsync = 1;
    repeat (3) @(negedge pclk);
    checks++; if (got != 6 || bad != 0) begin failures++; $display("FAIL: second frame %0d", got); end
    checks++; if (frames != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
