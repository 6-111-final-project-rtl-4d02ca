// ov7670_model: behavioural model of the camera's parallel output (not
// synthesizable). It drives its own pixel clock and sends frames of ROWS
// rows of 320 RGB565 pixels, two bytes per pixel with the high byte first,
// each row framed by href and each frame preceded by a vsync pulse. Pixel
// number i of a frame has the value pixel_value(i), so every frame is the
// same picture. ROWS below 240 gives a short frame for quick tests.
//
// The camera's frame format follows the original design's use of the part;
// the pixel values are this model's own.
module ov7670_model #(
  parameter int ROWS = 240,
  parameter int COLS = 320,
  parameter int HALF_PERIOD = 20   // in the time unit of the test clock (50 MHz = 10)
) (
  output logic       pclk,
  output logic       vsync,
  output logic       href,
  output logic [7:0] data
);
  int frames = 0;

  function automatic logic [15:0] pixel_value(input int i);
    return 16'(i * 40503 + 12345);
  endfunction

  initial pclk = 0;
  always #(HALF_PERIOD) pclk = !pclk;

  logic [15:0] p;
  initial begin
    vsync = 1; href = 0; data = 0;
    forever begin
      vsync = 1;
      repeat (100) @(negedge pclk);
      vsync = 0;
      repeat (20) @(negedge pclk);
      for (int r = 0; r < ROWS; r++) begin
        for (int c = 0; c < COLS; c++) begin
          p = pixel_value(r * COLS + c);
          href = 1; data = p[15:8]; @(negedge pclk);
          data = p[7:0]; @(negedge pclk);
        end
        href = 0; data = 0;
        repeat (40) @(negedge pclk);
      end
      frames++;
    end
  end
endmodule
