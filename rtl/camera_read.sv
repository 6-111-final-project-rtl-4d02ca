// camera_read: OV7670 pixel capture (RGB565, two bytes per pixel).
//
// Clocked by the camera's pixel clock. The module waits for VSYNC to go low
// (start of a frame), then while HREF is high it takes one byte per clock,
// the first byte of each pair as bits [15:8] and the second as [7:0]. When
// the second byte is taken, pixel holds the whole pixel and pixel_valid is
// high for one clock. When VSYNC rises again frame_done pulses and the
// module waits for the next frame.
//
// Following the source design: the two states, the byte order, the use of
// VSYNC and HREF. Own choice: the byte-pair phase restarts at each line.
module camera_read (
  input  logic        pclk,
  input  logic        rst,
  input  logic        vsync,
  input  logic        href,
  input  logic [7:0]  data,
  output logic [15:0] pixel,
  output logic        pixel_valid,
  output logic        frame_done
);
  typedef enum logic {S_WAIT_FRAME, S_ROW_CAPTURE} cam_state_e;
  cam_state_e state;
  logic       second;

  always_ff @(posedge pclk) begin
    if (rst) begin
      state       <= S_WAIT_FRAME;
      second      <= 1'b0;
      pixel       <= '0;
      pixel_valid <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      pixel_valid <= 1'b0;
      frame_done  <= 1'b0;
      unique case (state)
        S_WAIT_FRAME: begin
          second <= 1'b0;
          if (!vsync) state <= S_ROW_CAPTURE;
        end
        default: begin
          if (vsync) begin
            state      <= S_WAIT_FRAME;
            frame_done <= 1'b1;
          end else if (href) begin
            second <= !second;
            if (second) begin
              pixel[7:0]  <= data;
              pixel_valid <= 1'b1;
            end else begin
              pixel[15:8] <= data;
            end
          end else begin
            second <= 1'b0;
          end
        end
      endcase
    end
  end
endmodule
