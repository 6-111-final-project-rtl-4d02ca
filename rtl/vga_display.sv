// vga_display: the controller's screen.
//
// The received sensor payload feeds two pictures: the distance reading as
// three large digits (number_display) and the camera image (camera_display),
// whose memory is filled from the payload's pixel records by pixel_unpacker
// on the 50 MHz clock. The xvga timing generator runs on the 65 MHz pixel
// clock. sw[1:0] selects what is shown: 00 nothing, 01 digits only, 10
// camera only, 11 both (OR of the two); sw[2] doubles the camera picture.
//
// Timing: both pictures are two clocks behind the raster counters; the sync
// and blank signals are delayed by the same two clocks and all outputs pass
// one more register, so the VGA pins are three clocks behind hcount/vcount.
// RGB is forced to zero while blank. Syncs are active low.
//
// Following the source design: the blocks and their connection, the mode
// switches, OR combination, blanking. Own choice: the sync delay line.
module vga_display #(
  parameter int unsigned PIXELS = 150
) (
  input  logic                  clk_50mhz,
  input  logic                  clk_65mhz,
  input  logic                  rst,
  input  logic [2:0]            sw,
  input  logic [9:0]            sensor_value,
  input  logic [PIXELS*29-1:0]  camera_data,
  output logic [3:0]            vga_r,
  output logic [3:0]            vga_g,
  output logic [3:0]            vga_b,
  output logic                  vga_hs,
  output logic                  vga_vs
);
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        hsync, vsync, blank;
  logic [2:0]  hs_d, vs_d, bl_d;     // delay line: [1] lines up with the pictures
  logic [11:0] number_pixel, camera_pixel, rgb;
  logic [16:0] wr_addr;
  logic [11:0] wr_data;
  logic        wr_en;

  xvga timing (.clk(clk_65mhz), .rst(rst), .hcount(hcount), .vcount(vcount),
               .hsync(hsync), .vsync(vsync), .blank(blank));

  number_display numbers (.clk(clk_65mhz), .rst(rst), .value(sensor_value),
                          .hcount(hcount), .vcount(vcount), .pixel(number_pixel));

  pixel_unpacker #(.PIXELS(PIXELS)) unpack (.clk(clk_50mhz), .rst(rst), .camera_data(camera_data),
                                            .wr_addr(wr_addr), .wr_data(wr_data), .wr_en(wr_en));

  camera_display camera (.wclk(clk_50mhz), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
                         .pclk(clk_65mhz), .hcount(hcount), .vcount(vcount), .double_on(sw[2]),
                         .pixel(camera_pixel));

  always_ff @(posedge clk_65mhz) begin
    if (rst) begin
      hs_d <= '1;
      vs_d <= '1;
      bl_d <= '1;
      rgb  <= '0;
    end else begin
      hs_d <= {hs_d[1:0], hsync};
      vs_d <= {vs_d[1:0], vsync};
      bl_d <= {bl_d[1:0], blank};
      unique case (sw[1:0])
        2'b01:   rgb <= number_pixel;
        2'b10:   rgb <= camera_pixel;
        2'b11:   rgb <= number_pixel | camera_pixel;
        default: rgb <= 12'h000;
      endcase
    end
  end

  assign vga_r  = bl_d[2] ? 4'h0 : rgb[11:8];
  assign vga_g  = bl_d[2] ? 4'h0 : rgb[7:4];
  assign vga_b  = bl_d[2] ? 4'h0 : rgb[3:0];
  assign vga_hs = hs_d[2];
  assign vga_vs = vs_d[2];
endmodule
