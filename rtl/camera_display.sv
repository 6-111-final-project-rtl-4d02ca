// camera_display: the camera picture on the VGA screen.
//
// Received pixels are written into a 12-bit x 76800-word dual-port RAM on the
// 50 MHz clock (wr_en, wr_addr, wr_data), and read on the 65 MHz pixel clock
// at an address formed from the raster position. The camera is mounted on its
// side, so the picture is turned by 90 degrees: the address is 320*h + v,
// and the picture is IMG_H = 240 pixels wide and IMG_W = 320 high. In double
// mode (double_on) h and v are first halved, so every stored pixel covers a
// 2 x 2 block and the picture is 480 x 640 (nearest-neighbour scaling).
// Outside the picture the output is black.
//
// Timing: pixel belongs to the raster position of two clocks earlier (one
// clock of RAM read, one of output register).
//
// Following the source design: the RAM size and clocks, the rotated address,
// the halving in double mode, black outside the picture. Own choice: the
// picture window is taken as 240 x 320 (480 x 640) so the rotated address
// stays in_pic the RAM.
module camera_display #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240
) (
  input  logic        wclk,
  input  logic        wr_en,
  input  logic [16:0] wr_addr,
  input  logic [11:0] wr_data,
  input  logic        pclk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        double_on,
  output logic [11:0] pixel
);
  localparam int unsigned DEPTH = IMG_W * IMG_H;

  logic [10:0] h;
  logic [9:0]  v;
  logic        in_pic, in_pic_d;
  logic [16:0] raddr;
  logic [11:0] rdata;

  assign h      = double_on ? hcount >> 1 : hcount;
  assign v      = double_on ? vcount >> 1 : vcount;
  assign in_pic = (h < 11'(IMG_H)) && (v < 10'(IMG_W));
  assign raddr  = in_pic ? 17'(int'(h) * IMG_W + int'(v)) : '0;

  dual_port_ram #(.WIDTH(12), .DEPTH(DEPTH)) ram (
    .wclk(wclk), .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .rclk(pclk), .raddr(raddr), .rdata(rdata));

  always_ff @(posedge pclk) begin
    in_pic_d <= in_pic;
    pixel    <= in_pic_d ? rdata : 12'h000;
  end
endmodule
