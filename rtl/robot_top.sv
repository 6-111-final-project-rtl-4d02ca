// robot_top: the robot's FPGA.
//
// The robot receives 3-bit drive commands over Ethernet and streams its
// camera picture and distance readings back. Data paths:
//  * Commands: udp_rx checks each UDP frame from the PC and keeps the last
//    good payload; in NORMAL its low three bits drive motor_control, which
//    sets the four L9110 driver inputs.
//  * Camera: camera_read, on the camera's own pixel clock, assembles RGB565
//    pixels, which are cut to RGB444 (top 4 bits of each colour) and written
//    in order into a 320 x 240 frame buffer, the address restarting at each
//    frame. pixel_packer reads the buffer at 50 MHz and fills a 548-byte
//    payload with the distance and 150 {address, colour} records.
//  * Distance: distance_sensor measures the HC-SR04 echo every 40 ms, in
//    inches.
//  * Link: link_fsm announces both paths to the PC, waits for the answers,
//    then hands each full payload to udp_tx (250-byte gap between frames).
//    Switch 0 sends "STOP" instead, which ends the session at both ends; a
//    received "STOP" ends it here.
// phy_init holds the Ethernet PHY in reset for 100 ms at power-up; the
// receiver and transmitter wait a further power-up time after that. btnc is
// the reset of the whole design. LEDs: 16/17 blue = receive/transmit path
// connected, both red = stopped. The seven-segment display shows the last
// received command. cam_xclk is the 25 MHz camera clock.
//
// Following the source design: all blocks, their connection, addresses and
// ports. Own choices: pixel_packer stops while its payload waits, the reset
// is synchronised into the camera clock domain, PHY straps use an enable.
module robot_top
  import eth_pkg::*;
#(
  parameter int unsigned PHY_RESET_CYCLES   = 5_000_000,
  parameter int unsigned RX_POWER_UP_CYCLES = 8_000_000,
  parameter int unsigned TX_POWER_UP_CYCLES = 5_000_400,
  parameter int unsigned TIME_OUT           = 5_000_000,
  parameter int unsigned IFG_BYTES          = 250,
  parameter int unsigned SENSOR_PERIOD_US   = 40_000
) (
  input  logic        clk_50mhz,
  input  logic        btnc,
  input  logic        sw0,
  // Ethernet PHY (RMII)
  input  logic [1:0]  eth_rxd,
  input  logic        eth_crsdv,
  output logic [1:0]  eth_txd,
  output logic        eth_txen,
  output logic        eth_rstn,
  output logic        eth_strap_oe,
  output logic [1:0]  eth_strap_rxd,
  output logic        eth_strap_crsdv,
  output logic        eth_strap_rxerr,
  output logic        eth_strap_intn,
  // OV7670 camera
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        cam_xclk,
  // HC-SR04
  output logic        trigger,
  input  logic        echo,
  // L9110 {AIA, AIB, BIA, BIB}
  output logic [3:0]  motor,
  // Board indicators
  output logic        led16_b,
  output logic        led16_r,
  output logic        led17_b,
  output logic        led17_r,
  output logic [6:0]  seg,
  output logic [7:0]  an
);
  localparam int unsigned PB = 548;
  localparam logic [31:0] FPGA_IP = {8'd169, 8'd254, 8'd255, 8'd255};
  localparam logic [31:0] PC_IP   = {8'd169, 8'd254, 8'd70,  8'd191};

  logic rst;
  assign rst = btnc;

  // ---------------- Ethernet ----------------
  logic              phy_rst_done;
  logic [PB*8-1:0]   rx_payload, tx_payload, pkt_payload;
  logic              rx_ok, rx_bad;
  logic              tx_busy, tx_valid;
  logic [15:0]       send_port;
  logic [3:0]        link_state;
  logic              rx_connected, tx_connected, stopped;
  logic              pkt_ready, pkt_take;

  phy_init #(.RESET_CYCLES(PHY_RESET_CYCLES)) phy (
    .clk(clk_50mhz), .rst(rst), .eth_rstn(eth_rstn), .strap_oe(eth_strap_oe),
    .strap_crsdv(eth_strap_crsdv), .strap_rxd(eth_strap_rxd), .strap_rxerr(eth_strap_rxerr),
    .strap_intn(eth_strap_intn), .phy_rst_done(phy_rst_done));

  udp_rx #(.PAYLOAD_BYTES(PB), .POWER_UP_CYCLES(RX_POWER_UP_CYCLES),
           .FPGA_IP(FPGA_IP), .FPGA_PORT(16'd5001), .PC_IP(PC_IP)) rx (
    .clk(clk_50mhz), .rst(rst), .phy_rst_done(phy_rst_done), .rxd(eth_rxd), .rx_valid(eth_crsdv),
    .payload_out(rx_payload), .pkt_valid(rx_ok), .pkt_error(rx_bad));

  udp_tx #(.PAYLOAD_BYTES(PB), .IFG_BYTES(IFG_BYTES), .POWER_UP_CYCLES(TX_POWER_UP_CYCLES),
           .FPGA_IP(FPGA_IP), .FPGA_PORT(16'd5001), .PC_IP(PC_IP)) tx (
    .clk(clk_50mhz), .rst(rst), .phy_rst_done(phy_rst_done), .payload(tx_payload),
    .input_valid(tx_valid), .send_port(send_port), .tx_busy(tx_busy), .txen(eth_txen), .txd(eth_txd));

  link_fsm #(.PAYLOAD_BYTES(PB), .TIME_OUT(TIME_OUT)) link (
    .clk(clk_50mhz), .rst(rst), .tx_busy(tx_busy), .rx_payload(rx_payload),
    .normal_payload(pkt_payload), .normal_ready(pkt_ready), .send_stop(sw0), .normal_take(pkt_take),
    .tx_payload(tx_payload), .tx_valid(tx_valid), .send_port(send_port), .state(link_state),
    .rx_connected(rx_connected), .tx_connected(tx_connected), .stopped(stopped));

  // ---------------- Motors ----------------
  logic [2:0] motor_cmd;
  always_ff @(posedge clk_50mhz) begin
    if (rst)                                       motor_cmd <= CMD_STOP;
    else if (link_state == 4'd7 && rx_ok)          motor_cmd <= rx_payload[2:0];
    else if (link_state != 4'd7)                   motor_cmd <= CMD_STOP;
  end
  motor_control motors (.command(motor_cmd), .motor(motor));

  // ---------------- Distance sensor ----------------
  logic [9:0] distance;
  logic       distance_valid;
  distance_sensor #(.CLK_HZ(50_000_000), .INCHES(1'b1), .PERIOD_US(SENSOR_PERIOD_US)) sonar (
    .clk(clk_50mhz), .rst(rst), .echo(echo), .trigger(trigger),
    .distance(distance), .distance_valid(distance_valid));

  // ---------------- Camera ----------------
  logic [1:0]  cam_rst_sync;
  logic        cam_rst;
  logic [15:0] cam_pixel;
  logic        cam_valid, cam_frame_done;
  logic [16:0] wr_addr;
  logic [16:0] fb_addr;
  logic [11:0] fb_data;

  always_ff @(posedge cam_pclk) cam_rst_sync <= {cam_rst_sync[0], rst};
  assign cam_rst = cam_rst_sync[1];

  camera_read cam (.pclk(cam_pclk), .rst(cam_rst), .vsync(cam_vsync), .href(cam_href), .data(cam_data),
                   .pixel(cam_pixel), .pixel_valid(cam_valid), .frame_done(cam_frame_done));

  always_ff @(posedge cam_pclk) begin
    if (cam_rst || cam_frame_done)                         wr_addr <= '0;
    else if (cam_valid && wr_addr != 17'(FRAME_PIXELS))    wr_addr <= wr_addr + 1'b1;
  end

  dual_port_ram #(.WIDTH(12), .DEPTH(FRAME_PIXELS)) frame_buffer (
    .wclk(cam_pclk), .we(cam_valid), .waddr(wr_addr),
    .wdata({cam_pixel[15:12], cam_pixel[10:7], cam_pixel[4:1]}),
    .rclk(clk_50mhz), .raddr(fb_addr), .rdata(fb_data));

  pixel_packer #(.PAYLOAD_BYTES(PB), .PIXELS(PIXELS_PER_PKT), .FRAME_PIXELS(FRAME_PIXELS)) packer (
    .clk(clk_50mhz), .rst(rst), .enable(link_state == 4'd7), .distance(distance),
    .fb_addr(fb_addr), .fb_data(fb_data), .payload(pkt_payload), .ready(pkt_ready), .take(pkt_take));

  always_ff @(posedge clk_50mhz) begin
    if (rst) cam_xclk <= 1'b0;
    else     cam_xclk <= !cam_xclk;
  end

  // ---------------- Indicators ----------------
  assign led16_b = rx_connected;
  assign led17_b = tx_connected;
  assign led16_r = stopped;
  assign led17_r = stopped;

  display_8hex hex (.clk(clk_50mhz), .rst(rst), .data({28'd0, rx_payload[3:0]}), .seg(seg), .strobe(an));
endmodule
