// controller_top: the controller's FPGA.
//
// The operator drives the robot with the board's d-pad and watches its
// camera picture and distance reading on a VGA monitor.
//  * Buttons: btnu/btnd/btnr/btnl are debounced at 100 MHz and turned into
//    the command FORWARD/BACKWARD/RIGHT/LEFT (STOP when none is held) by
//    button_command at 50 MHz. The command is the low 3 bits of a 548-byte
//    payload that link_fsm sends to the PC whenever the transmitter is free.
//  * Display: udp_rx keeps the robot's last good sensor payload; its bits
//    [9:0] are the distance and the bits above bit 33 the 150 pixel records.
//    vga_display draws both at 1024 x 768 on the 65 MHz clock; sw[1:0] picks
//    digits, camera or both, sw[2] doubles the camera picture.
//  * Link: as on the robot, link_fsm first announces the receive and the
//    transmit path to the PC. A received "STOP" ends the session.
// phy_init resets the Ethernet PHY at power-up. btnc resets the design.
// LEDs: led mirrors the switches; 16/17 blue = paths connected, red = stopped.
// The seven-segment display shows the connection state code.
//
// Clocks: clk_100mhz, clk_50mhz and clk_65mhz come from the board clock
// through a clocking block outside this module; 50 MHz is also the PHY's
// reference clock.
//
// Following the source design: blocks, connections, addresses and ports.
// Own choice: the command is resynchronised into the 50 MHz domain.
module controller_top
  import eth_pkg::*;
#(
  parameter int unsigned PHY_RESET_CYCLES   = 5_000_000,
  parameter int unsigned RX_POWER_UP_CYCLES = 8_000_000,
  parameter int unsigned TX_POWER_UP_CYCLES = 5_000_400,
  parameter int unsigned TIME_OUT           = 5_000_000,
  parameter int unsigned IFG_BYTES          = 250,
  parameter int unsigned DEBOUNCE_COUNT     = 1_000_000
) (
  input  logic        clk_100mhz,
  input  logic        clk_50mhz,
  input  logic        clk_65mhz,
  input  logic        btnc,
  input  logic        btnu,
  input  logic        btnd,
  input  logic        btnl,
  input  logic        btnr,
  input  logic [15:0] sw,
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
  // VGA
  output logic [3:0]  vga_r,
  output logic [3:0]  vga_g,
  output logic [3:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  // Board indicators
  output logic [15:0] led,
  output logic        led16_b,
  output logic        led16_r,
  output logic        led17_b,
  output logic        led17_r,
  output logic [6:0]  seg,
  output logic [7:0]  an
);
  localparam int unsigned PB = 548;
  localparam logic [31:0] FPGA_IP = {8'd169, 8'd254, 8'd255, 8'd255};
  localparam logic [31:0] PC_IP   = {8'd169, 8'd254, 8'd63,  8'd159};

  logic rst;
  assign rst = btnc;

  // ---------------- Buttons ----------------
  logic up, down, left, right;
  logic [2:0] command;
  debounce #(.COUNT(DEBOUNCE_COUNT)) deb_u (.clk(clk_100mhz), .rst(rst), .noisy(btnu), .clean(up));
  debounce #(.COUNT(DEBOUNCE_COUNT)) deb_d (.clk(clk_100mhz), .rst(rst), .noisy(btnd), .clean(down));
  debounce #(.COUNT(DEBOUNCE_COUNT)) deb_l (.clk(clk_100mhz), .rst(rst), .noisy(btnl), .clean(left));
  debounce #(.COUNT(DEBOUNCE_COUNT)) deb_r (.clk(clk_100mhz), .rst(rst), .noisy(btnr), .clean(right));
  button_command control (.clk(clk_50mhz), .rst(rst), .up(up), .down(down), .right(right), .left(left),
                          .command(command));

  // ---------------- Ethernet ----------------
  logic              phy_rst_done;
  logic [PB*8-1:0]   rx_payload, tx_payload, cmd_payload;
  logic              rx_ok, rx_bad;
  logic              tx_busy, tx_valid, cmd_take;
  logic [15:0]       send_port;
  logic [3:0]        link_state;
  logic              rx_connected, tx_connected, stopped;

  assign cmd_payload = {{(PB*8-3){1'b0}}, command};

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
    .normal_payload(cmd_payload), .normal_ready(1'b1), .send_stop(1'b0), .normal_take(cmd_take),
    .tx_payload(tx_payload), .tx_valid(tx_valid), .send_port(send_port), .state(link_state),
    .rx_connected(rx_connected), .tx_connected(tx_connected), .stopped(stopped));

  // ---------------- Display ----------------
  vga_display #(.PIXELS(PIXELS_PER_PKT)) display (
    .clk_50mhz(clk_50mhz), .clk_65mhz(clk_65mhz), .rst(rst), .sw(sw[2:0]),
    .sensor_value(rx_payload[9:0]), .camera_data(rx_payload[PB*8-1:SENSOR_BITS]),
    .vga_r(vga_r), .vga_g(vga_g), .vga_b(vga_b), .vga_hs(vga_hs), .vga_vs(vga_vs));

  // ---------------- Indicators ----------------
  assign led     = sw;
  assign led16_b = rx_connected;
  assign led17_b = tx_connected;
  assign led16_r = stopped;
  assign led17_r = stopped;

  display_8hex hex (.clk(clk_50mhz), .rst(rst), .data({28'd0, link_state}), .seg(seg), .strobe(an));
endmodule
