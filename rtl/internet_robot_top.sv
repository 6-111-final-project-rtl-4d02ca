// internet_robot_top: the complete internet-controlled robot, both boards.
//
// A robot and a controller, each an FPGA board with an Ethernet port, are
// joined through two PCs and an internet relay server: each board sends UDP
// payloads to its PC, which forwards them to the server, which passes them
// to the other PC and on to the other board. One relay path carries command
// payloads from the controller to the robot, the other carries camera and
// distance payloads from the robot to the controller. The PCs and the server
// are software, so this top holds the two board designs side by side and
// brings every pin of both out: robot_* are the pins of robot_top and ctrl_*
// those of controller_top. The parameters shorten the power-up, timeout,
// debounce and sensor times for simulation; their defaults are the real
// values at 50 MHz (100 MHz for the debouncers).
//
// The two boards and the relay path follow the original design; putting both
// boards in one top with prefixed pins is this design's choice, since the
// link between them is software.
module internet_robot_top #(
  parameter int unsigned PHY_RESET_CYCLES     = 5_000_000,
  parameter int unsigned RX_POWER_UP_CYCLES   = 8_000_000,
  parameter int unsigned TX_POWER_UP_CYCLES   = 5_000_400,
  parameter int unsigned TIME_OUT             = 5_000_000,
  parameter int unsigned IFG_BYTES            = 250,
  parameter int unsigned DEBOUNCE_COUNT       = 1_000_000,
  parameter int unsigned SENSOR_PERIOD_US     = 40_000
) (
  input  logic         robot_clk_50mhz,
  input  logic         robot_btnc,
  input  logic         robot_sw0,
  input  logic [1:0]   robot_eth_rxd,
  input  logic         robot_eth_crsdv,
  output logic [1:0]   robot_eth_txd,
  output logic         robot_eth_txen,
  output logic         robot_eth_rstn,
  output logic         robot_eth_strap_oe,
  output logic [1:0]   robot_eth_strap_rxd,
  output logic         robot_eth_strap_crsdv,
  output logic         robot_eth_strap_rxerr,
  output logic         robot_eth_strap_intn,
  input  logic         robot_cam_pclk,
  input  logic         robot_cam_vsync,
  input  logic         robot_cam_href,
  input  logic [7:0]   robot_cam_data,
  output logic         robot_cam_xclk,
  output logic         robot_trigger,
  input  logic         robot_echo,
  output logic [3:0]   robot_motor,
  output logic         robot_led16_b,
  output logic         robot_led16_r,
  output logic         robot_led17_b,
  output logic         robot_led17_r,
  output logic [6:0]   robot_seg,
  output logic [7:0]   robot_an,
  input  logic         ctrl_clk_100mhz,
  input  logic         ctrl_clk_50mhz,
  input  logic         ctrl_clk_65mhz,
  input  logic         ctrl_btnc,
  input  logic         ctrl_btnu,
  input  logic         ctrl_btnd,
  input  logic         ctrl_btnl,
  input  logic         ctrl_btnr,
  input  logic [15:0]  ctrl_sw,
  input  logic [1:0]   ctrl_eth_rxd,
  input  logic         ctrl_eth_crsdv,
  output logic [1:0]   ctrl_eth_txd,
  output logic         ctrl_eth_txen,
  output logic         ctrl_eth_rstn,
  output logic         ctrl_eth_strap_oe,
  output logic [1:0]   ctrl_eth_strap_rxd,
  output logic         ctrl_eth_strap_crsdv,
  output logic         ctrl_eth_strap_rxerr,
  output logic         ctrl_eth_strap_intn,
  output logic [3:0]   ctrl_vga_r,
  output logic [3:0]   ctrl_vga_g,
  output logic [3:0]   ctrl_vga_b,
  output logic         ctrl_vga_hs,
  output logic         ctrl_vga_vs,
  output logic [15:0]  ctrl_led,
  output logic         ctrl_led16_b,
  output logic         ctrl_led16_r,
  output logic         ctrl_led17_b,
  output logic         ctrl_led17_r,
  output logic [6:0]   ctrl_seg,
  output logic [7:0]   ctrl_an
);

  robot_top #(
    .PHY_RESET_CYCLES(PHY_RESET_CYCLES), .RX_POWER_UP_CYCLES(RX_POWER_UP_CYCLES),
    .TX_POWER_UP_CYCLES(TX_POWER_UP_CYCLES), .TIME_OUT(TIME_OUT), .IFG_BYTES(IFG_BYTES),
    .SENSOR_PERIOD_US(SENSOR_PERIOD_US)
  ) robot (
    .clk_50mhz(robot_clk_50mhz),
    .btnc(robot_btnc),
    .sw0(robot_sw0),
    .eth_rxd(robot_eth_rxd),
    .eth_crsdv(robot_eth_crsdv),
    .eth_txd(robot_eth_txd),
    .eth_txen(robot_eth_txen),
    .eth_rstn(robot_eth_rstn),
    .eth_strap_oe(robot_eth_strap_oe),
    .eth_strap_rxd(robot_eth_strap_rxd),
    .eth_strap_crsdv(robot_eth_strap_crsdv),
    .eth_strap_rxerr(robot_eth_strap_rxerr),
    .eth_strap_intn(robot_eth_strap_intn),
    .cam_pclk(robot_cam_pclk),
    .cam_vsync(robot_cam_vsync),
    .cam_href(robot_cam_href),
    .cam_data(robot_cam_data),
    .cam_xclk(robot_cam_xclk),
    .trigger(robot_trigger),
    .echo(robot_echo),
    .motor(robot_motor),
    .led16_b(robot_led16_b),
    .led16_r(robot_led16_r),
    .led17_b(robot_led17_b),
    .led17_r(robot_led17_r),
    .seg(robot_seg),
    .an(robot_an)
  );

  controller_top #(
    .PHY_RESET_CYCLES(PHY_RESET_CYCLES), .RX_POWER_UP_CYCLES(RX_POWER_UP_CYCLES),
    .TX_POWER_UP_CYCLES(TX_POWER_UP_CYCLES), .TIME_OUT(TIME_OUT), .IFG_BYTES(IFG_BYTES),
    .DEBOUNCE_COUNT(DEBOUNCE_COUNT)
  ) controller (
    .clk_100mhz(ctrl_clk_100mhz),
    .clk_50mhz(ctrl_clk_50mhz),
    .clk_65mhz(ctrl_clk_65mhz),
    .btnc(ctrl_btnc),
    .btnu(ctrl_btnu),
    .btnd(ctrl_btnd),
    .btnl(ctrl_btnl),
    .btnr(ctrl_btnr),
    .sw(ctrl_sw),
    .eth_rxd(ctrl_eth_rxd),
    .eth_crsdv(ctrl_eth_crsdv),
    .eth_txd(ctrl_eth_txd),
    .eth_txen(ctrl_eth_txen),
    .eth_rstn(ctrl_eth_rstn),
    .eth_strap_oe(ctrl_eth_strap_oe),
    .eth_strap_rxd(ctrl_eth_strap_rxd),
    .eth_strap_crsdv(ctrl_eth_strap_crsdv),
    .eth_strap_rxerr(ctrl_eth_strap_rxerr),
    .eth_strap_intn(ctrl_eth_strap_intn),
    .vga_r(ctrl_vga_r),
    .vga_g(ctrl_vga_g),
    .vga_b(ctrl_vga_b),
    .vga_hs(ctrl_vga_hs),
    .vga_vs(ctrl_vga_vs),
    .led(ctrl_led),
    .led16_b(ctrl_led16_b),
    .led16_r(ctrl_led16_r),
    .led17_b(ctrl_led17_b),
    .led17_r(ctrl_led17_r),
    .seg(ctrl_seg),
    .an(ctrl_an)
  );
endmodule
