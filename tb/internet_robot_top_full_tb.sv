// internet_robot_top_full_tb: one complete operation of both boards at the
// real parameter values (5,000,400-clock PHY start-up, 8,000,000-clock
// receiver power-up, 5,000,000-clock timeout, 250-byte gap, 1,000,000-clock
// debounce, 40 ms sonar period). Both boards connect through PC models and
// a relay, a button press on the controller moves the robot forward, a
// sensor packet carries the robot's distance to the controller's display,
// and a STOP from the robot's PC ends the robot's link. About 16 million
// clocks of the 50 MHz board clock.
//
// All parameters are the original design's own values; the PC and relay
// model is this testbench's own.
module internet_robot_top_full_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] ROBOT_PC = {8'd169, 8'd254, 8'd70, 8'd191};
  localparam logic [31:0] CTRL_PC  = {8'd169, 8'd254, 8'd63, 8'd159};
  localparam int DISTANCE = 42;

  logic c50 = 0, c100 = 0, c65 = 0;
  always #10 c50 = !c50;
  always #5 c100 = !c100;
  always #7.7 c65 = !c65;
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        r_btnc, r_sw0, r_crsdv, r_txen, r_pclk, r_vsync, r_href, r_xclk, r_trig, r_echo;
  logic [1:0]  r_rxd, r_txd, r_srxd, c_rxd, c_txd, c_srxd;
  logic [7:0]  r_cam, r_an, c_an;
  logic [3:0]  r_motor, c_r, c_g, c_b;
  logic        c_btnc, c_btnu, c_crsdv, c_txen, c_hs, c_vs;
  logic [15:0] c_sw, c_led;
  logic        r_l16b, r_l16r, r_l17b, r_l17r, c_l16b, c_l16r, c_l17b, c_l17r;
  logic [6:0]  r_seg, c_seg;
  logic        r_rstn, r_soe, r_scrs, r_serr, r_sint, c_rstn, c_soe, c_scrs, c_serr, c_sint;

  internet_robot_top dut (
    .robot_clk_50mhz(c50), .robot_btnc(r_btnc), .robot_sw0(r_sw0),
    .robot_eth_rxd(r_rxd), .robot_eth_crsdv(r_crsdv), .robot_eth_txd(r_txd), .robot_eth_txen(r_txen),
    .robot_eth_rstn(r_rstn), .robot_eth_strap_oe(r_soe), .robot_eth_strap_rxd(r_srxd),
    .robot_eth_strap_crsdv(r_scrs), .robot_eth_strap_rxerr(r_serr), .robot_eth_strap_intn(r_sint),
    .robot_cam_pclk(r_pclk), .robot_cam_vsync(r_vsync), .robot_cam_href(r_href), .robot_cam_data(r_cam),
    .robot_cam_xclk(r_xclk), .robot_trigger(r_trig), .robot_echo(r_echo), .robot_motor(r_motor),
    .robot_led16_b(r_l16b), .robot_led16_r(r_l16r), .robot_led17_b(r_l17b), .robot_led17_r(r_l17r),
    .robot_seg(r_seg), .robot_an(r_an),
    .ctrl_clk_100mhz(c100), .ctrl_clk_50mhz(c50), .ctrl_clk_65mhz(c65), .ctrl_btnc(c_btnc),
    .ctrl_btnu(c_btnu), .ctrl_btnd(1'b0), .ctrl_btnl(1'b0), .ctrl_btnr(1'b0), .ctrl_sw(c_sw),
    .ctrl_eth_rxd(c_rxd), .ctrl_eth_crsdv(c_crsdv), .ctrl_eth_txd(c_txd), .ctrl_eth_txen(c_txen),
    .ctrl_eth_rstn(c_rstn), .ctrl_eth_strap_oe(c_soe), .ctrl_eth_strap_rxd(c_srxd),
    .ctrl_eth_strap_crsdv(c_scrs), .ctrl_eth_strap_rxerr(c_serr), .ctrl_eth_strap_intn(c_sint),
    .ctrl_vga_r(c_r), .ctrl_vga_g(c_g), .ctrl_vga_b(c_b), .ctrl_vga_hs(c_hs), .ctrl_vga_vs(c_vs),
    .ctrl_led(c_led), .ctrl_led16_b(c_l16b), .ctrl_led16_r(c_l16r), .ctrl_led17_b(c_l17b),
    .ctrl_led17_r(c_l17r), .ctrl_seg(c_seg), .ctrl_an(c_an));

  logic [548*8-1:0] r_relay, c_relay;
  logic             r_relay_v, c_relay_v;
  pc_link_model #(.PC_IP(ROBOT_PC)) robot_pc (
    .clk(c50), .fpga_txen(r_txen), .fpga_txd(r_txd), .fpga_rxd(r_rxd), .fpga_crsdv(r_crsdv),
    .relay_out(r_relay), .relay_valid(r_relay_v), .relay_in(c_relay), .relay_in_valid(c_relay_v));
  pc_link_model #(.PC_IP(CTRL_PC)) ctrl_pc (
    .clk(c50), .fpga_txen(c_txen), .fpga_txd(c_txd), .fpga_rxd(c_rxd), .fpga_crsdv(c_crsdv),
    .relay_out(c_relay), .relay_valid(c_relay_v), .relay_in(r_relay), .relay_in_valid(r_relay_v));
  ov7670_model #(.ROWS(8)) camera (.pclk(r_pclk), .vsync(r_vsync), .href(r_href), .data(r_cam));
  hc_sr04_model sonar (.clk(c50), .trigger(r_trig), .distance_in(DISTANCE), .echo(r_echo));

  int cyc = 0, first_txen = -1;
  always @(posedge c50) begin
    cyc <= cyc + 1;
    if (r_txen && first_txen < 0) first_txen = cyc;
  end

  int t;
  initial begin
    r_btnc = 1; c_btnc = 1; r_sw0 = 0; c_sw = 16'h0001; c_btnu = 0;
    repeat (20) @(posedge c50);
    r_btnc = 0; c_btnc = 0;
    t = 0; while (!(dut.robot.link_state == 4'd7 && dut.controller.link_state == 4'd7) && t < 16_000_000) begin
      @(posedge c50); t++;
    end
    check(dut.robot.link_state == 4'd7 && dut.controller.link_state == 4'd7, "both boards connected");
    check(first_txen >= 5_000_400 + 5_000_400, $sformatf("first frame after the power-up wait (clock %0d)", first_txen));
    check(robot_pc.bad_in == 0 && ctrl_pc.bad_in == 0, "all frames well formed");
    @(negedge c50); c_btnu = 1;
    t = 0; while (r_motor != 4'b1010 && t < 2_000_000) begin @(posedge c50); t++; end
    check(r_motor == 4'b1010, "button on the controller drives the robot forward");
    t = 0; while (dut.controller.display.numbers.count.tens != 4'(DISTANCE / 10) && t < 4_000_000) begin
      @(posedge c50); t++;
    end
    check(dut.controller.display.numbers.count.tens == 4'(DISTANCE / 10) &&
          dut.controller.display.numbers.count.ones == 4'(DISTANCE % 10), "distance shown on the controller");
    robot_pc.send_payload('{"S", "T", "O", "P"}, 0);
    t = 0; while (dut.robot.link_state != 4'd8 && t < 20000) begin @(posedge c50); t++; end
    repeat (5) @(posedge c50);
    check(dut.robot.link_state == 4'd8 && r_motor == 4'b0000, "STOP ends the robot's link");
    $display("full size: connected, command and distance delivered by clock %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (24_000_000) @(posedge c50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
