// picture_transfer_tb: sends one whole 320 x 240 camera picture from the
// robot to the controller's screen memory through both boards, the two PC
// models and the relay. The camera model runs at full size (240 rows of 320
// pixels). Once the robot's frame buffer holds a complete picture, the test
// follows every sensor packet the controller accepts and marks each pixel
// record whose colour matches the camera's pixel at that address; it ends
// when all 76,800 addresses have arrived. It then checks the controller's
// picture memory word for word, that the picture took no more than 512
// packets plus a few (150 records per packet walk the frame buffer in
// order), and that the robot sends one packet every 3410 clocks: 602 bytes
// of frame plus a 250-byte gap, four clocks per byte, plus two clocks in
// which the transmitter returns to idle and takes the next request. Power-up, timeout,
// debounce and sonar times are shortened; the payload, picture and gap sizes
// are the defaults.
//
// The picture size, payload layout and 250-byte gap follow the original
// design; the packet-count bound and the checking method are this test's own.
module picture_transfer_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] ROBOT_PC = {8'd169, 8'd254, 8'd70, 8'd191};
  localparam logic [31:0] CTRL_PC  = {8'd169, 8'd254, 8'd63, 8'd159};
  localparam int DISTANCE = 5;
  localparam int NPIX     = 320 * 240;
  localparam int PKT_CLKS = (8 + 42 + 548 + 4 + 250) * 4 + 2;   // 3410

  logic c50 = 0, c100 = 0, c65 = 0;
  always #10 c50 = !c50;
  always #5 c100 = !c100;
  always #7.7 c65 = !c65;
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Board pins
  logic        r_btnc, r_sw0, r_crsdv, r_txen, r_pclk, r_vsync, r_href, r_xclk, r_trig, r_echo;
  logic [1:0]  r_rxd, r_txd;
  logic [7:0]  r_cam;
  logic [3:0]  r_motor;
  logic        c_btnc, c_btnu, c_btnd, c_btnl, c_btnr, c_crsdv, c_txen, c_hs, c_vs;
  logic [15:0] c_sw, c_led;
  logic [1:0]  c_rxd, c_txd;
  logic [3:0]  c_r, c_g, c_b;
  logic        r_l16b, r_l16r, r_l17b, r_l17r, c_l16b, c_l16r, c_l17b, c_l17r;
  logic [6:0]  r_seg, c_seg;
  logic [7:0]  r_an, c_an;
  logic        r_rstn, r_soe, r_scrs, r_serr, r_sint, c_rstn, c_soe, c_scrs, c_serr, c_sint;
  logic [1:0]  r_srxd, c_srxd;

  internet_robot_top #(.PHY_RESET_CYCLES(100), .RX_POWER_UP_CYCLES(300), .TX_POWER_UP_CYCLES(200),
                       .TIME_OUT(8000), .IFG_BYTES(250), .DEBOUNCE_COUNT(50), .SENSOR_PERIOD_US(1000)) dut (
    .robot_clk_50mhz(c50), .robot_btnc(r_btnc), .robot_sw0(r_sw0),
    .robot_eth_rxd(r_rxd), .robot_eth_crsdv(r_crsdv), .robot_eth_txd(r_txd), .robot_eth_txen(r_txen),
    .robot_eth_rstn(r_rstn), .robot_eth_strap_oe(r_soe), .robot_eth_strap_rxd(r_srxd),
    .robot_eth_strap_crsdv(r_scrs), .robot_eth_strap_rxerr(r_serr), .robot_eth_strap_intn(r_sint),
    .robot_cam_pclk(r_pclk), .robot_cam_vsync(r_vsync), .robot_cam_href(r_href), .robot_cam_data(r_cam),
    .robot_cam_xclk(r_xclk), .robot_trigger(r_trig), .robot_echo(r_echo), .robot_motor(r_motor),
    .robot_led16_b(r_l16b), .robot_led16_r(r_l16r), .robot_led17_b(r_l17b), .robot_led17_r(r_l17r),
    .robot_seg(r_seg), .robot_an(r_an),
    .ctrl_clk_100mhz(c100), .ctrl_clk_50mhz(c50), .ctrl_clk_65mhz(c65), .ctrl_btnc(c_btnc),
    .ctrl_btnu(c_btnu), .ctrl_btnd(c_btnd), .ctrl_btnl(c_btnl), .ctrl_btnr(c_btnr), .ctrl_sw(c_sw),
    .ctrl_eth_rxd(c_rxd), .ctrl_eth_crsdv(c_crsdv), .ctrl_eth_txd(c_txd), .ctrl_eth_txen(c_txen),
    .ctrl_eth_rstn(c_rstn), .ctrl_eth_strap_oe(c_soe), .ctrl_eth_strap_rxd(c_srxd),
    .ctrl_eth_strap_crsdv(c_scrs), .ctrl_eth_strap_rxerr(c_serr), .ctrl_eth_strap_intn(c_sint),
    .ctrl_vga_r(c_r), .ctrl_vga_g(c_g), .ctrl_vga_b(c_b), .ctrl_vga_hs(c_hs), .ctrl_vga_vs(c_vs),
    .ctrl_led(c_led), .ctrl_led16_b(c_l16b), .ctrl_led16_r(c_l16r), .ctrl_led17_b(c_l17b),
    .ctrl_led17_r(c_l17r), .ctrl_seg(c_seg), .ctrl_an(c_an));

  // PCs and relay
  logic [548*8-1:0] r_relay, c_relay;
  logic             r_relay_v, c_relay_v;
  pc_link_model #(.PC_IP(ROBOT_PC), .REPLY_DELAY(300)) robot_pc (
    .clk(c50), .fpga_txen(r_txen), .fpga_txd(r_txd), .fpga_rxd(r_rxd), .fpga_crsdv(r_crsdv),
    .relay_out(r_relay), .relay_valid(r_relay_v), .relay_in(c_relay), .relay_in_valid(c_relay_v));
  pc_link_model #(.PC_IP(CTRL_PC)) ctrl_pc (
    .clk(c50), .fpga_txen(c_txen), .fpga_txd(c_txd), .fpga_rxd(c_rxd), .fpga_crsdv(c_crsdv),
    .relay_out(c_relay), .relay_valid(c_relay_v), .relay_in(r_relay), .relay_in_valid(r_relay_v));

  ov7670_model camera (.pclk(r_pclk), .vsync(r_vsync), .href(r_href), .data(r_cam));
  hc_sr04_model sonar (.clk(c50), .trigger(r_trig), .distance_in(DISTANCE), .echo(r_echo));

  function automatic logic [11:0] cam_rgb(input int a);   // RGB565 -> RGB444 of pixel a
    logic [15:0] p;
    p = 16'(a * 40503 + 12345);
    return {4'(p[15:11] >> 1), 4'(p[10:5] >> 2), 4'(p[4:0] >> 1)};
  endfunction

  // Follow the packets once a whole picture is in the robot's frame buffer.
  bit  seen [NPIX];
  int  n_seen = 0, n_bad = 0, n_pkts = 0, n_gap_ok = 0, n_gap_bad = 0, cyc = 0, last_tx = -1;
  bit  armed = 0, txen_prev = 0;
  always @(posedge c50) begin
    cyc <= cyc + 1;
    if (r_txen && !txen_prev && dut.robot.link_state == 4'd7) begin
      if (last_tx >= 0) begin
        if (cyc - last_tx == PKT_CLKS) n_gap_ok++;
        else begin
          n_gap_bad++;
          if (n_gap_bad < 4) $display("FAIL: robot packets %0d clocks apart", cyc - last_tx);
        end
      end
      last_tx = cyc;
    end
    txen_prev = r_txen;
    // Two camera frames: the buffer then holds a whole picture, and no packet
    // in flight was packed before the first one was complete.
    if (camera.frames >= 2 && !armed) armed = 1;
    if (armed && dut.controller.rx_ok && dut.controller.link_state == 4'd7) begin
      n_pkts++;
      for (int k = 0; k < 150; k++) begin
        int a;
        logic [11:0] rgb;
        a   = int'(dut.controller.rx_payload[34 + 29*k +: 17]);
        rgb = dut.controller.rx_payload[51 + 29*k +: 12];
        if (a < NPIX && rgb == cam_rgb(a)) begin
          if (!seen[a]) begin seen[a] = 1; n_seen++; end
        end else begin
          n_bad++;
          if (n_bad < 4) $display("FAIL: record for %0d holds %h, camera gave %h", a, rgb, cam_rgb(a));
        end
      end
    end
  end

  int mem_bad;
  initial begin
    r_btnc = 1; c_btnc = 1; r_sw0 = 0;
    {c_btnu, c_btnd, c_btnl, c_btnr} = '0;
    c_sw = 16'h0003;
    repeat (20) @(posedge c50);
    r_btnc = 0; c_btnc = 0;

    while (n_seen < NPIX && cyc < 3_000_000) @(posedge c50);
    check(dut.robot.link_state == 4'd7 && dut.controller.link_state == 4'd7, "both links connected");
    check(n_seen == NPIX, $sformatf("whole picture arrived: %0d of %0d pixels", n_seen, NPIX));
    check(n_bad == 0, $sformatf("%0d pixel records with a wrong colour", n_bad));
    check(n_pkts <= NPIX / 150 + 4, $sformatf("picture took %0d packets (512 needed)", n_pkts));
    check(n_gap_ok > 500 && n_gap_bad == 0, $sformatf("packet spacing %0d clocks: %0d right, %0d wrong",
                                                      PKT_CLKS, n_gap_ok, n_gap_bad));
    repeat (200) @(posedge c50);
    mem_bad = 0;
    for (int a = 0; a < NPIX; a++)
      if (dut.controller.display.camera.ram.mem[a] != cam_rgb(a)) mem_bad++;
    check(mem_bad == 0, $sformatf("%0d words of the controller's picture memory differ", mem_bad));
    $display("picture: %0d packets, %0d clocks apart, camera frames %0d", n_pkts, PKT_CLKS, camera.frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_200_000) @(posedge c50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
