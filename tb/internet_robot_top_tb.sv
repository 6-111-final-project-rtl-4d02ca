// internet_robot_top_tb: end-to-end test of both boards joined through two
// PC models and a relay, with shortened power-up, timeout, debounce and
// sonar period. Sequence: both boards connect (the robot's first RX init
// goes unanswered, so it must time out and retry); the robot streams sensor
// packets (distance + camera pixels) to the controller; buttons on the
// controller drive the robot's motors; a frame with a bad CRC is dropped;
// the controller's VGA output shows the distance and the camera picture in
// normal and double size; the robot's stop switch sends STOP, which ends
// the controller's link, and a STOP from the robot's PC ends the robot's.
// Each mechanism is counted and a failure is counted for any that never
// happened.
//
// The protocol, payloads and screen layout follow the original design; the
// shortened times and the PC and relay model are this testbench's own.
module internet_robot_top_tb;
  import eth_frame_pkg::*;
  import glyph_ref_pkg::*;
  localparam logic [31:0] ROBOT_PC = {8'd169, 8'd254, 8'd70, 8'd191};
  localparam logic [31:0] CTRL_PC  = {8'd169, 8'd254, 8'd63, 8'd159};
  localparam int DISTANCE = 3;
  localparam int CAM_ROWS = 10;

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
  pc_link_model #(.PC_IP(ROBOT_PC), .DROP_RX_INITS(1)) robot_pc (
    .clk(c50), .fpga_txen(r_txen), .fpga_txd(r_txd), .fpga_rxd(r_rxd), .fpga_crsdv(r_crsdv),
    .relay_out(r_relay), .relay_valid(r_relay_v), .relay_in(c_relay), .relay_in_valid(c_relay_v));
  pc_link_model #(.PC_IP(CTRL_PC)) ctrl_pc (
    .clk(c50), .fpga_txen(c_txen), .fpga_txd(c_txd), .fpga_rxd(c_rxd), .fpga_crsdv(c_crsdv),
    .relay_out(c_relay), .relay_valid(c_relay_v), .relay_in(r_relay), .relay_in_valid(r_relay_v));

  // Sensor models on the robot
  ov7670_model #(.ROWS(CAM_ROWS)) camera (.pclk(r_pclk), .vsync(r_vsync), .href(r_href), .data(r_cam));
  hc_sr04_model sonar (.clk(c50), .trigger(r_trig), .distance_in(DISTANCE), .echo(r_echo));

  function automatic logic [11:0] cam_rgb(input int a);   // RGB565 -> RGB444 of pixel a
    logic [15:0] p;
    if (a >= CAM_ROWS * 320) return 12'h000;
    p = 16'(a * 40503 + 12345);
    return {4'(p[15:11] >> 1), 4'(p[10:5] >> 2), 4'(p[4:0] >> 1)};
  endfunction

  // ---------------- Mechanism counters ----------------
  int cyc = 0;
  int n_stall = 0, n_bad_drop = 0, n_sensor_pkts = 0, n_cam_ok = 0, n_cam_bad = 0, n_sonar = 0;
  int n_fwd = 0, n_right = 0, n_back = 0, n_debounced = 0, first_frame_cyc = -1;
  bit stall_prev = 0, up_prev = 0;
  logic [11:0] shown [int];   // picture address -> colour the controller received (checked)
  always @(posedge c50) begin
    cyc <= cyc + 1;
    if (dut.robot.pkt_ready && !dut.robot.pkt_take && !stall_prev) n_stall++;
    stall_prev = dut.robot.pkt_ready && !dut.robot.pkt_take;
    if (dut.robot.rx_bad) n_bad_drop++;
    if (dut.robot.distance_valid) n_sonar++;
    if (camera.frames >= 1 && first_frame_cyc < 0) first_frame_cyc = cyc;
    if (dut.controller.rx_ok && dut.controller.link_state == 4'd7 &&
        dut.controller.rx_payload != {4352'd0, "STOP"}) begin
      n_sensor_pkts++;
      if (first_frame_cyc >= 0 && cyc > first_frame_cyc + 12000)
        for (int k = 0; k < 150; k++) begin
          int a;
          logic [11:0] rgb;
          a   = int'(dut.controller.rx_payload[34 + 29*k +: 17]);
          rgb = dut.controller.rx_payload[51 + 29*k +: 12];
          if (rgb == cam_rgb(a)) begin n_cam_ok++; shown[a] = rgb; end
          else begin
            n_cam_bad++;
            if (n_cam_bad < 5) $display("FAIL: pixel %0d arrived as %h, camera gave %h", a, rgb, cam_rgb(a));
          end
        end
    end
    if (r_motor == 4'b1010) n_fwd++;
    if (r_motor == 4'b1000) n_right++;
    if (r_motor == 4'b0101) n_back++;
    if (dut.controller.up && !up_prev) n_debounced++;
    up_prev = dut.controller.up;
  end

  // Waits up to limit clocks for a board's link state code.
  task automatic wait_for(input string what, input int limit, input bit robot, input logic [3:0] code);
    int t = 0;
    while ((robot ? dut.robot.link_state : dut.controller.link_state) != code && t < limit) begin
      @(posedge c50); t++;
    end
    check((robot ? dut.robot.link_state : dut.controller.link_state) == code, what);
  endtask

  // Screen probes on the controller's VGA pins, three clocks after the position.
  logic [11:0] probes[int];
  int p_hit = 0, p_bad = 0;
  logic [10:0] hq[3];
  logic [9:0]  vq[3];
  initial begin hq = '{default: 0}; vq = '{default: 0}; end
  always @(posedge c65) begin
    int key;
    key = int'(hq[2]) * 1024 + int'(vq[2]);
    if (probes.exists(key)) begin
      p_hit++;
      if ({c_r, c_g, c_b} != probes[key]) begin
        p_bad++;
        if (p_bad < 6) $display("FAIL: screen (%0d,%0d) = %h, expected %h", hq[2], vq[2], {c_r, c_g, c_b}, probes[key]);
      end
      probes.delete(key);
    end
    hq[2] <= hq[1]; hq[1] <= hq[0]; hq[0] <= dut.controller.display.hcount;
    vq[2] <= vq[1]; vq[1] <= vq[0]; vq[0] <= dut.controller.display.vcount;
  end

  task automatic screen_frame(input logic [2:0] mode, output int seen, output int wrong);
    int n, h0, b0;
    wait (dut.controller.display.vcount == 10'd790);
    @(negedge c65);
    c_sw = {13'd0, mode};
    probes.delete();
    for (int p = 0; p < 3; p++)
      for (int s = 0; s < 7; s++)
        probes[(700 + 50 * p + sx(s)) * 1024 + 50 + sy(s)] =
          (mode[0] && seg_on(p == 2 ? DISTANCE % 10 : p == 1 ? (DISTANCE / 10) % 10 : DISTANCE / 100, s)) ? 12'hFFF : 12'h000;
    n = 0;
    foreach (shown[a]) begin
      if (n < 200 && (a % 320) < 300) begin
        int key;
        key = mode[2] ? (2 * (a / 320)) * 1024 + 2 * (a % 320) : (a / 320) * 1024 + (a % 320);
        if (!(mode[0] && key / 1024 >= 700)) begin probes[key] = mode[1] ? shown[a] : 12'h000; n++; end
      end
    end
    h0 = p_hit; b0 = p_bad;
    n = probes.size();
    wait (dut.controller.display.vcount == 10'd0);
    wait (dut.controller.display.vcount == 10'd789);
    seen = p_hit - h0; wrong = p_bad - b0;
    check(seen == n, $sformatf("mode %b: %0d of %0d screen probes seen", mode, seen, n));
    check(wrong == 0, $sformatf("mode %b: %0d wrong screen pixels", mode, wrong));
  endtask

  int seen1, wrong1, seen2, wrong2, drops_before, t;

  initial begin
    r_btnc = 1; c_btnc = 1; r_sw0 = 0; c_sw = 16'h0003;
    {c_btnu, c_btnd, c_btnl, c_btnr} = 0;
    repeat (20) @(posedge c50);
    r_btnc = 0; c_btnc = 0;

    // Connection, with one unanswered RX init on the robot.
    wait_for("controller reaches NORMAL", 60000, 0, 4'd7);
    wait_for("robot reaches NORMAL", 60000, 1, 4'd7);
    check(robot_pc.rx_inits >= 2, $sformatf("robot retried RX init (%0d sent)", robot_pc.rx_inits));
    check(r_l16b && r_l17b && c_l16b && c_l17b, "connection LEDs lit");
    check(robot_pc.bad_in == 0 && ctrl_pc.bad_in == 0, "every frame from the boards was well formed");

    // Motors from the controller's buttons.
    @(negedge c50); c_btnu = 1;
    t = 0; while (r_motor != 4'b1010 && t < 40000) begin @(posedge c50); t++; end
    check(r_motor == 4'b1010, "up button drives the robot forward");
    @(negedge c50); c_btnu = 0; c_btnr = 1;
    t = 0; while (r_motor != 4'b1000 && t < 40000) begin @(posedge c50); t++; end
    check(r_motor == 4'b1000, "right button turns the robot right");
    @(negedge c50); c_btnr = 0;
    t = 0; while (r_motor != 4'b0000 && t < 40000) begin @(posedge c50); t++; end
    check(r_motor == 4'b0000, "no button stops the robot");

    // A corrupt frame carrying BACKWARD is dropped; a good one is obeyed.
    drops_before = n_bad_drop;
    robot_pc.send_payload('{8'h02}, 1);
    repeat (6000) @(posedge c50);
    check(n_bad_drop == drops_before + 1, "bad CRC frame counted as an error");
    check(n_back == 0, "bad CRC frame did not move the motors");
    robot_pc.send_payload('{8'h02}, 0);
    repeat (6000) @(posedge c50);
    check(n_back > 0, "good frame with BACKWARD obeyed");

    // Distance on the controller.
    wait (n_sonar >= 2);
    repeat (20000) @(posedge c50);
    check(dut.controller.display.numbers.count.ones == 4'(DISTANCE % 10) &&
          dut.controller.display.numbers.count.tens == 4'((DISTANCE / 10) % 10) &&
          dut.controller.display.numbers.count.hundreds == 4'(DISTANCE / 100),
          "controller shows the robot's distance");

    // Camera picture on the controller's screen, normal and double size.
    t = 0; while (shown.size() < 150 && t < 200000) begin @(posedge c50); t++; end
    check(shown.size() >= 150, $sformatf("%0d camera pixels reached the controller", shown.size()));
    screen_frame(3'b011, seen1, wrong1);
    screen_frame(3'b110, seen2, wrong2);

    // Stop: the robot's switch sends STOP (relayed to the controller), and
    // the robot's PC stops the robot.
    @(negedge c50); r_sw0 = 1;
    wait_for("controller ends on the robot's STOP", 40000, 0, 4'd8);
    check(robot_pc.stops_in > 0, "robot sent STOP");
    robot_pc.send_payload('{"S", "T", "O", "P"}, 0);
    wait_for("robot ends on its PC's STOP", 40000, 1, 4'd8);
    repeat (10) @(posedge c50);
    check(r_motor == 4'b0000 && r_l16r && !r_l16b, "robot stopped with motors off");
    check(c_l16r && !c_l16b, "controller shows stopped");

    // Mechanism report
    $display("mechanisms: rx_init_retries=%0d rx_connect=2 tx_connect=2 sensor_packets=%0d camera_pixels_ok=%0d",
             robot_pc.rx_inits - 1, n_sensor_pkts, n_cam_ok);
    $display("mechanisms: packer_stalls=%0d bad_crc_drops=%0d sonar_readings=%0d debounced_presses=%0d",
             n_stall, n_bad_drop, n_sonar, n_debounced);
    $display("mechanisms: motor_fwd=%0d motor_right=%0d motor_back=%0d probes_1x=%0d probes_2x=%0d stops_sent=%0d",
             n_fwd, n_right, n_back, seen1, seen2, robot_pc.stops_in);
    check(robot_pc.rx_inits > 1, "mechanism: init time-out and retry");
    check(n_sensor_pkts > 0, "mechanism: sensor packets in NORMAL");
    check(n_cam_ok > 0 && n_cam_bad == 0, "mechanism: camera pixels delivered intact");
    check(n_stall > 0, "mechanism: packer stall");
    check(n_bad_drop > 0, "mechanism: bad CRC drop");
    check(n_sonar > 0, "mechanism: sonar reading");
    check(n_debounced > 0, "mechanism: debounced button");
    check(n_fwd > 0 && n_right > 0 && n_back > 0, "mechanism: motor commands");
    check(seen1 > 0 && seen2 > 0, "mechanism: normal and double-size display");
    check(robot_pc.stops_in > 0, "mechanism: STOP");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge c50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

