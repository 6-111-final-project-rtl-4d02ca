// robot_top_tb: the robot board alone, with a PC model, a camera model and
// a sonar model; the test plays the remote controller by queueing command
// payloads at the PC. Checks: the PHY reset and strap pins, the connection
// (RX then TX init answered, NORMAL), sensor packets leaving for port 1024
// with the measured distance and camera pixels whose colour matches the
// camera picture at their address, commands turning into motor pin levels,
// a bad-CRC command ignored, and a STOP from the PC ending the link with the
// motors off. Power-up and timeout are shortened.
//
// The protocol, payloads and motor meanings follow the original design; the
// PC model and the shortened times are this testbench's own.
module robot_top_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] PC = {8'd169, 8'd254, 8'd70, 8'd191};
  localparam int DISTANCE = 7;
  localparam int ROWS = 4;

  logic clk = 0;
  always #10 clk = !clk;
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic       btnc, sw0, crsdv, txen, rstn, soe, scrs, serr, sint, pclk, vsync, href, xclk, trig, echo;
  logic [1:0] rxd, txd, srxd;
  logic [7:0] cam, an;
  logic [3:0] motor;
  logic       l16b, l16r, l17b, l17r;
  logic [6:0] seg;

  robot_top #(.PHY_RESET_CYCLES(60), .RX_POWER_UP_CYCLES(100), .TX_POWER_UP_CYCLES(80),
              .TIME_OUT(20000), .IFG_BYTES(250), .SENSOR_PERIOD_US(1500)) dut (
    .clk_50mhz(clk), .btnc(btnc), .sw0(sw0), .eth_rxd(rxd), .eth_crsdv(crsdv), .eth_txd(txd),
    .eth_txen(txen), .eth_rstn(rstn), .eth_strap_oe(soe), .eth_strap_rxd(srxd), .eth_strap_crsdv(scrs),
    .eth_strap_rxerr(serr), .eth_strap_intn(sint), .cam_pclk(pclk), .cam_vsync(vsync), .cam_href(href),
    .cam_data(cam), .cam_xclk(xclk), .trigger(trig), .echo(echo), .motor(motor),
    .led16_b(l16b), .led16_r(l16r), .led17_b(l17b), .led17_r(l17r), .seg(seg), .an(an));

  logic [548*8-1:0] relay;
  logic             relay_v;
  pc_link_model #(.PC_IP(PC)) pc (.clk(clk), .fpga_txen(txen), .fpga_txd(txd), .fpga_rxd(rxd),
    .fpga_crsdv(crsdv), .relay_out(relay), .relay_valid(relay_v), .relay_in('0), .relay_in_valid(1'b0));
  ov7670_model #(.ROWS(ROWS)) camera (.pclk(pclk), .vsync(vsync), .href(href), .data(cam));
  hc_sr04_model sonar (.clk(clk), .trigger(trig), .distance_in(DISTANCE), .echo(echo));

  function automatic logic [11:0] cam_rgb(input int a);
    logic [15:0] p;
    if (a >= ROWS * 320) return 12'h000;
    p = 16'(a * 40503 + 12345);
    return {4'(p[15:11] >> 1), 4'(p[10:5] >> 2), 4'(p[4:0] >> 1)};
  endfunction

  // Check every sensor packet that reaches the PC: pixels once the camera
  // has delivered a frame, the distance once the sonar has measured.
  int pkts = 0, pix_ok = 0, pix_bad = 0, pix_in_pic = 0, dist_pkts = 0, dist_ok = 0, cyc = 0;
  int cam_cyc = -1, sonar_cyc = -1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cam_cyc < 0 && camera.frames >= 1) cam_cyc = cyc;
    if (sonar_cyc < 0 && sonar.pulses >= 2) sonar_cyc = cyc;
    if (relay_v && cam_cyc >= 0 && cyc > cam_cyc + 20000) begin
      pkts++;
      for (int k = 0; k < 150; k++) begin
        int a;
        a = int'(relay[34 + 29*k +: 17]);
        if (a < ROWS * 320) pix_in_pic++;
        if (relay[51 + 29*k +: 12] == cam_rgb(a)) pix_ok++;
        else pix_bad++;
      end
    end
    if (relay_v && sonar_cyc >= 0 && cyc > sonar_cyc + 90000) begin
      dist_pkts++;
      if (relay[33:0] == 34'(DISTANCE)) dist_ok++;
    end
  end

  task automatic command(input logic [2:0] c, input int err, input logic [3:0] want, input string what);
    int t = 0;
    pc.send_payload('{8'(c)}, err);
    while (motor != want && t < 10000) begin @(posedge clk); t++; end
    check(motor == want, what);
  endtask

  int t;
  initial begin
    btnc = 1; sw0 = 0;
    repeat (10) @(posedge clk);
    check(!rstn && soe && srxd == 2'b11 && !scrs, "PHY held in reset with straps driven");
    btnc = 0;
    repeat (70) @(posedge clk);
    check(rstn && soe, "PHY reset released after 60 clocks, straps still driven");
    repeat (400) @(posedge clk);
    check(rstn && !soe && dut.phy_rst_done, "straps released 400 clocks later");
    t = 0; while (dut.link_state != 4'd7 && t < 60000) begin @(posedge clk); t++; end
    check(dut.link_state == 4'd7 && l16b && l17b, "robot connected");
    check(pc.rx_inits == 1 && pc.tx_inits == 1, "one RX and one TX init");
    check(motor == 4'b0000, "motors off after connecting");
    command(3'd1, 0, 4'b1010, "forward");
    command(3'd4, 0, 4'b0010, "left");
    command(3'd2, 0, 4'b0101, "backward");
    command(3'd3, 0, 4'b1000, "right");
    pc.send_payload('{8'd1}, 1);
    repeat (6000) @(posedge clk);
    check(motor == 4'b1000, "bad-CRC command ignored");
    command(3'd0, 0, 4'b0000, "stop command");
    t = 0; while (dist_pkts < 4 && t < 600000) begin @(posedge clk); t++; end
    check(pkts >= 8 && dist_pkts >= 4, $sformatf("%0d sensor packets checked", pkts));
    check(dist_ok == dist_pkts, "distance in every packet");
    check(pix_in_pic >= 300, $sformatf("%0d pixels from inside the camera picture", pix_in_pic));
    check(pix_bad == 0 && pix_ok == pkts * 150, $sformatf("camera pixels: %0d right, %0d wrong", pix_ok, pix_bad));
    check(pc.bad_in == 0, "all frames well formed");
    command(3'd1, 0, 4'b1010, "forward again");
    pc.send_payload('{"S", "T", "O", "P"}, 0);
    t = 0; while (dut.link_state != 4'd8 && t < 10000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    check(dut.link_state == 4'd8 && motor == 4'b0000 && l16r && !l16b, "STOP ends the link, motors off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
