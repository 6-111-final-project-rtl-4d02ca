// controller_top_tb: the controller board alone, with a PC model; the test
// plays the robot by queueing sensor payloads (distance and pixel records)
// at the PC. Checks: the connection, that button presses (through the
// debouncers) become the command code in the low bits of the payloads sent
// to port 1024, the up > down > right > left priority, that the received
// distance reaches the display's digit counter, that received pixel records
// are written into the picture memory, the state code on the LEDs' hex
// display input, and that a STOP ends the link.
//
// The protocol and payload layout follow the original design; the PC model
// and the shortened power-up, timeout and debounce times are this
// testbench's own.
module controller_top_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] PC = {8'd169, 8'd254, 8'd63, 8'd159};

  logic c50 = 0, c100 = 0, c65 = 0;
  always #10 c50 = !c50;
  always #5 c100 = !c100;
  always #7.7 c65 = !c65;
  int checks = 0, failures = 0;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        btnc, btnu, btnd, btnl, btnr, crsdv, txen, rstn, soe, scrs, serr, sint, hs, vs;
  logic [15:0] sw, led;
  logic [1:0]  rxd, txd, srxd;
  logic [3:0]  r, g, b;
  logic        l16b, l16r, l17b, l17r;
  logic [6:0]  seg;
  logic [7:0]  an;

  controller_top #(.PHY_RESET_CYCLES(60), .RX_POWER_UP_CYCLES(100), .TX_POWER_UP_CYCLES(80),
                   .TIME_OUT(20000), .IFG_BYTES(250), .DEBOUNCE_COUNT(100)) dut (
    .clk_100mhz(c100), .clk_50mhz(c50), .clk_65mhz(c65), .btnc(btnc), .btnu(btnu), .btnd(btnd),
    .btnl(btnl), .btnr(btnr), .sw(sw), .eth_rxd(rxd), .eth_crsdv(crsdv), .eth_txd(txd), .eth_txen(txen),
    .eth_rstn(rstn), .eth_strap_oe(soe), .eth_strap_rxd(srxd), .eth_strap_crsdv(scrs),
    .eth_strap_rxerr(serr), .eth_strap_intn(sint), .vga_r(r), .vga_g(g), .vga_b(b), .vga_hs(hs),
    .vga_vs(vs), .led(led), .led16_b(l16b), .led16_r(l16r), .led17_b(l17b), .led17_r(l17r),
    .seg(seg), .an(an));

  logic [548*8-1:0] relay;
  logic             relay_v;
  pc_link_model #(.PC_IP(PC)) pc (.clk(c50), .fpga_txen(txen), .fpga_txd(txd), .fpga_rxd(rxd),
    .fpga_crsdv(crsdv), .relay_out(relay), .relay_valid(relay_v), .relay_in('0), .relay_in_valid(1'b0));

  task automatic press(input logic [3:0] udlr, input logic [2:0] want, input string what);
    int t = 0, n0;
    @(negedge c50); {btnu, btnd, btnl, btnr} = udlr;
    repeat (400) @(posedge c50);
    n0 = pc.data_in;
    while (pc.data_in < n0 + 2 && t < 20000) begin @(posedge c50); t++; end
    check(pc.last_data[2:0] == want && pc.last_data[548*8-1:3] == '0, what);
  endtask

  int t;
  bytes_t p;
  logic [11:0] rec_rgb[150];
  int          rec_addr[150];
  logic [548*8-1:0] v;
  initial begin
    btnc = 1; {btnu, btnd, btnl, btnr} = 0; sw = 16'h0001;
    repeat (10) @(posedge c50);
    btnc = 0;
    t = 0; while (dut.link_state != 4'd7 && t < 60000) begin @(posedge c50); t++; end
    check(dut.link_state == 4'd7 && l16b && l17b, "controller connected");
    check(led == sw, "switch LEDs");
    press(4'b0000, 3'd0, "no button sends STOP code");
    press(4'b1000, 3'd1, "up sends FORWARD");
    press(4'b0100, 3'd2, "down sends BACKWARD");
    press(4'b0001, 3'd3, "right sends RIGHT");
    press(4'b0010, 3'd4, "left sends LEFT");
    press(4'b1111, 3'd1, "up has priority");
    press(4'b0111, 3'd2, "down before right and left");
    press(4'b0000, 3'd0, "release sends STOP code");
    // A sensor payload from the robot.
    v = '0;
    v[33:0] = 34'd512;
    for (int k = 0; k < 150; k++) begin
      rec_addr[k] = $urandom_range(0, 76799);
      rec_rgb[k]  = 12'($urandom);
      v[34 + 29*k +: 29] = {rec_rgb[k], 17'(rec_addr[k])};
    end
    p = {};
    for (int i = 547; i >= 0; i--) p.push_back(v[i*8 +: 8]);
    pc.send_payload(p, 0);
    repeat (8000) @(posedge c50);
    check({dut.display.numbers.count.hundreds, dut.display.numbers.count.tens, dut.display.numbers.count.ones} == 12'h512,
          "distance reaches the digit counter");
    t = 0;
    for (int k = 0; k < 150; k++) if (dut.display.camera.ram.mem[rec_addr[k]] == rec_rgb[k]) t++;
    check(t == 150, $sformatf("%0d of 150 pixel records in the picture memory", t));
    pc.send_payload('{"S", "T", "O", "P"}, 0);
    t = 0; while (dut.link_state != 4'd8 && t < 10000) begin @(posedge c50); t++; end
    check(dut.link_state == 4'd8 && l16r && !l16b && !l17b, "STOP ends the link");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge c50);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
