// udp_tx_tb: checks the UDP transmitter against the reference frame model.
// Two instances: a 30-byte payload and the full 548-byte payload. Frames are
// captured from TX_EN/TXD (least significant di-bit first), compared byte for
// byte with eth_frame_pkg::build, and the frame length, the gap between
// frames and tx_busy are checked.
//
// The frame layout, byte order and 250-byte gap follow the original design;
// the tx_busy timing is this design's.
module udp_tx_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] FIP = {8'd169, 8'd254, 8'd255, 8'd255};
  localparam logic [31:0] PIP = {8'd169, 8'd254, 8'd70, 8'd191};
  localparam int IFG = 12;

  logic clk = 0, rst = 1, phy_done = 0;
  always #10 clk = !clk;
  int checks = 0, failures = 0;

  // Small instance
  logic [30*8-1:0]  pay_s;
  logic             v_s, busy_s, txen_s;
  logic [1:0]       txd_s;
  logic [15:0]      port_s;
  udp_tx #(.PAYLOAD_BYTES(30), .IFG_BYTES(IFG), .POWER_UP_CYCLES(5), .FPGA_IP(FIP), .FPGA_PORT(16'd5001),
           .PC_IP(PIP)) dut_s (.clk(clk), .rst(rst), .phy_rst_done(phy_done), .payload(pay_s), .input_valid(v_s),
           .send_port(port_s), .tx_busy(busy_s), .txen(txen_s), .txd(txd_s));
  // Full-size instance
  logic [548*8-1:0] pay_l;
  logic             v_l, busy_l, txen_l;
  logic [1:0]       txd_l;
  udp_tx #(.PAYLOAD_BYTES(548), .IFG_BYTES(250), .POWER_UP_CYCLES(5), .FPGA_IP(FIP), .FPGA_PORT(16'd5001),
           .PC_IP(PIP)) dut_l (.clk(clk), .rst(rst), .phy_rst_done(phy_done), .payload(pay_l), .input_valid(v_l),
           .send_port(16'd1024), .tx_busy(busy_l), .txen(txen_l), .txd(txd_l));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Captures one frame from a TX_EN/TXD pair; returns bytes and TX_EN length.
  task automatic capture(input bit big, output bytes_t got, output int cycles);
    byte unsigned b;
    int d;
    got = {}; cycles = 0; d = 0; b = 0;
    while (!(big ? txen_l : txen_s)) @(posedge clk);
    while (big ? txen_l : txen_s) begin
      b = {(big ? txd_l : txd_s), b[7:2]};
      d++; cycles++;
      if (d == 4) begin got.push_back(b); d = 0; end
      @(posedge clk);
    end
  endtask

  function automatic bytes_t to_bytes(input logic [548*8-1:0] v, input int n);
    bytes_t q;
    for (int i = n - 1; i >= 0; i--) q.push_back(v[i*8 +: 8]);
    return q;
  endfunction

  bytes_t got, exp;
  logic [30*8-1:0] sent;
  int cyc, gap, t_end, t_req;

  initial begin
    v_s = 0; v_l = 0; pay_s = '0; pay_l = '0; port_s = 16'd5003;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (3) @(posedge clk);
    check(busy_s, "busy during power-up");
    phy_done = 1;
    repeat (10) @(posedge clk);
    check(!busy_s && !busy_l, "idle after power-up");

    for (int n = 0; n < 3; n++) begin
      @(negedge clk);
      for (int i = 0; i < 30; i++) pay_s[i*8 +: 8] = 8'($urandom);
      port_s = (n == 1) ? 16'd1024 : 16'd5003;
      v_s = 1;
      #1 check(busy_s, "tx_busy follows the request combinationally");
      t_req = $time;
      @(negedge clk); v_s = 0;
      sent = pay_s;
      pay_s = ~pay_s;  // must not matter: the payload was latched
      capture(0, got, cyc);
      exp = build(to_bytes(4384'(sent), 30), FIP, PIP, 16'd5001, port_s,
                  48'hFFFF_FFFF_FFFF, 48'hAADE_ADBE_EFAA);
      check(got == exp, $sformatf("frame %0d bytes match reference (%0d vs %0d bytes)", n, got.size(), exp.size()));
      check(cyc == (8 + 42 + 30 + 4) * 4, $sformatf("frame %0d TX_EN length %0d", n, cyc));
      t_end = $time;
      // Request again immediately; the gap must hold.
      gap = 0;
      while (busy_s) begin @(posedge clk); gap++; end
      check(gap >= IFG * 4 - 1 && gap <= IFG * 4 + 2, $sformatf("inter-frame gap %0d clocks", gap));
    end

    // Full-size frame: 548-byte payload, 250-byte gap.
    @(negedge clk);
    for (int i = 0; i < 548; i++) pay_l[i*8 +: 8] = 8'($urandom);
    v_l = 1;
    @(negedge clk); v_l = 0;
    capture(1, got, cyc);
    exp = build(to_bytes(pay_l, 548), FIP, PIP, 16'd5001, 16'd1024, 48'hFFFF_FFFF_FFFF, 48'hAADE_ADBE_EFAA);
    check(got == exp, "548-byte frame matches reference");
    check(cyc == (8 + 42 + 548 + 4) * 4, $sformatf("548-byte frame is %0d clocks", cyc));
    gap = 0;
    while (busy_l) begin @(posedge clk); gap++; end
    check(gap >= 999 && gap <= 1002, $sformatf("250-byte gap is %0d clocks", gap));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
