// udp_rx_tb: drives reference frames (eth_frame_pkg::build) into the UDP
// receiver two bits per clock, least significant di-bit first, and checks
// which frames are accepted: a good frame updates the payload and pulses
// pkt_valid; a bad CRC, a bad IP checksum, a wrong source IP, a wrong
// destination IP and a wrong destination port each pulse pkt_error and leave
// the payload alone. Also checks a short payload (right-aligned), frames sent
// back to back with a minimum gap, and the result latency after the last bit.
//
// The checks made on a frame follow the original design; the result pulses
// and their latency are this design's.
module udp_rx_tb;
  import eth_frame_pkg::*;
  localparam logic [31:0] FIP = {8'd169, 8'd254, 8'd255, 8'd255};
  localparam logic [31:0] PIP = {8'd169, 8'd254, 8'd63, 8'd159};
  localparam logic [47:0] FMAC = 48'hAADE_ADBE_EFAA;
  localparam logic [47:0] PMAC = 48'hFFFF_FFFF_FFFF;
  localparam int N = 30;

  logic clk = 0, rst = 1, phy_done = 0;
  always #10 clk = !clk;
  int checks = 0, failures = 0;

  logic [1:0]     rxd;
  logic           rxv;
  logic [N*8-1:0] pay;
  logic           ok, err;
  int             n_ok = 0, n_err = 0, last_result = 0, cyc = 0;

  udp_rx #(.PAYLOAD_BYTES(N), .POWER_UP_CYCLES(20), .FPGA_IP(FIP), .FPGA_PORT(16'd5001), .PC_IP(PIP))
    dut (.clk(clk), .rst(rst), .phy_rst_done(phy_done), .rxd(rxd), .rx_valid(rxv),
         .payload_out(pay), .pkt_valid(ok), .pkt_error(err));

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && ok)  begin n_ok++;  last_result = cyc; end
    if (!rst && err) begin n_err++; last_result = cyc; end
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int end_cyc;
  task automatic send(input bytes_t f, input int gap);
    foreach (f[i])
      for (int d = 0; d < 4; d++) begin
        @(negedge clk); rxv = 1; rxd = f[i][2*d +: 2];
      end
    end_cyc = cyc;
    repeat (gap) begin @(negedge clk); rxv = 0; rxd = 2'b00; end
  endtask

  function automatic bytes_t rand_payload(input int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  function automatic logic [N*8-1:0] pack(input bytes_t q);
    logic [N*8-1:0] v = '0;
    foreach (q[i]) v = {v[N*8-9:0], q[i]};
    return v;
  endfunction

  bytes_t p, p_good;
  int a, e;

  initial begin
    rxd = 0; rxv = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    phy_done = 1;
    repeat (40) @(posedge clk);

    // 1: good frame, with result latency.
    p = rand_payload(N); p_good = p;
    send(build(p, PIP, FIP, 16'd1024, 16'd5001, FMAC, PMAC), 20);
    check(n_ok == 1 && n_err == 0, "good frame accepted");
    check(pay == pack(p), "payload matches");
    check(last_result - end_cyc <= 3, $sformatf("result %0d clocks after the last di-bit", last_result - end_cyc));

    // 2..6: each kind of bad frame is rejected and the payload kept.
    a = n_ok; e = n_err;
    send(build(rand_payload(N), PIP, FIP, 16'd1024, 16'd5001, FMAC, PMAC, 1), 20);
    check(n_err == e + 1 && n_ok == a, "bad CRC rejected");
    send(build(rand_payload(N), PIP, FIP, 16'd1024, 16'd5001, FMAC, PMAC, 2), 20);
    check(n_err == e + 2 && n_ok == a, "bad IP checksum rejected");
    send(build(rand_payload(N), PIP ^ 32'h1, FIP, 16'd1024, 16'd5001, FMAC, PMAC), 20);
    check(n_err == e + 3 && n_ok == a, "wrong source IP rejected");
    send(build(rand_payload(N), PIP, FIP ^ 32'h100, 16'd1024, 16'd5001, FMAC, PMAC), 20);
    check(n_err == e + 4 && n_ok == a, "wrong destination IP rejected");
    send(build(rand_payload(N), PIP, FIP, 16'd1024, 16'd5003, FMAC, PMAC), 20);
    check(n_err == e + 5 && n_ok == a, "wrong destination port rejected");
    check(pay == pack(p_good), "payload kept after rejects");

    // 7: short payload (23 bytes), right-aligned.
    p = rand_payload(23);
    send(build(p, PIP, FIP, 16'd5003, 16'd5001, FMAC, PMAC), 20);
    check(n_ok == a + 1, "short frame accepted");
    check(pay == pack(p), "short payload right-aligned");

    // 8: three frames back to back with a 12-byte gap.
    a = n_ok;
    for (int k = 0; k < 3; k++) begin
      p = rand_payload(N);
      send(build(p, PIP, FIP, 16'd1024, 16'd5001, FMAC, PMAC), 48);
      check(pay == pack(p), $sformatf("back-to-back frame %0d payload", k));
    end
    check(n_ok == a + 3, "back-to-back frames all accepted");

    // 9: noise without a preamble is ignored.
    e = n_err; a = n_ok;
    repeat (50) begin @(negedge clk); rxv = 1; rxd = 2'b00; end
    @(negedge clk); rxv = 0;
    repeat (10) @(negedge clk);
    check(n_ok == a && n_err == e, "idle line with no preamble gives no result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
