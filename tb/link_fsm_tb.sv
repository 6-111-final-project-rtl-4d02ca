// link_fsm_tb: runs the connection state machine against a transmitter
// model (busy for a fixed time after each request) and a PC model that
// answers on command. Checks: the RX init message goes to port 5003 and is
// repeated after TIME_OUT clocks without an answer; the RX answer moves on
// to the TX init message on port 1024; the TX answer reaches NORMAL (state
// code 7); normal payloads are sent only while the transmitter is free and
// each is taken once; a local stop request sends "STOP"; a received "STOP"
// ends the link (state 8) and nothing is sent after that.
//
// The state codes, message strings and ports follow the original design; the
// timing around the transmitter handshake is this design's.
module link_fsm_tb;
  localparam int PB = 30, TO = 60, BUSY = 25;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [PB*8-1:0] rx_pay, norm_pay, tx_pay;
  logic norm_ready, send_stop, take, tx_valid, rx_conn, tx_conn, stopped;
  logic [15:0] port;
  logic [3:0]  state;
  int busy_cnt = 0;
  logic tx_busy;
  assign tx_busy = tx_valid || busy_cnt != 0;

  link_fsm #(.PAYLOAD_BYTES(PB), .TIME_OUT(TO)) dut (
    .clk(clk), .rst(rst), .tx_busy(tx_busy), .rx_payload(rx_pay), .normal_payload(norm_pay),
    .normal_ready(norm_ready), .send_stop(send_stop), .normal_take(take), .tx_payload(tx_pay),
    .tx_valid(tx_valid), .send_port(port), .state(state), .rx_connected(rx_conn),
    .tx_connected(tx_conn), .stopped(stopped));

  typedef struct { int t; logic [PB*8-1:0] p; logic [15:0] port; } sent_t;
  sent_t sent[$];
  int cyc = 0, takes = 0, overlap = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_valid) begin
      if (busy_cnt != 0) overlap++;
      sent.push_back('{cyc, tx_pay, port});
      busy_cnt <= BUSY;
    end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (take) takes++;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [PB*8-1:0] str(input string s);
    logic [PB*8-1:0] v = '0;
    for (int i = 0; i < s.len(); i++) v = {v[PB*8-9:0], s[i]};
    return v;
  endfunction

  int n;
  initial begin
    rx_pay = 0; norm_pay = 0; norm_ready = 0; send_stop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (3 * (TO + BUSY + 5)) @(negedge clk);
    check(sent.size() >= 3, $sformatf("init repeated on time-out (%0d sends)", sent.size()));
    check(sent[0].p == str("FPGA RX INIT") && sent[0].port == 16'd5003, "RX init message and port");
    check(sent[1].p == str("FPGA RX INIT") && sent[1].t - sent[0].t >= TO && sent[1].t - sent[0].t <= TO + BUSY + 5,
          $sformatf("retry %0d clocks after the first", sent[1].t - sent[0].t));
    check(state inside {4'd0, 4'd2, 4'd4} && !rx_conn, "still starting RX");
    rx_pay = str("PC to FPGA RX CONNECTED");
    n = sent.size();
    repeat (BUSY + TO / 2) @(negedge clk);
    check(rx_conn, "RX connected");
    check(sent.size() == n + 1 && sent[n].p == str("FPGA TX INIT") && sent[n].port == 16'd1024, "TX init message and port");
    check(state inside {4'd5}, $sformatf("waiting for TX answer, state %0d", state));
    rx_pay = str("PC to FPGA TX CONNECTED");
    repeat (3) @(negedge clk);
    check(state == 4'd7 && tx_conn, "NORMAL reached");
    n = sent.size();
    norm_ready = 1;
    for (int i = 0; i < 5; i++) begin
      norm_pay = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      while (!take) @(negedge clk);
      @(negedge clk);
      check(sent[sent.size() - 1].p == norm_pay && sent[sent.size() - 1].port == 16'd1024, $sformatf("normal payload %0d", i));
    end
    norm_ready = 0;
    repeat (BUSY + 3) @(negedge clk);
    check(takes == 5 && sent.size() == n + 5, "one send per take");
    check(overlap == 0, "never requested while busy");
    send_stop = 1;
    @(negedge clk);
    while (!tx_valid) @(negedge clk);
    @(negedge clk);
    send_stop = 0;
    check(sent[sent.size() - 1].p == str("STOP"), "local stop sends STOP");
    rx_pay = str("STOP");
    norm_ready = 1;
    repeat (3) @(negedge clk);
    n = sent.size();
    check(state == 4'd8 && stopped && !rx_conn && !tx_conn, "received STOP ends the link");
    repeat (5 * TO) @(negedge clk);
    check(sent.size() == n && state == 4'd8, "nothing sent after the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
