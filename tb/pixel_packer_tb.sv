// pixel_packer_tb: connects the packer to a frame-buffer model with a
// one-clock registered read whose word at address a is a hash of a, and
// checks every packet: distance in bits [33:0], and for record k the
// address (base + k, wrapping at FRAME_PIXELS) and its colour. Also checks
// that the packer stalls (fb_addr and payload frozen) while a full payload
// waits to be taken, that it stops while disabled, the fill time, and one
// packet from a full-size instance (548 bytes, 150 pixels).
//
// The record layout and 150 records per payload follow the original design;
// the stall is this design's choice.
module pixel_packer_tb;
  localparam int P = 8, FP = 20, PB = 34;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  function automatic logic [11:0] colour(input logic [16:0] a);
    return 12'(a * 37 + 5) ^ 12'(a >> 3);
  endfunction

  logic          en, take, ready;
  logic [9:0]    dist_in;
  logic [16:0]   fb_addr;
  logic [11:0]   fb_data;
  logic [PB*8-1:0] payload;
  pixel_packer #(.PAYLOAD_BYTES(PB), .PIXELS(P), .FRAME_PIXELS(FP)) dut (
    .clk(clk), .rst(rst), .enable(en), .distance(dist_in), .fb_addr(fb_addr), .fb_data(fb_data),
    .payload(payload), .ready(ready), .take(take));
  always @(posedge clk) fb_data <= colour(fb_addr);

  logic          take_f, ready_f;
  logic [16:0]   fb_addr_f;
  logic [11:0]   fb_data_f;
  logic [548*8-1:0] payload_f;
  pixel_packer full (.clk(clk), .rst(rst), .enable(en), .distance(dist_in), .fb_addr(fb_addr_f),
                     .fb_data(fb_data_f), .payload(payload_f), .ready(ready_f), .take(take_f));
  always @(posedge clk) fb_data_f <= colour(fb_addr_f);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  int base = 0, fill, stall_events = 0;
  logic [16:0] a_hold;
  logic [PB*8-1:0] p_hold;
  bit ok;

  initial begin
    en = 0; take = 0; take_f = 0; dist_in = 0; fb_data = 0; fb_data_f = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    check(!ready && fb_addr == 0, "disabled packer stays idle");
    en = 1;
    for (int n = 0; n < 6; n++) begin
      dist_in = 10'($urandom);
      fill = 0;
      while (!ready) begin @(negedge clk); fill++; end
      check(fill <= P + 2, $sformatf("packet %0d filled in %0d clocks", n, fill));
      ok = payload[33:0] == {24'd0, dist_in};
      for (int k = 0; k < P; k++) begin
        logic [16:0] a;
        a = 17'((base + k) % FP);
        if (payload[34 + 29*k +: 17] != a || payload[51 + 29*k +: 12] != colour(a)) ok = 0;
      end
      check(ok, $sformatf("packet %0d contents", n));
      base += P;
      // Hold it for a random time: nothing may move.
      a_hold = fb_addr; p_hold = payload;
      repeat ($urandom_range(2, 12)) @(negedge clk);
      check(fb_addr == a_hold && payload == p_hold && ready, "stalled while payload waits");
      stall_events++;
      take = 1; @(negedge clk); take = 0;
    end
    // Disable mid-packet and re-enable: contents still consistent.
    repeat (3) @(negedge clk);
    en = 0;
    a_hold = fb_addr;
    repeat (10) @(negedge clk);
    check(fb_addr == a_hold, "no reads while disabled");
    en = 1;
    while (!ready) @(negedge clk);
    ok = 1;
    for (int k = 0; k < P; k++)
      if (payload[34 + 29*k +: 17] != 17'((base + k) % FP) ||
          payload[51 + 29*k +: 12] != colour(17'((base + k) % FP))) ok = 0;
    check(ok, "packet split by a disable");
    take = 1; @(negedge clk); take = 0;
    // Full-size instance: first packet.
    while (!ready_f) @(negedge clk);
    ok = 1;
    for (int k = 0; k < 150; k++)
      if (payload_f[34 + 29*k +: 17] != 17'(k) || payload_f[51 + 29*k +: 12] != colour(17'(k))) ok = 0;
    check(ok, "full-size packet of 150 records");
    check(payload_f[548*8-1 : 34 + 29*150] == '0, "unused payload bits zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
