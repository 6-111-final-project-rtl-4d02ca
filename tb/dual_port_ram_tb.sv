// dual_port_ram_tb: writes random words on one clock and reads them back on
// an unrelated second clock, checking the one-cycle read latency, that
// untouched words read zero, that writes with we low are ignored, and that
// addresses past DEPTH neither write nor read. Uses a small depth that is
// not a power of two, then a full 76800-word instance for its last word.
//
// The 76,800 x 12 size follows the original design; the one-clock read
// latency checked is this design's.
module dual_port_ram_tb;
  localparam int D = 100;
  logic wclk = 0, rclk = 0;
  always #10 wclk = !wclk;
  always #7 rclk = !rclk;
  int checks = 0, failures = 0;

  logic        we;
  logic [6:0]  waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] model [128];

  dual_port_ram #(.WIDTH(12), .DEPTH(D)) dut (.wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
                                             .rclk(rclk), .raddr(raddr), .rdata(rdata));
  logic        we_f;
  logic [16:0] wa_f, ra_f;
  logic [11:0] wd_f, rd_f;
  dual_port_ram full (.wclk(wclk), .we(we_f), .waddr(wa_f), .wdata(wd_f),
                      .rclk(rclk), .raddr(ra_f), .rdata(rd_f));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; we_f = 0; wa_f = 0; wd_f = 0; ra_f = 0;
    foreach (model[i]) model[i] = 0;
    @(negedge wclk);
    for (int i = 0; i < 300; i++) begin
      waddr = 7'($urandom); wdata = 12'($urandom); we = 1'($urandom);
      if (we && waddr < D) model[waddr] = wdata;
      @(negedge wclk);
    end
    we = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge rclk); raddr = 7'(a);
      @(posedge rclk); #1;
      check(rdata == (a < D ? model[a] : 12'h000), $sformatf("read address %0d: %h", a, rdata));
    end
    // Latency: the word appears after the first read edge, not before.
    @(negedge rclk); raddr = 7'd5;
    @(posedge rclk); #1;
    @(negedge rclk); raddr = 7'd6;
    #1 check(rdata == model[5], "output holds until the next read edge");
    @(posedge rclk); #1;
    check(rdata == model[6], "new address read one edge later");
    // Full-size memory: last word.
    @(negedge wclk); we_f = 1; wa_f = 17'd76799; wd_f = 12'hABC;
    @(negedge wclk); we_f = 0;
    @(negedge rclk); ra_f = 17'd76799;
    @(posedge rclk); #1;
    check(rd_f == 12'hABC, "word 76799 of the full-size memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
