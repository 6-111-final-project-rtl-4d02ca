// phy_init_tb: checks the PHY power-up sequencer with short counts: the PHY
// reset pin stays low for exactly RESET_CYCLES clocks, the strap pins are
// driven (CRS_DV 0, RXD 11, RXER 0, INTN 1) only while reset is held, and
// phy_rst_done rises exactly AFTER_CYCLES clocks after the release.
//
// The reset length and strap values follow the original design; the timing
// of phy_rst_done is this design's.
module phy_init_tb;
  localparam int RC = 40, AC = 7;
  logic clk = 0, rst = 1;
  always #10 clk = !clk;
  int checks = 0, failures = 0;
  logic rstn, oe, crsdv, rxerr, intn, done;
  logic [1:0] rxd;
  int low_cycles = 0, release_at = -1, done_at = -1, cyc = 0;
  bit strap_bad = 0;

  phy_init #(.RESET_CYCLES(RC), .AFTER_CYCLES(AC)) dut (
    .clk(clk), .rst(rst), .eth_rstn(rstn), .strap_oe(oe), .strap_crsdv(crsdv), .strap_rxd(rxd),
    .strap_rxerr(rxerr), .strap_intn(intn), .phy_rst_done(done));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    cyc++;
    if (!rstn) low_cycles++;
    if (rstn && release_at < 0) release_at = cyc;
    if (done && done_at < 0) done_at = cyc;
    if (!rstn && !(oe && !crsdv && rxd == 2'b11 && !rxerr && intn)) strap_bad = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    check(!rstn && !done, "reset held during system reset");
    @(negedge clk); rst = 0;
    repeat (RC + AC + 20) @(posedge clk);
    check(low_cycles == RC, $sformatf("PHY reset low for %0d clocks", low_cycles));
    check(done_at - release_at == AC, $sformatf("done %0d clocks after release", done_at - release_at));
    check(!strap_bad, "strap levels while in reset");
    check(!oe, "strap drivers released after reset");
    check(done && rstn, "done stays high");
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
