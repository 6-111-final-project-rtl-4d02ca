// phy_init: power-up reset sequencer for the LAN8720A Ethernet PHY.
//
// After reset the PHY's reset pin (eth_rstn) is held low for RESET_CYCLES
// clocks while the mode strap pins that share the receive pins are driven:
// CRS_DV = 0, RXD = 2'b11, RXERR = 0, nINT = 1. The PHY samples these when it
// leaves reset. eth_rstn then rises, the straps stay driven AFTER_CYCLES more
// clocks, and after that the strap drivers are released (strap_oe low) and
// phy_rst_done goes high and stays high until the next reset.
//
// Interface: the strap values and a common output enable come out as plain
// signals; the pad-level tri-state buffers belong to the board top. At 50 MHz
// the defaults give 100 ms of reset and 8 us of hold.
//
// Following the source design: the two delays, the strap values and the
// release order. Own choice: output enable instead of tri-state assignments.
module phy_init #(
  parameter int unsigned RESET_CYCLES = 5_000_000,
  parameter int unsigned AFTER_CYCLES = 400
) (
  input  logic       clk,
  input  logic       rst,
  output logic       eth_rstn,
  output logic       strap_oe,
  output logic       strap_crsdv,
  output logic [1:0] strap_rxd,
  output logic       strap_rxerr,
  output logic       strap_intn,
  output logic       phy_rst_done
);
  localparam int unsigned TOTAL = RESET_CYCLES + AFTER_CYCLES;
  localparam int unsigned CW    = $clog2(TOTAL + 1);

  typedef enum logic {S_RESET, S_DONE} phy_state_e;
  phy_state_e    state;
  logic [CW-1:0] counter;

  assign strap_oe    = (state == S_RESET);
  assign strap_crsdv = 1'b0;
  assign strap_rxd   = 2'b11;
  assign strap_rxerr = 1'b0;
  assign strap_intn  = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_RESET;
      counter      <= '0;
      eth_rstn     <= 1'b0;
      phy_rst_done <= 1'b0;
    end else if (state == S_RESET) begin
      counter <= counter + 1'b1;
      if (counter == CW'(RESET_CYCLES - 1)) eth_rstn <= 1'b1;
      if (counter == CW'(TOTAL - 1)) begin
        state        <= S_DONE;
        phy_rst_done <= 1'b1;
      end
    end
  end

  a_done_after_release: assert property (@(posedge clk) disable iff (rst) phy_rst_done |-> eth_rstn);
endmodule
