// dual_port_ram: simple dual-port RAM with independent write and read clocks.
//
// One write port (wclk, we, waddr, wdata) and one read port (rclk, raddr)
// with a registered output: rdata holds the word at raddr one rclk edge after
// the address is presented. Reading and writing the same word in the same
// instant on different clocks returns either the old or the new value.
// The robot uses it as the camera frame buffer (written at the camera pixel
// clock, read at 50 MHz) and the controller as the picture memory (written at
// 50 MHz, read at the 65 MHz pixel clock), both 12 bits x 76800 words for a
// 320 x 240 RGB444 picture. It maps onto FPGA block RAM. The contents start
// at zero in simulation.
//
// The size and the two clock domains follow the original design; the
// registered read and the guard on addresses past DEPTH are this design's
// choices.
module dual_port_ram #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned DEPTH = 76800,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge wclk) begin
    if (we && int'(waddr) < int'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= (int'(raddr) < int'(DEPTH)) ? mem[raddr] : '0;
  end
endmodule
