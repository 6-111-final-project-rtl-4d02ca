// pixel_unpacker: writes the pixel records of the received sensor payload
// into the controller's picture memory.
//
// camera_data is the payload above the 34 sensor bits: record k (k = 0..149)
// holds a 17-bit picture address in bits [29k +: 17] and a 12-bit RGB444
// value in bits [29k + 17 +: 12]. The memory takes one write per clock, so a
// counter steps through the 150 records, one per 50 MHz clock, and starts
// again after the last; the records of the newest payload are written within
// 150 clocks of its arrival, and old records are simply written again.
//
// Timing: wr_addr/wr_data are registered, one clock after the record is
// selected. wr_en is high whenever the module is out of reset.
//
// Following the source design: the record layout, the counter over the 150
// records, write enable always on.
module pixel_unpacker #(
  parameter int unsigned PIXELS = 150
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [PIXELS*29-1:0]    camera_data,
  output logic [16:0]             wr_addr,
  output logic [11:0]             wr_data,
  output logic                    wr_en
);
  localparam int unsigned KW = $clog2(PIXELS);
  logic [KW-1:0] k;

  always_ff @(posedge clk) begin
    if (rst) begin
      k       <= '0;
      wr_addr <= '0;
      wr_data <= '0;
      wr_en   <= 1'b0;
    end else begin
      wr_addr <= camera_data[29*int'(k) +: 17];
      wr_data <= camera_data[29*int'(k) + 17 +: 12];
      wr_en   <= 1'b1;
      k       <= (k == KW'(PIXELS - 1)) ? '0 : k + 1'b1;
    end
  end
endmodule
