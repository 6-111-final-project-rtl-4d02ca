// pixel_packer: builds the robot's sensor payload from the camera frame
// buffer.
//
// Layout of the 548-byte payload (bit 0 = last byte sent): bits [33:0] hold
// the distance reading, and pixel record k (k = 0..149) holds the 17-bit
// frame-buffer address at bit 34 + 29k and the 12-bit RGB444 value at bit
// 51 + 29k. The packer walks the frame buffer address from 0 to 76799 and
// round again, one address per clock. The frame buffer answers one clock
// later, so the address is carried along one stage and stored with its data.
// The distance is sampled when record 0 is written. After record 149 is
// written, ready goes high and the packer stops until take is pulsed (the
// transmitter accepted the payload); it then fills the next payload from the
// following address. Every pixel of the frame is therefore sent in turn.
//
// Timing: a payload is complete PIXELS + 1 clocks after filling starts.
//
// Following the source design: the record layout, one pixel per clock, the
// address sequence over 320 x 240. Own choice: stopping while a full payload
// waits (the source lets the address run on and sends the records that
// happen to line up with a free transmitter).
module pixel_packer #(
  parameter int unsigned PAYLOAD_BYTES = 548,
  parameter int unsigned PIXELS        = 150,
  parameter int unsigned FRAME_PIXELS  = 76800
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        enable,
  input  logic [9:0]                  distance,
  output logic [16:0]                 fb_addr,
  input  logic [11:0]                 fb_data,
  output logic [PAYLOAD_BYTES*8-1:0]  payload,
  output logic                        ready,
  input  logic                        take
);
  localparam int unsigned SW = $clog2(PIXELS + 1);

  logic [SW-1:0] slot;        // record being read
  logic          issued_all;
  logic          pend;
  logic [SW-1:0] pend_slot;
  logic [16:0]   pend_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      fb_addr    <= '0;
      slot       <= '0;
      issued_all <= 1'b0;
      pend       <= 1'b0;
      pend_slot  <= '0;
      pend_addr  <= '0;
      payload    <= '0;
      ready      <= 1'b0;
    end else begin
      // Stage 1: present an address to the frame buffer.
      pend <= 1'b0;
      if (take) begin
        ready      <= 1'b0;
        issued_all <= 1'b0;
        slot       <= '0;
      end else if (enable && !issued_all) begin
        pend      <= 1'b1;
        pend_slot <= slot;
        pend_addr <= fb_addr;
        fb_addr   <= (fb_addr == 17'(FRAME_PIXELS - 1)) ? '0 : fb_addr + 1'b1;
        if (slot == SW'(PIXELS - 1)) issued_all <= 1'b1;
        else                         slot <= slot + 1'b1;
      end
      // Stage 2: store the address and the data that came back for it.
      if (pend) begin
        payload[34 + 29*int'(pend_slot) +: 17] <= pend_addr;
        payload[51 + 29*int'(pend_slot) +: 12] <= fb_data;
        if (pend_slot == '0) payload[33:0] <= {24'd0, distance};
        if (pend_slot == SW'(PIXELS - 1)) ready <= 1'b1;
      end
    end
  end

  a_take_only_when_ready: assert property (@(posedge clk) disable iff (rst) take |-> ready);
endmodule
