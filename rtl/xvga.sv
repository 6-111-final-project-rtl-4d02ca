// xvga: VGA timing generator for 1024 x 768 at 60 Hz (65 MHz pixel clock).
//
// hcount runs 0..1343 along a line and vcount 0..805 down the frame. The
// picture is hcount < 1024, vcount < 768; after it come the front porch,
// sync pulse and back porch (24/136/160 pixels, 3/6/29 lines). hsync and
// vsync are active low during the pulses, blank is high outside the picture.
// All outputs are registered together, so on any clock they describe the
// same pixel.
//
// Following the source design: the display size and all porch and pulse
// lengths. Own choice: sync and blank decoded from the next count values.
module xvga #(
  parameter int unsigned DISPLAY_WIDTH  = 1024,
  parameter int unsigned DISPLAY_HEIGHT = 768,
  parameter int unsigned H_FP           = 24,
  parameter int unsigned H_SYNC_PULSE   = 136,
  parameter int unsigned H_BP           = 160,
  parameter int unsigned V_FP           = 3,
  parameter int unsigned V_SYNC_PULSE   = 6,
  parameter int unsigned V_BP           = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = DISPLAY_WIDTH + H_FP + H_SYNC_PULSE + H_BP;
  localparam int unsigned V_TOTAL = DISPLAY_HEIGHT + V_FP + V_SYNC_PULSE + V_BP;

  logic [10:0] h_n;
  logic [9:0]  v_n;
  always_comb begin
    h_n = (hcount == 11'(H_TOTAL - 1)) ? '0 : hcount + 1'b1;
    v_n = vcount;
    if (hcount == 11'(H_TOTAL - 1)) v_n = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_n;
      vcount <= v_n;
      hsync  <= !(h_n >= 11'(DISPLAY_WIDTH + H_FP) && h_n < 11'(DISPLAY_WIDTH + H_FP + H_SYNC_PULSE));
      vsync  <= !(v_n >= 10'(DISPLAY_HEIGHT + V_FP) && v_n < 10'(DISPLAY_HEIGHT + V_FP + V_SYNC_PULSE));
      blank  <= (h_n >= 11'(DISPLAY_WIDTH)) || (v_n >= 10'(DISPLAY_HEIGHT));
    end
  end
endmodule
