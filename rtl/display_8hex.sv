// display_8hex: drives the board's eight-digit seven-segment display.
//
// A free-running counter selects one digit at a time with its top three bits
// (bit BITS down to BITS-2), leftmost digit first; the digit's hex value is
// taken from data (digit 0 = bits [31:28]) and decoded to segments. Segments
// and digit strobes are active low; seg is {g,f,e,d,c,b,a}. With BITS = 13 at
// 50 MHz each digit is lit for 2^11 clocks (41 us).
//
// Following the source design: counter-based multiplexing, digit order,
// active-low outputs. Own choice: the counter is reset.
module display_8hex #(
  parameter int unsigned BITS = 13
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] data,
  output logic [6:0]  seg,
  output logic [7:0]  strobe
);
  logic [BITS:0] counter;
  logic [2:0]    sel;
  logic [3:0]    nib;
  assign sel = counter[BITS -: 3];
  assign nib = data[(7 - int'(sel)) * 4 +: 4];

  function automatic logic [6:0] hex7(input logic [3:0] v);  // gfedcba, lit = 1
    unique case (v)
      4'h0: return 7'b0111111;  4'h1: return 7'b0000110;
      4'h2: return 7'b1011011;  4'h3: return 7'b1001111;
      4'h4: return 7'b1100110;  4'h5: return 7'b1101101;
      4'h6: return 7'b1111101;  4'h7: return 7'b0000111;
      4'h8: return 7'b1111111;  4'h9: return 7'b1101111;
      4'hA: return 7'b1110111;  4'hB: return 7'b1111100;
      4'hC: return 7'b0111001;  4'hD: return 7'b1011110;
      4'hE: return 7'b1111001;  default: return 7'b1110001;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      counter <= '0;
      seg     <= '1;
      strobe  <= '1;
    end else begin
      counter <= counter + 1'b1;
      seg     <= ~hex7(nib);
      strobe  <= ~(8'b1000_0000 >> sel);
    end
  end
endmodule
