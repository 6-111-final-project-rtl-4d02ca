// debounce: pushbutton debouncer.
//
// The button is first passed through two flip-flops. The output takes the
// input's value once the input has stayed the same for COUNT clocks; any
// change restarts the wait. With the 100 MHz board clock the default of
// 1,000,000 clocks is 10 ms. After reset the output is 0 (not pressed).
//
// Following the source design: the stable-count scheme and its length.
// Own choices: the input synchroniser and the reset value.
module debounce #(
  parameter int unsigned COUNT = 1_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(COUNT + 1);
  logic [1:0]    sync;
  logic          cand;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync  <= '0;
      cand  <= 1'b0;
      count <= '0;
      clean <= 1'b0;
    end else begin
      sync <= {sync[0], noisy};
      if (sync[1] != cand) begin
        cand  <= sync[1];
        count <= '0;
      end else if (count == CW'(COUNT)) begin
        clean <= cand;
      end else begin
        count <= count + 1'b1;
      end
    end
  end
endmodule
