// link_fsm: connection state machine shared by the robot and the controller.
//
// Each board talks to a program on its PC, which relays UDP payloads to and
// from an internet server. The machine first announces the receive path: it
// sends "FPGA RX INIT" to the PC's receive port (RX_PC_PORT) and waits for
// the PC to answer with "PC to FPGA RX CONNECTED" in the low bytes of a
// received payload; then it does the same for the transmit path ("FPGA TX
// INIT" to TX_PC_PORT, answer "PC to FPGA TX CONNECTED"). A missing answer
// is retried after TIME_OUT clocks. In NORMAL it sends normal_payload to
// TX_PC_PORT each time the transmitter is free and normal_ready is high
// (normal_take pulses when it is accepted), or the text "STOP" instead while
// send_stop is high. A received payload whose low four bytes read "STOP"
// ends the session (state END) until reset.
//
// Interface: tx_payload/tx_valid/send_port go to udp_tx, whose combinational
// tx_busy is high in the same cycle as tx_valid, so tx_valid is a one-cycle
// pulse. rx_payload is udp_rx's last verified payload. Status outputs drive
// the LEDs: rx_connected and tx_connected blue, stopped red. state carries
// the state code shown on the seven-segment display.
//
// Following the source design: states and their codes, messages, ports,
// timeout and retry, STOP handling. Own choice: the normal_ready/normal_take
// handshake with the payload source; the unused FPGA-to-FPGA state is left
// out.
module link_fsm
  import eth_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES = 548,
  parameter int unsigned TIME_OUT      = 5_000_000,
  parameter logic [15:0] RX_PC_PORT    = 16'd5003,
  parameter logic [15:0] TX_PC_PORT    = 16'd1024
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        tx_busy,
  input  logic [PAYLOAD_BYTES*8-1:0]  rx_payload,
  input  logic [PAYLOAD_BYTES*8-1:0]  normal_payload,
  input  logic                        normal_ready,
  input  logic                        send_stop,
  output logic                        normal_take,
  output logic [PAYLOAD_BYTES*8-1:0]  tx_payload,
  output logic                        tx_valid,
  output logic [15:0]                 send_port,
  output logic [3:0]                  state,
  output logic                        rx_connected,
  output logic                        tx_connected,
  output logic                        stopped
);
  typedef enum logic [3:0] {
    START_RX = 4'd0, START_TX = 4'd1, SEND_RX = 4'd2, SEND_TX = 4'd3,
    RECEIVE_RX = 4'd4, RECEIVE_TX = 4'd5, NORMAL = 4'd7, END_ = 4'd8
  } link_state_e;

  localparam logic [12*8-1:0] RX_INIT = "FPGA RX INIT";
  localparam logic [12*8-1:0] TX_INIT = "FPGA TX INIT";
  localparam logic [23*8-1:0] RX_CONN = "PC to FPGA RX CONNECTED";
  localparam logic [23*8-1:0] TX_CONN = "PC to FPGA TX CONNECTED";
  localparam logic [4*8-1:0]  STOP    = "STOP";
  localparam int unsigned     TW      = $clog2(TIME_OUT + 1);
  localparam int unsigned     PW      = PAYLOAD_BYTES * 8;

  link_state_e   st;
  logic [TW-1:0] timer;
  assign state = st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st           <= START_RX;
      timer        <= '0;
      tx_payload   <= '0;
      tx_valid     <= 1'b0;
      send_port    <= RX_PC_PORT;
      rx_connected <= 1'b0;
      tx_connected <= 1'b0;
      stopped      <= 1'b0;
      normal_take  <= 1'b0;
    end else begin
      tx_valid    <= 1'b0;
      normal_take <= 1'b0;
      unique case (st)
        START_RX, START_TX: begin
          if (!tx_busy) begin
            send_port  <= (st == START_RX) ? RX_PC_PORT : TX_PC_PORT;
            tx_payload <= PW'((st == START_RX) ? RX_INIT : TX_INIT);
            tx_valid   <= 1'b1;
            st         <= (st == START_RX) ? SEND_RX : SEND_TX;
          end
        end
        SEND_RX, SEND_TX: begin
          if (!tx_busy) begin
            timer <= '0;
            st    <= (st == SEND_RX) ? RECEIVE_RX : RECEIVE_TX;
          end
        end
        RECEIVE_RX: begin
          if (rx_payload[23*8-1:0] == RX_CONN) begin
            rx_connected <= 1'b1;
            st           <= START_TX;
          end else if (timer == TW'(TIME_OUT - 1)) begin
            timer <= '0;
            st    <= START_RX;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        RECEIVE_TX: begin
          if (rx_payload[23*8-1:0] == TX_CONN) begin
            tx_connected <= 1'b1;
            st           <= NORMAL;
          end else if (timer == TW'(TIME_OUT - 1)) begin
            timer <= '0;
            st    <= START_TX;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        NORMAL: begin
          if (rx_payload[4*8-1:0] == STOP) begin
            rx_connected <= 1'b0;
            tx_connected <= 1'b0;
            stopped      <= 1'b1;
            st           <= END_;
          end else if (!tx_busy && !tx_valid && (normal_ready || send_stop)) begin
            tx_valid    <= 1'b1;
            tx_payload  <= send_stop ? PW'(STOP) : normal_payload;
            normal_take <= !send_stop;
          end
        end
        default: ;  // END_: stay until reset
      endcase
    end
  end

  a_valid_pulse: assert property (@(posedge clk) disable iff (rst) tx_valid |=> !tx_valid);
endmodule
