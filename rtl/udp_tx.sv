// udp_tx: UDP/IPv4/Ethernet frame transmitter on a 2-bit RMII interface.
//
// A request (input_valid while idle) latches a fixed-length payload and a UDP
// destination port. The frame is then sent two bits per 50 MHz clock: the
// preamble and SFD, a MAC header, an IPv4 header whose checksum is worked out
// from the parameters at elaboration, a UDP header, the payload (first byte =
// the most significant byte of `payload`) and the CRC-32 of everything after
// the SFD. Each byte leaves least-significant di-bit first; that is the
// "swap nibbles and di-bits" rule of the LAN8720A interface. After the CRC
// the transmitter keeps TX_EN low for IFG_BYTES byte times before the next
// frame may start; the design uses 250 bytes (1000 clocks) because some PCs
// drop frames that arrive back to back.
//
// Timing: a frame occupies (8 + 42 + PAYLOAD_BYTES + 4) * 4 clocks with TX_EN
// high, starting two clocks after the request, then IFG_BYTES * 4 clocks of
// gap. tx_busy is combinational and is low only while idle with no request
// pending, so a requester sees busy in the same cycle it asserts input_valid.
// After reset the module waits POWER_UP_CYCLES cycles of phy_rst_done before
// it accepts requests.
//
// Following the source design: states, header field values, checksum and
// CRC ordering, payload length fixed at build time (18 bytes minimum).
// Own choices: an explicit IDLE state, payload latched at the request, one
// byte-index counter driving a byte multiplexer instead of a frame array.
module udp_tx
  import eth_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES   = 548,
  parameter int unsigned IFG_BYTES       = 12,
  parameter int unsigned POWER_UP_CYCLES = 5_000_400,
  parameter logic [31:0] FPGA_IP         = 32'h0,
  parameter logic [15:0] FPGA_PORT       = 16'd5000,
  parameter logic [31:0] PC_IP           = 32'h0,
  parameter logic [47:0] PC_MAC          = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [47:0] FPGA_MAC        = 48'hAA_DE_AD_BE_EF_AA
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         phy_rst_done,
  input  logic [PAYLOAD_BYTES*8-1:0]   payload,
  input  logic                         input_valid,
  input  logic [15:0]                  send_port,
  output logic                         tx_busy,
  output logic                         txen,
  output logic [1:0]                   txd
);

  typedef enum logic [3:0] {
    S_POWER_UP, S_IDLE, S_PREAMBLE, S_MAC, S_IP, S_UDP, S_PAYLOAD, S_CRC, S_IFG
  } tx_state_e;

  localparam int unsigned FRAME_BYTES = PREAMBLE_BYTES + HDR_BYTES + PAYLOAD_BYTES + CRC_BYTES;
  localparam int unsigned MAC_START   = PREAMBLE_BYTES;
  localparam int unsigned IP_START    = MAC_START + MAC_BYTES;
  localparam int unsigned UDP_START   = IP_START + IP_BYTES;
  localparam int unsigned PAY_START   = UDP_START + UDP_BYTES;
  localparam int unsigned CRC_START   = PAY_START + PAYLOAD_BYTES;
  localparam int unsigned IFG_CYCLES  = IFG_BYTES * 4;
  localparam int unsigned IDX_W       = $clog2(FRAME_BYTES + 1);
  localparam int unsigned PWR_W       = $clog2(POWER_UP_CYCLES + 1);
  localparam int unsigned IFG_W       = $clog2(IFG_CYCLES + 1);

  localparam logic [15:0] UDP_LEN = 16'(UDP_BYTES + PAYLOAD_BYTES);
  localparam logic [15:0] IP_LEN  = 16'(IP_BYTES + UDP_BYTES + PAYLOAD_BYTES);

  function automatic logic [15:0] ip_checksum();
    logic [15:0] s;
    s = 16'h4500;
    s = ones_add(s, IP_LEN);
    s = ones_add(s, 16'h0000);                 // identification
    s = ones_add(s, 16'h0000);                 // flags, fragment offset
    s = ones_add(s, {IP_TTL, IP_PROTO_UDP});
    s = ones_add(s, FPGA_IP[31:16]);
    s = ones_add(s, FPGA_IP[15:0]);
    s = ones_add(s, PC_IP[31:16]);
    s = ones_add(s, PC_IP[15:0]);
    return ~s;
  endfunction
  localparam logic [15:0] IP_CSUM = ip_checksum();

  tx_state_e                   state;
  logic [IDX_W-1:0]            byte_idx;
  logic [1:0]                  dib;
  logic [31:0]                 crc;
  logic [PWR_W-1:0]            pwr_cnt;
  logic [IFG_W-1:0]            ifg_cnt;
  logic [PAYLOAD_BYTES*8-1:0]  pay_q;
  logic [15:0]                 port_q;

  // Headers, first byte in the most significant position.
  logic [HDR_BYTES*8-1:0] hdr;
  assign hdr = {PC_MAC, FPGA_MAC, ETHERTYPE_IPV4,
                16'h4500, IP_LEN, 16'h0000, 16'h0000, IP_TTL, IP_PROTO_UDP, IP_CSUM,
                FPGA_IP, PC_IP,
                FPGA_PORT, port_q, UDP_LEN, 16'h0000};

  logic [7:0]  cur_byte;
  logic [31:0] fcs;
  assign fcs = ~crc;

  always_comb begin
    if (byte_idx < IDX_W'(MAC_START)) begin
      cur_byte = (byte_idx == IDX_W'(MAC_START - 1)) ? SFD_BYTE : PREAMBLE_BYTE;
    end else if (byte_idx < IDX_W'(PAY_START)) begin
      cur_byte = hdr[(HDR_BYTES - 1 - (int'(byte_idx) - MAC_START)) * 8 +: 8];
    end else if (byte_idx < IDX_W'(CRC_START)) begin
      cur_byte = pay_q[(PAYLOAD_BYTES - 1 - (int'(byte_idx) - PAY_START)) * 8 +: 8];
    end else begin
      cur_byte = fcs[(int'(byte_idx) - CRC_START) * 8 +: 8];
    end
  end

  // Which frame section the byte index is in; the state follows it.
  function automatic tx_state_e section(input logic [IDX_W-1:0] idx);
    if (idx < IDX_W'(MAC_START))      return S_PREAMBLE;
    else if (idx < IDX_W'(IP_START))  return S_MAC;
    else if (idx < IDX_W'(UDP_START)) return S_IP;
    else if (idx < IDX_W'(PAY_START)) return S_UDP;
    else if (idx < IDX_W'(CRC_START)) return S_PAYLOAD;
    else                              return S_CRC;
  endfunction

  assign tx_busy = !(state == S_IDLE && !input_valid);

  logic sending;
  assign sending = (state == S_PREAMBLE) || (state == S_MAC) || (state == S_IP) ||
                   (state == S_UDP) || (state == S_PAYLOAD) || (state == S_CRC);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_POWER_UP;
      byte_idx <= '0;
      dib      <= '0;
      crc      <= '1;
      pwr_cnt  <= '0;
      ifg_cnt  <= '0;
      pay_q    <= '0;
      port_q   <= '0;
      txen     <= 1'b0;
      txd      <= 2'b00;
    end else begin
      unique case (state)
        S_POWER_UP: begin
          if (pwr_cnt == PWR_W'(POWER_UP_CYCLES)) state <= S_IDLE;
          else if (phy_rst_done)                  pwr_cnt <= pwr_cnt + 1'b1;
        end
        S_IDLE: begin
          txen <= 1'b0;
          txd  <= 2'b00;
          if (input_valid) begin
            pay_q    <= payload;
            port_q   <= send_port;
            byte_idx <= '0;
            dib      <= '0;
            crc      <= '1;
            state    <= S_PREAMBLE;
          end
        end
        S_IFG: begin
          txen <= 1'b0;
          txd  <= 2'b00;
          if (ifg_cnt == IFG_W'(IFG_CYCLES - 1)) begin
            ifg_cnt <= '0;
            state   <= S_IDLE;
          end else begin
            ifg_cnt <= ifg_cnt + 1'b1;
          end
        end
        default: begin  // the six sending states
          txen <= 1'b1;
          txd  <= cur_byte[2*dib +: 2];
          dib  <= dib + 1'b1;
          if (dib == 2'd3) begin
            if (state == S_MAC || state == S_IP || state == S_UDP || state == S_PAYLOAD)
              crc <= crc32_byte(crc, cur_byte);
            if (byte_idx == IDX_W'(FRAME_BYTES - 1)) begin
              state   <= S_IFG;
              ifg_cnt <= '0;
            end else begin
              byte_idx <= byte_idx + 1'b1;
              state    <= section(byte_idx + 1'b1);
            end
          end
        end
      endcase
    end
  end

  // The payload must make the frame at least 64 bytes long.
  if (PAYLOAD_BYTES < 18) begin : g_min_payload
    $error("udp_tx: PAYLOAD_BYTES must be at least 18");
  end

  // TX_EN never rises before power-up is over, and stays high within a frame.
  a_no_tx_in_power_up: assert property (@(posedge clk) disable iff (rst)
                                        state == S_POWER_UP |-> !txen);
  a_txen_in_frame: assert property (@(posedge clk) disable iff (rst)
                                    (sending && state != S_PREAMBLE) |-> txen);

endmodule
