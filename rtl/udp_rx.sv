// udp_rx: UDP/IPv4/Ethernet frame receiver on a 2-bit RMII interface.
//
// Di-bits arrive one per 50 MHz clock while rx_valid (CRS_DV) is high, least
// significant di-bit of each byte first. The receiver waits in IDLE for the
// first 2'b01 di-bit of the preamble, collects bytes, and moves on when the
// last eight bytes read 55 55 55 55 55 55 55 D5. It then stores the 14-byte
// MAC header, the 20-byte IPv4 header and the 8-byte UDP header, taking the
// payload length from the IP total length. While the UDP header is read the
// IP header checksum is checked; if it is wrong the payload is skipped, since
// a corrupt length could keep the receiver in the payload state for a long
// time. Payload bytes are shifted into the low end of a cleared register, so
// a payload of PAYLOAD_BYTES bytes ends with its first byte in the top bits
// and a shorter one sits right-aligned. The CRC-32 runs over MAC header to
// payload and is compared with the four received FCS bytes (least significant
// byte first).
//
// In the inter-frame gap state the frame is accepted only if the SFD, the
// EtherType (IPv4), version/IHL/TOS (0x4500), the IP checksum, the CRC, the
// source IP (PC_IP), the destination IP (FPGA_IP) and the destination UDP port
// (FPGA_PORT) are all right. Then payload_out is updated and pkt_valid pulses
// for one cycle; otherwise pkt_error pulses and payload_out keeps its value.
// The receiver returns to IDLE after rx_valid has been low for two cycles.
//
// Following the source design: the state sequence, the checks and where they
// are made, the payload skip on a bad checksum, right-aligned short payloads.
// Own choices: the pulse outputs, dropping a frame whose rx_valid falls early,
// skipping also on an IP length below 28 bytes.
module udp_rx
  import eth_pkg::*;
#(
  parameter int unsigned PAYLOAD_BYTES   = 548,
  parameter int unsigned POWER_UP_CYCLES = 8_000_000,
  parameter logic [31:0] FPGA_IP         = 32'h0,
  parameter logic [15:0] FPGA_PORT       = 16'd5000,
  parameter logic [31:0] PC_IP           = 32'h0
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         phy_rst_done,
  input  logic [1:0]                   rxd,
  input  logic                         rx_valid,
  output logic [PAYLOAD_BYTES*8-1:0]   payload_out,
  output logic                         pkt_valid,
  output logic                         pkt_error
);

  typedef enum logic [3:0] {
    S_POWER_UP, S_IDLE, S_PREAMBLE, S_MAC, S_IP, S_UDP, S_PAYLOAD, S_CRC, S_IFG
  } rx_state_e;

  localparam int unsigned PWR_W = $clog2(POWER_UP_CYCLES + 1);
  localparam logic [63:0] PREAMBLE_SFD = 64'h55_55_55_55_55_55_55_D5;

  rx_state_e                   state;
  logic [PWR_W-1:0]            pwr_cnt;
  logic [5:0]                  sh;          // partial byte, newest di-bit on top
  logic [1:0]                  dib;
  logic [15:0]                 cnt;         // bytes received in this section
  logic [63:0]                 pre;
  logic [MAC_BYTES*8-1:0]      mac_hdr;
  logic [IP_BYTES*8-1:0]       ip_hdr;
  logic [UDP_BYTES*8-1:0]      udp_hdr;
  logic [PAYLOAD_BYTES*8-1:0]  pay_sh;
  logic [31:0]                 crc_cal;
  logic [31:0]                 crc_rx;
  logic [15:0]                 pay_len;
  logic                        csum_ok;
  logic                        bad;         // frame skipped or cut short
  logic                        ifg_first;
  logic [1:0]                  idle_run;

  logic [7:0] byte_in;
  logic       byte_done;
  assign byte_in   = {rxd, sh};
  assign byte_done = rx_valid && (dib == 2'd3);

  // One's-complement sum of the ten IP header words; 0xFFFF when intact.
  logic [15:0] ip_sum;
  always_comb begin
    ip_sum = 16'h0000;
    for (int w = 0; w < IP_BYTES / 2; w++) ip_sum = ones_add(ip_sum, ip_hdr[w*16 +: 16]);
  end

  logic frame_ok;
  assign frame_ok = !bad
                 && pre == PREAMBLE_SFD
                 && mac_hdr[15:0] == ETHERTYPE_IPV4
                 && ip_hdr[159:144] == 16'h4500
                 && csum_ok
                 && ~crc_cal == crc_rx
                 && ip_hdr[63:32] == PC_IP
                 && ip_hdr[31:0]  == FPGA_IP
                 && udp_hdr[47:32] == FPGA_PORT;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_POWER_UP;
      pwr_cnt     <= '0;
      sh          <= '0;
      dib         <= '0;
      cnt         <= '0;
      pre         <= '0;
      mac_hdr     <= '0;
      ip_hdr      <= '0;
      udp_hdr     <= '0;
      pay_sh      <= '0;
      crc_cal     <= '1;
      crc_rx      <= '0;
      pay_len     <= '0;
      csum_ok     <= 1'b0;
      bad         <= 1'b0;
      ifg_first   <= 1'b0;
      idle_run    <= '0;
      payload_out <= '0;
      pkt_valid   <= 1'b0;
      pkt_error   <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      pkt_error <= 1'b0;
      if (rx_valid) begin
        sh  <= byte_in[7:2];
        dib <= dib + 1'b1;
      end

      unique case (state)
        S_POWER_UP: begin
          if (pwr_cnt == PWR_W'(POWER_UP_CYCLES)) state <= S_IDLE;
          else if (phy_rst_done)                  pwr_cnt <= pwr_cnt + 1'b1;
        end

        S_IDLE: begin
          dib <= '0;
          if (rx_valid && rxd == 2'b01) begin
            state   <= S_PREAMBLE;
            sh      <= byte_in[7:2];
            dib     <= 2'd1;
            pre     <= '0;
            pay_sh  <= '0;
            crc_cal <= '1;
            bad     <= 1'b0;
            cnt     <= '0;
          end
        end

        S_PREAMBLE: begin
          if (!rx_valid) begin
            state <= S_IDLE;
          end else if (byte_done) begin
            pre <= {pre[55:0], byte_in};
            if ({pre[55:0], byte_in} == PREAMBLE_SFD) begin
              state <= S_MAC;
              cnt   <= '0;
            end
          end
        end

        S_MAC, S_IP, S_UDP, S_PAYLOAD, S_CRC: begin
          if (!rx_valid) begin
            bad       <= 1'b1;           // cut short
            state     <= S_IFG;
            ifg_first <= 1'b1;
            idle_run  <= 2'd1;
          end else if (state == S_PAYLOAD && (!csum_ok || pay_len == 16'hFFFF)) begin
            bad       <= 1'b1;           // skip a payload of untrusted length
            state     <= S_IFG;
            ifg_first <= 1'b1;
            idle_run  <= '0;
          end else if (byte_done) begin
            cnt <= cnt + 1'b1;
            if (state != S_CRC) crc_cal <= crc32_byte(crc_cal, byte_in);
            unique case (state)
              S_MAC: begin
                mac_hdr <= {mac_hdr[MAC_BYTES*8-9:0], byte_in};
                if (cnt == 16'(MAC_BYTES - 1)) begin state <= S_IP; cnt <= '0; end
              end
              S_IP: begin
                ip_hdr <= {ip_hdr[IP_BYTES*8-9:0], byte_in};
                if (cnt == 16'(IP_BYTES - 1)) begin state <= S_UDP; cnt <= '0; end
              end
              S_UDP: begin
                udp_hdr <= {udp_hdr[UDP_BYTES*8-9:0], byte_in};
                if (cnt == 16'(UDP_BYTES - 1)) begin
                  cnt   <= '0;
                  state <= (pay_len == 16'd0 && csum_ok) ? S_CRC : S_PAYLOAD;
                end
              end
              S_PAYLOAD: begin
                pay_sh <= {pay_sh[PAYLOAD_BYTES*8-9:0], byte_in};
                if (cnt == pay_len - 1'b1) begin state <= S_CRC; cnt <= '0; end
              end
              default: begin  // S_CRC
                crc_rx <= {byte_in, crc_rx[31:8]};
                if (cnt == 16'(CRC_BYTES - 1)) begin
                  state     <= S_IFG;
                  ifg_first <= 1'b1;
                  idle_run  <= '0;
                end
              end
            endcase
          end
          // The IP header is complete during the UDP header: check it there.
          if (state == S_UDP) begin
            csum_ok <= (ip_sum == 16'hFFFF) && (ip_hdr[143:128] >= 16'(IP_BYTES + UDP_BYTES));
            pay_len <= (ip_hdr[143:128] >= 16'(IP_BYTES + UDP_BYTES))
                       ? ip_hdr[143:128] - 16'(IP_BYTES + UDP_BYTES) : 16'hFFFF;
          end
        end

        default: begin  // S_IFG
          ifg_first <= 1'b0;
          if (ifg_first) begin
            if (frame_ok) begin
              payload_out <= pay_sh;
              pkt_valid   <= 1'b1;
            end else begin
              pkt_error   <= 1'b1;
            end
          end
          idle_run <= rx_valid ? 2'd0 : (idle_run == 2'd2 ? 2'd2 : idle_run + 1'b1);
          if (!ifg_first && idle_run == 2'd2) begin
            state   <= S_IDLE;
            csum_ok <= 1'b0;
          end
        end
      endcase
    end
  end

  a_single_result: assert property (@(posedge clk) disable iff (rst) !(pkt_valid && pkt_error));

endmodule
