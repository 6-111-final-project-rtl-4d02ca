// eth_frame_pkg: reference model of the UDP/IPv4/Ethernet frames used by the
// testbenches. It builds complete frames (preamble to CRC) byte by byte and
// computes the CRC with the plain MSB-first shift register on bit-reversed
// data, a different formulation from the reflected one in the design, so the
// two check each other. The PC and FPGA addresses are arguments.
//
// The frame fields follow the original design and the Ethernet, IPv4 and UDP
// standards; the corruption options are this testbench's own.
package eth_frame_pkg;
  typedef byte unsigned bytes_t[$];

  function automatic logic [31:0] fcs(bytes_t b);
    logic [31:0] crc = 32'hFFFF_FFFF;
    logic [31:0] r;
    foreach (b[i]) begin
      for (int k = 0; k < 8; k++) begin
        logic top;
        top = crc[31] ^ b[i][k];
        crc = {crc[30:0], 1'b0};
        if (top) crc = crc ^ 32'h04C1_1DB7;
      end
    end
    for (int k = 0; k < 32; k++) r[k] = ~crc[31-k];
    return r;   // byte sent first = r[7:0]
  endfunction

  function automatic logic [15:0] ip_csum(bytes_t h);
    logic [31:0] s = 0;
    for (int i = 0; i < h.size(); i += 2) s += {h[i], h[i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  // Full frame. err: 0 none, 1 corrupt CRC, 2 corrupt IP checksum.
  function automatic bytes_t build(bytes_t payload, logic [31:0] src_ip, logic [31:0] dst_ip,
                                   logic [15:0] sport, logic [15:0] dport,
                                   logic [47:0] dmac, logic [47:0] smac, int err = 0);
    bytes_t f, body, iph;
    logic [15:0] iplen, udplen, cs;
    logic [31:0] c;
    iplen  = 16'(20 + 8 + payload.size());
    udplen = 16'(8 + payload.size());
    for (int i = 5; i >= 0; i--) body.push_back(dmac[i*8 +: 8]);
    for (int i = 5; i >= 0; i--) body.push_back(smac[i*8 +: 8]);
    body.push_back(8'h08); body.push_back(8'h00);
    iph = '{8'h45, 8'h00, iplen[15:8], iplen[7:0], 8'h00, 8'h00, 8'h00, 8'h00, 8'hFF, 8'h11, 8'h00, 8'h00,
            src_ip[31:24], src_ip[23:16], src_ip[15:8], src_ip[7:0],
            dst_ip[31:24], dst_ip[23:16], dst_ip[15:8], dst_ip[7:0]};
    cs = ip_csum(iph);
    if (err == 2) cs = cs ^ 16'h0100;
    iph[10] = cs[15:8]; iph[11] = cs[7:0];
    foreach (iph[i]) body.push_back(iph[i]);
    body.push_back(sport[15:8]); body.push_back(sport[7:0]);
    body.push_back(dport[15:8]); body.push_back(dport[7:0]);
    body.push_back(udplen[15:8]); body.push_back(udplen[7:0]);
    body.push_back(8'h00); body.push_back(8'h00);
    foreach (payload[i]) body.push_back(payload[i]);
    c = fcs(body);
    if (err == 1) c = c ^ 32'h0000_0010;
    for (int i = 0; i < 7; i++) f.push_back(8'h55);
    f.push_back(8'hD5);
    foreach (body[i]) f.push_back(body[i]);
    for (int i = 0; i < 4; i++) f.push_back(c[i*8 +: 8]);
    return f;
  endfunction
endpackage
