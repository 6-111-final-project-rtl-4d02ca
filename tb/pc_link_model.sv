// pc_link_model: behavioural model of one board's PC and the internet
// relay behind it (not synthesizable). It watches the board's RMII transmit
// pins, decodes each frame and checks its CRC, addresses and ports against
// the reference model. It answers "FPGA RX INIT" (port 5003) with
// "PC to FPGA RX CONNECTED" and "FPGA TX INIT" (port 1024) with
// "PC to FPGA TX CONNECTED", both sent to the board's port 5001 after
// REPLY_DELAY clocks; the first DROP_RX_INITS RX init messages go
// unanswered so that the board has to time out and retry. Every other
// payload to port 1024 leaves on relay_out (one-clock relay_valid) for the
// model of the other board's PC, and every relay_in is sent to this board
// as a 548-byte payload. The test can also queue its own payloads with
// send_payload (optionally with a corrupt CRC).
//
// The set-up replies and ports follow the original design; the relay delay
// and the gap between frames are this model's own.
module pc_link_model
  import eth_frame_pkg::*;
#(
  parameter logic [31:0] PC_IP         = 32'h0,
  parameter logic [31:0] FPGA_IP       = {8'd169, 8'd254, 8'd255, 8'd255},
  parameter int          DROP_RX_INITS = 0,
  parameter int          REPLY_DELAY   = 300
) (
  input  logic             clk,
  input  logic             fpga_txen,
  input  logic [1:0]       fpga_txd,
  output logic [1:0]       fpga_rxd,
  output logic             fpga_crsdv,
  output logic [548*8-1:0] relay_out,
  output logic             relay_valid,
  input  logic [548*8-1:0] relay_in,
  input  logic             relay_in_valid
);
  localparam logic [47:0] FPGA_MAC = 48'hAADE_ADBE_EFAA;
  localparam logic [47:0] PC_MAC   = 48'hFFFF_FFFF_FFFF;

  // Counters read by the test.
  int frames_in = 0, bad_in = 0, rx_inits = 0, tx_inits = 0, data_in = 0, stops_in = 0;
  int frames_out = 0;
  logic [548*8-1:0] last_data = '0;

  typedef struct { int due; bytes_t f; } pending_t;
  pending_t out_q[$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic bit ends_with(input bytes_t p, input string s);
    if (p.size() < s.len()) return 0;
    for (int i = 0; i < s.len(); i++) if (p[p.size() - s.len() + i] != s[i]) return 0;
    for (int i = 0; i < p.size() - s.len(); i++) if (p[i] != 0) return 0;
    return 1;
  endfunction

  function automatic bytes_t str_bytes(input string s);
    bytes_t q;
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
    return q;
  endfunction

  task automatic send_payload(input bytes_t p, input int err = 0, input int delay = 0);
    out_q.push_back('{cyc + delay, build(p, PC_IP, FPGA_IP, 16'd7000, 16'd5001, FPGA_MAC, PC_MAC, err)});
  endtask

  // Receive side (board -> PC).
  bytes_t got, body, pay;
  byte unsigned b;
  int d;
  logic [31:0] c_rx;
  initial begin
    relay_valid = 0; relay_out = '0;
    forever begin
      @(posedge clk);
      if (fpga_txen) begin
        got = {}; d = 0; b = 0;
        while (fpga_txen) begin
          b = {fpga_txd, b[7:2]}; d++;
          if (d == 4) begin got.push_back(b); d = 0; end
          @(posedge clk);
        end
        // A TX_EN blip shorter than a preamble (register start-up values
        // before the board's reset acts) is not a frame.
        if (got.size() < 8) continue;
        frames_in++;
        if (got.size() < 54) begin
          bad_in++;
          $display("pc_link_model %h: runt frame from the board (%0d bytes)", PC_IP, got.size());
          continue;
        end
        body = got[8 : got.size() - 5];
        c_rx = {got[got.size() - 1], got[got.size() - 2], got[got.size() - 3], got[got.size() - 4]};
        if (got[7] != 8'hD5 || fcs(body) != c_rx ||
            {body[26], body[27], body[28], body[29]} != FPGA_IP ||
            {body[30], body[31], body[32], body[33]} != PC_IP ||
            {body[34], body[35]} != 16'd5001 || ip_csum(body[14:33]) != 16'h0000) begin
          bad_in++;
          $display("pc_link_model %h: bad frame from the board (%0d bytes)", PC_IP, got.size());
        end else begin
          pay = body[42 : body.size() - 1];
          if (ends_with(pay, "FPGA RX INIT") && {body[36], body[37]} == 16'd5003) begin
            rx_inits++;
            if (rx_inits > DROP_RX_INITS) send_payload(str_bytes("PC to FPGA RX CONNECTED"), 0, REPLY_DELAY);
          end else if (ends_with(pay, "FPGA TX INIT") && {body[36], body[37]} == 16'd1024) begin
            tx_inits++;
            send_payload(str_bytes("PC to FPGA TX CONNECTED"), 0, REPLY_DELAY);
          end else if ({body[36], body[37]} == 16'd1024 && pay.size() == 548) begin
            data_in++;
            if (ends_with(pay, "STOP")) stops_in++;
            foreach (pay[i]) relay_out[(547 - i) * 8 +: 8] = pay[i];
            last_data = relay_out;
            relay_valid <= 1'b1;
            @(posedge clk);
            relay_valid <= 1'b0;
          end
        end
      end
    end
  end

  // Relay from the other PC.
  always @(posedge clk) begin
    if (relay_in_valid) begin
      bytes_t p;
      p = {};
      for (int i = 547; i >= 0; i--) p.push_back(relay_in[i * 8 +: 8]);
      send_payload(p, 0, REPLY_DELAY);
    end
  end

  // Transmit side (PC -> board), 12-byte minimum gap.
  bytes_t f;
  initial begin
    fpga_rxd = 0; fpga_crsdv = 0;
    forever begin
      @(negedge clk);
      if (out_q.size() != 0 && out_q[0].due <= cyc) begin
        f = out_q[0].f;
        void'(out_q.pop_front());
        foreach (f[i])
          for (int k = 0; k < 4; k++) begin
            fpga_crsdv = 1; fpga_rxd = f[i][2*k +: 2];
            @(negedge clk);
          end
        fpga_crsdv = 0; fpga_rxd = 0;
        frames_out++;
        repeat (48) @(negedge clk);
      end
    end
  end
endmodule
