# Internet-controlled robot: two FPGA boards joined over UDP

A small wheeled robot carries an FPGA board with a camera, an ultrasonic distance sensor and two
DC motors. A second FPGA board, the controller, has five push buttons and a VGA monitor. The two
boards never talk to each other directly. Each is plugged into a PC by 100 Mbit/s Ethernet, and
the PCs forward UDP datagrams to each other through a relay server on the internet. Each board
therefore only has to send and receive UDP/IPv4 frames to and from its own PC.

- The robot streams what it sees: one distance reading and 150 camera pixels in every packet.
- The controller streams the button state as a motor command.
- The controller draws the camera picture and the distance on a 1024x768 screen.
- The robot turns each command it receives into motor-driver levels.

All of the logic is plain RTL. There is no soft processor, no vendor Ethernet MAC and no
TCP/IP stack. Each board builds whole Ethernet frames, with headers and CRC, in a state machine
and sends them two bits per clock to the PHY chip.

The SystemVerilog is in `rtl/`, with one module or package per file. The testbenches and the
behavioural models of the parts outside the FPGA are in `tb/`.

## The link, bit by bit

### Wire format

The PHY (a LAN8720A) uses RMII: a 50 MHz clock, two data bits per clock in each direction, and
one enable or valid line. A byte takes four clocks and goes out **least-significant di-bit first**.
So byte `0xD5` goes out as the di-bits `01 01 01 11`. Every frame sent or received has this layout:

| bytes | field | content |
|---|---|---|
| 8 | preamble + SFD | `55 55 55 55 55 55 55 D5` |
| 14 | MAC header | destination `ff:ff:ff:ff:ff:ff`, source `aa:de:ad:be:ef:aa`, type `0x0800` |
| 20 | IPv4 header | `45 00`, total length, id 0, flags 0, TTL `ff`, protocol UDP, header checksum, source IP, destination IP |
| 8 | UDP header | source port, destination port, length, checksum 0 (unused) |
| N | payload | 548 bytes from a board; any length up to 548 towards a board |
| 4 | FCS | CRC-32 of MAC header..payload, least significant byte first |

- Multi-byte fields are big-endian.
- The CRC is the usual Ethernet CRC-32. The design computes it in the reflected form: polynomial
  `0xEDB88320`, start value all ones, inverted at the end. The testbenches check it against an
  independent MSB-first implementation.
- The IPv4 header checksum is fixed, because no header field changes. `udp_tx` works it out when
  the design is elaborated.

### Addresses and ports

| | robot | controller |
|---|---|---|
| board IP | 169.254.255.255 | 169.254.255.255 |
| its PC's IP | 169.254.70.191 | 169.254.63.159 |
| board UDP port | 5001 | 5001 |
| PC port for set-up messages | 5003 | 5003 |
| PC port for data | 1024 | 1024 |

### What the receiver accepts

`udp_rx` accepts a frame only if all of these hold:

- the SFD is seen;
- the EtherType is IPv4 and the version/IHL byte is `0x45`;
- the IP header checksum is right;
- the CRC is right;
- the source IP is this board's PC;
- the destination IP is the board;
- the destination port is 5001.

The receiver checks the IP header checksum while the UDP header is still arriving. If the
checksum or the IP length is wrong, it skips the payload instead of trusting that length.

An accepted payload is shifted into the low end of a cleared 548-byte register:

- a full-size payload lands with its first byte on top;
- a short one, such as the 23-character set-up replies, sits right-aligned in the low bytes.

The register keeps its old value when a frame is rejected. One of two pulses reports the result
of each frame: `pkt_valid` or `pkt_error`.

### Transmitter pacing

`udp_tx` sends one fixed-length frame per request. It follows the frame with a gap of
`IFG_BYTES` byte times: 250 on the boards (1000 clocks), where the Ethernet minimum is 12. The
long gap is there because some PCs drop frames that arrive back to back.

`tx_busy` is combinational, so the requester sees busy in the same cycle it raises
`input_valid`. That lets the connection state machine issue a request every time busy is low
without a one-cycle race.

At 548 bytes, one frame plus its gap is 3408 clocks. With the two clocks the transmitter needs to
return to idle and take the next request, the robot sends one packet every 3410 clocks (68.2 µs).
That is about 14,660 packets/s, or 2.2 Mpixel/s of camera data.

### Power-up

`phy_init` holds the PHY in reset for 5,000,000 clocks (100 ms). While it is in reset, the
design drives the PHY's mode-strap pins:

- `CRS_DV` = 0;
- `RXD` = `11`;
- `RXER` = 0;
- `INTN` = 1.

The straps are released 400 clocks after the reset ends. The receiver then waits another
8,000,000 clocks, and the transmitter another 5,000,400, before they start work.

## Connection protocol (`link_fsm`)

Each board runs the same state machine. The state code goes to the hex display and LEDs.

| code | state | action |
|---|---|---|
| 0 | START_RX | request the message `"FPGA RX INIT"` to port 5003 |
| 2 | SEND_RX | wait until the transmitter is free |
| 4 | RECEIVE_RX | wait for `"PC to FPGA RX CONNECTED"`; after `TIME_OUT` clocks (5,000,000 = 100 ms) go back to 0 |
| 1 | START_TX | request `"FPGA TX INIT"` to port 1024 |
| 3 | SEND_TX | wait until the transmitter is free |
| 5 | RECEIVE_TX | wait for `"PC to FPGA TX CONNECTED"`; after `TIME_OUT` clocks go back to 1 |
| 7 | NORMAL | send a data payload to port 1024 each time the transmitter is free and data is ready |
| 8 | END | reached when the received payload is `"STOP"`; stays there until reset |

- Messages are ASCII, right-aligned in the payload: the last character is in the lowest byte.
- The retry on timeout is what recovers from a lost set-up datagram.
- On the robot, switch 0 makes the board send `"STOP"` instead of sensor data. The relay passes
  it on, and it ends the controller's link.

## Payloads

**Command payload** (controller to robot): bits [2:0] carry the command and all other bits are
zero.

| code | command | left motor | right motor |
|---|---|---|---|
| 0 | stop | off | off |
| 1 | forward | forward | forward |
| 2 | backward | backward | backward |
| 3 | right | forward | off |
| 4 | left | off | forward |

**Sensor payload** (robot to controller), 4384 bits, every bit used:

| bits | content |
|---|---|
| [33:0] | distance (10 significant bits) |
| [34+29k +: 17] | address of pixel k in the 320x240 picture, k = 0..149 |
| [51+29k +: 12] | RGB444 colour of pixel k |

## Robot board (`robot_top`)

```
camera ─ camera_read ─> frame buffer (dual_port_ram, 76800 x 12, pixel clock ─> 50 MHz)
                                       │
HC-SR04 ─ distance_sensor ─────────> pixel_packer ─> link_fsm ─> udp_tx ─> PHY
PHY ─> udp_rx ─> link_fsm (set-up replies, STOP)
              └─> command register ─> motor_control ─> L9110 motor driver
```

**Camera path**

- `camera_read` assembles two camera bytes into an RGB565 pixel, high byte first, while `href`
  is high. `vsync` marks frame boundaries.
- The frame buffer keeps the top 4 bits of each colour (RGB444) at consecutive addresses. The
  address restarts at each frame.

**Packing**

- `pixel_packer` walks the frame buffer address by address and fills the 150 records of a
  payload.
- The address goes out one clock before the data returns, so the address and colour of a record
  always belong together.
- The distance is sampled at the first record.
- When a payload is full, the packer stops and waits until the link takes it. This **stall** is
  the normal case: filling takes about 150 clocks and sending takes 3410.
- Successive packets carry successive addresses, so the whole picture is sent every 512 packets
  (about 35 ms).

**Distance**

`distance_sensor` runs this cycle:

1. Wait 40 ms.
2. Raise the trigger for 10 µs.
3. Count the microseconds the echo stays high.
4. Divide by 148 (inches, the default) or 58 (cm) by repeated subtraction.
5. Publish the result.

If no complete echo arrives within 40 ms, it triggers again.

**Motors**

The robot takes the command bits only from accepted frames that arrive in NORMAL. Outside NORMAL
the command is forced to stop. `motor_control` is a combinational truth table to the four
driver inputs `{left A, left B, right A, right B}`: forward is `10` and backward is `01`.

## Controller board (`controller_top`)

**Buttons**

- Four `debounce` instances clean the buttons at 100 MHz. Each needs 1,000,000 stable clocks,
  which is 10 ms.
- `button_command` resynchronises the buttons to 50 MHz and encodes them with the priority
  up > down > right > left. No button gives stop.
- The link sends a command payload every time the transmitter is free.
- The centre button resets the board.

**Display** (`vga_display`, pixel clock 65 MHz)

- `xvga` generates 1024x768 timing: horizontal 1024/24/136/160 and vertical 768/3/6/29.
- `number_display` shows the received distance:
  - `digit_counter` turns the binary value into three decimal digits by counting up to it
    (capped at 999). It publishes the digits every 1000 clocks.
  - Three `picture_number` instances draw the digits as 48x48 pictures at (700,50), (750,50)
    and (800,50).
  - Each picture reads `digit_rom` at address `2304*digit + x + 48*y`.
- `pixel_unpacker` goes round the 150 records of the last received payload, one per 50 MHz
  clock. It writes each colour into the controller's own 320x240 picture memory, which has a
  separate read port at 65 MHz.
- `camera_display` reads that memory at `320*hcount + vcount`. The camera is mounted on its
  side, so the picture is turned by 90 degrees on screen: it occupies 240 columns by 320 rows
  at the top left. In double mode both coordinates are halved first, so every stored pixel
  covers 2x2 screen pixels (480 x 640).
- Switches `sw[1:0]` choose what is shown: `00` nothing, `01` digits, `10` camera, `11` both.
  `sw[2]` selects double size.

**Display timing**: the picture paths take two clocks from `hcount`/`vcount` to a pixel. The
mode multiplexer adds one more. The sync and blank signals are delayed by three clocks to match.
The sync outputs are active low.

## Clock domains

| clock | where | crossing |
|---|---|---|
| 50 MHz | Ethernet, link, packer, sensor, motors (both boards) | — |
| camera pixel clock | `camera_read`, frame buffer write | the frame buffer is the crossing; the reset is synchronised with two flops |
| 100 MHz | controller debouncers | two-flop synchroniser in `button_command` |
| 65 MHz | VGA timing, digits, picture memory read | the picture memory is the crossing; distance digits are sampled from a slowly changing register |

The camera clock `cam_xclk` is the 50 MHz clock divided by two.

## Parameters

The defaults are the real values. The testbenches lower some of them through the board and top
parameters, to keep simulations short.

| parameter | default | meaning |
|---|---|---|
| `PAYLOAD_BYTES` | 548 | UDP payload length of every frame a board sends |
| `IFG_BYTES` | 250 (boards), 12 (`udp_tx` alone) | gap after each frame |
| `PHY_RESET_CYCLES` | 5,000,000 | PHY reset length; straps held 400 clocks longer |
| `RX_POWER_UP_CYCLES` | 8,000,000 | receiver wait after PHY start-up |
| `TX_POWER_UP_CYCLES` | 5,000,400 | transmitter wait after PHY start-up |
| `TIME_OUT` | 5,000,000 | set-up message retry time |
| `DEBOUNCE_COUNT` | 1,000,000 | stable clocks needed at 100 MHz |
| `SENSOR_PERIOD_US` | 40,000 | sonar period; also the echo timeout |
| `PIXELS` | 150 | pixel records per payload |
| `REFRESH` | 1000 | digit counter period |

## Departures and choices

These points differ from the original project, or fill in what it left open:

- **Picture window.** The original address formula `320*hcount + vcount` only stays inside a
  320x240 memory if the window is 240 columns wide and 320 rows high. That is the window used
  here. The original's description calls it 320x240 in screen terms.
- **Double size.** Plain halving of both coordinates. The original used a per-quadrant address
  correction that is not needed when the read address is computed combinationally.
- **Digit counter.** It republishes the digits every 1000 clocks, so a new distance always
  shows. A version that stops after its first count would freeze the first reading.
- **Packer.** It pipelines the frame-buffer address so that addresses and colours cannot slip
  by one. It also stalls while a full payload waits.
- **Receiver start.** The receiver starts on the first `01` di-bit of the preamble, which is
  `0x55` sent LSB first. It then requires all eight preamble and SFD bytes.
- **Digit pictures.** The original loaded hand-drawn glyph images. `digit_rom` computes
  seven-segment shaped glyphs of the same size and address layout instead.
- **Set-up state.** A state of the original link machine that is declared but never entered
  (board to board) is left out.
- **Motor decode.** Motor control is a combinational decode, not a clocked machine.
- **Picture memory during set-up.** The controller's picture memory is written from whatever
  payload was last received. During set-up that is a set-up string, which writes a few stray
  pixels near address 0. They are overwritten as soon as sensor packets arrive.

## Not built

These parts are outside the FPGA logic. Their signals are ports of the tops:

- the 50/65 MHz clock generator (a vendor clocking block);
- the Ethernet PHY chip;
- the camera and the small microcontroller that configures it over I2C;
- the ultrasonic sensor;
- the motor driver;
- the PC and relay-server software.

`tb/` has behavioural models of the PC/relay, the camera and the sonar for simulation.

## Files

| file | role |
|---|---|
| `rtl/eth_pkg.sv` | frame constants, command codes, CRC-32 and one's-complement helpers |
| `rtl/udp_tx.sv`, `rtl/udp_rx.sv` | frame transmitter and receiver |
| `rtl/phy_init.sv` | PHY reset and strap sequencing |
| `rtl/link_fsm.sv` | connection state machine |
| `rtl/camera_read.sv`, `rtl/dual_port_ram.sv`, `rtl/pixel_packer.sv` | robot camera path |
| `rtl/distance_sensor.sv`, `rtl/motor_control.sv` | sonar and motors |
| `rtl/debounce.sv`, `rtl/button_command.sv` | controller buttons |
| `rtl/xvga.sv`, `rtl/digit_counter.sv`, `rtl/digit_rom.sv`, `rtl/picture_number.sv`, `rtl/number_display.sv` | screen timing and digits |
| `rtl/pixel_unpacker.sv`, `rtl/camera_display.sv`, `rtl/vga_display.sv` | screen picture path |
| `rtl/display_8hex.sv` | eight-digit seven-segment display on both boards |
| `rtl/robot_top.sv`, `rtl/controller_top.sv` | the two boards |
| `rtl/internet_robot_top.sv` | both boards side by side, every pin brought out with a `robot_` or `ctrl_` prefix |

## Simulation

Every block has a self-checking testbench `tb/<block>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, list the packages first
and let `-y` find the rest:

```
verilator --binary --timing --assert -y rtl -y tb --top-module udp_rx_tb \
    rtl/eth_pkg.sv tb/eth_frame_pkg.sv tb/glyph_ref_pkg.sv tb/udp_rx_tb.sv
obj_dir/Vudp_rx_tb
```

### Shared test code

- `eth_frame_pkg` builds reference frames. It can corrupt the CRC or the IP checksum.
- `glyph_ref_pkg` gives the expected digit segments.
- `pc_link_model` decodes a board's frames, answers the set-up messages, relays data to the
  other board's model, and can inject frames.
- `ov7670_model` and `hc_sr04_model` stand in for the camera and the sonar.

### End-to-end tests

**`internet_robot_top_tb`** runs both boards with short power-up, timeout, debounce and sonar
period. It takes about 4 million clocks, or 15 s. It makes every mechanism happen and counts
each one:

- the set-up timeout and retry (the robot's PC ignores the first RX init);
- connection of both boards;
- sensor packets with intact camera pixels;
- packer stalls;
- a dropped bad-CRC frame;
- sonar readings;
- debounced buttons;
- three motor directions;
- the screen in normal and double size, checked on the VGA pins;
- STOP ending both links.

**`internet_robot_top_full_tb`** runs the same path at the real parameters. It covers power-up,
connection, one button press reaching the motors, the distance reaching the screen, and STOP.
This takes about 15.5 million clocks, under a minute of simulation.

**`picture_transfer_tb`** sends one whole 320x240 picture, at full camera size, from the
robot to the controller's picture memory. It checks these points:

- every one of the 76,800 addresses arrives with the right colour;
- the picture takes 512 packets;
- the controller's memory then matches the camera word for word;
- the robot sends one packet every 3410 clocks.

It runs about 2.4 million clocks, under 10 s.

### Not covered by simulation

- Real PHY timing, such as the PHY's own receive delay.
- The PC software, beyond the model.
