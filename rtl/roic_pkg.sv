// roic_pkg - shared types, constants and functions of the SEU-tolerant
// readout controller for an SRAM-based neutron detector.
//
// Every control state machine in the design keeps its state in a register
// protected by an extended Hamming code (single error correction, double
// error detection, "SEC-DED"). The helpers below size and compute that code
// for any state width K:
//   ham_r(K)  number of Hamming check bits R (smallest R with 2**R >= K+R+1)
//   ham_n(K)  code word width N = K + R + 1 (the extra bit is overall parity)
//   ham_encode(data, K)  code word; bit 0 is overall parity, bit 2**i is
//             check bit i, the data bits fill the other positions in order.
// The state values themselves are Gray codes, assigned so that the usual
// successor of a state differs from it in one bit; that choice of encoding
// follows the design description, the concrete code values are this
// design's own.
package roic_pkg;

  function automatic int ham_r(input int k);
    int r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  function automatic int ham_n(input int k);
    return k + ham_r(k) + 1;
  endfunction

  // Largest code word the helpers handle (K up to 57).
  localparam int HAM_MAX = 64;

  function automatic logic [HAM_MAX-1:0] ham_encode(input logic [HAM_MAX-1:0] data,
                                                   input int k);
    logic [HAM_MAX-1:0] c;
    int n;
    int d;
    n = ham_n(k);
    c = '0;
    d = 0;
    // data bits into the positions that are not powers of two
    for (int p = 1; p < HAM_MAX; p++) begin
      if (p < n && (p & (p - 1)) != 0) begin
        c[p] = data[d];
        d++;
      end
    end
    // check bit i covers every position whose index has bit i set
    for (int i = 0; i < 6; i++) begin
      if ((1 << i) < n) begin
        logic par;
        par = 1'b0;
        for (int p = 1; p < HAM_MAX; p++)
          if (p < n && ((p >> i) & 1) == 1 && (p & (p - 1)) != 0) par ^= c[p];
        c[1 << i] = par;
      end
    end
    // overall parity makes the whole word even
    c[0] = ^c;
    return c;
  endfunction

  // ---------------------------------------------------------------------
  // Main readout state machine (4-bit Gray-coded state)
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    RD_IDLE       = 4'b0000,  // wait for the measurement period timer
    RD_READ       = 4'b0001,  // address on the bus, SRAM read access
    RD_SAMPLE     = 4'b0011,  // compare read word with reference, count
    RD_REPROG     = 4'b0010,  // write the reference pattern back
    RD_ADVANCE    = 4'b0110,  // next address or end of the pass
    RD_SENSE_GO   = 4'b0111,  // start both sensor reads
    RD_SENSE_WAIT = 4'b0101,  // wait until both sensors answered
    RD_SEND_GO    = 4'b0100,  // start the datagram
    RD_SEND_WAIT  = 4'b1100   // wait until the datagram is sent
  } rd_state_e;

  // ---------------------------------------------------------------------
  // Datagram sender: 2-bit Gray phase plus a 4-bit byte index
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    DG_IDLE = 2'b00,
    DG_LOAD = 2'b01,  // hand the current byte to the serial transmitter
    DG_WAIT = 2'b11   // wait until the transmitter has sent it
  } dg_phase_e;

  typedef struct packed {
    dg_phase_e  phase;
    logic [3:0] idx;
  } dg_state_t;

  // Datagram layout (bytes, sent in this order):
  //   0      sync byte DG_SYNC
  //   1..3   SEU count of the last pass, most significant byte first
  //   4..5   temperature sensor word
  //   6..7   RadFET sensor word
  //   8      corrected single-error events in the control FSMs (mod 256)
  //   9      detected double-error events (mod 256)
  //   10..11 CRC-16/CCITT (poly 0x1021, init 0xFFFF) over bytes 0..9
  localparam logic [7:0] DG_SYNC      = 8'hA5;
  localparam int         DG_PAYLOAD   = 10;
  localparam int         DG_BYTES     = 12;
  localparam int         SEU_CNT_W    = 24;
  localparam int         SENS_W       = 16;
  localparam int         ERR_CNT_W    = 8;
  localparam logic [15:0] CRC_POLY    = 16'h1021;
  localparam logic [15:0] CRC_INIT    = 16'hFFFF;

  // ---------------------------------------------------------------------
  // Serial transmitter: busy flag plus a 4-bit frame bit index
  // ---------------------------------------------------------------------
  typedef enum logic {
    UT_IDLE = 1'b0,
    UT_SEND = 1'b1
  } ut_phase_e;

  typedef struct packed {
    ut_phase_e  phase;
    logic [3:0] bit_idx;  // 0 start bit, 1..8 data (LSB first), 9 stop bit
  } ut_state_t;

  // ---------------------------------------------------------------------
  // Sensor serial reader: 2-bit Gray phase plus a 5-bit bit counter
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    SP_IDLE  = 2'b00,
    SP_SETUP = 2'b01,  // chip select active, clock low, before first edge
    SP_HIGH  = 2'b11,  // clock high half period
    SP_LOW   = 2'b10   // clock low half period
  } sp_phase_e;

  typedef struct packed {
    sp_phase_e  phase;
    logic [4:0] bit_cnt;
  } sp_state_t;

  // CRC-16/CCITT update with one byte, most significant bit first
  function automatic logic [15:0] crc16_byte(input logic [15:0] crc, input logic [7:0] b);
    logic [15:0] c;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (c[15] ^ b[i]) c = (c << 1) ^ CRC_POLY;
      else              c = c << 1;
    end
    return c;
  endfunction

endpackage
