// roic_top - SEU-tolerant readout controller (ROIC) for an SRAM-based
// neutron detector.
//
// The detector is an SRAM programmed with zeroes; neutron-induced upsets turn
// some bits to one. Periodically the controller reads the whole memory,
// counts the bits that differ from the reference, rewrites upset words,
// reads a temperature sensor and a RadFET dose sensor over serial links and
// sends a CRC-protected datagram with the results to the host on TxD.
// Every control state machine keeps its Gray-coded state in a Hamming
// SEC-DED protected register: single upsets in those registers are corrected
// on the fly and flagged on SingleError; double upsets are flagged on
// DoubleError and restart all state machines (system refresh).
//
// Blocks: readout_ctrl (memory pass), two sensor_spi (Temp, RadFET),
// datagram_tx with crc16, uart_tx (TxD), seu_error_monitor. The SRAM and
// the sensors are outside this module; their signals are ports.
//
// The seu_inj_* ports model particle strikes in the five protected state
// registers for verification (XORed into the stored code word); a chip ties
// them to zero.
//
// The block structure and the three outputs TxD, SingleError and DoubleError
// follow the design description; interface timing, widths, clock dividers
// and the datagram format are this design's own choices.
//
// Lint note: Verilator reports rst_n as used both synchronously and
// asynchronously; the synchronous use is only the 'disable iff' of the
// assertions at the end of this module, not a circuit path.
module roic_top
  import roic_pkg::*;
#(
  parameter int          ADDR_W   = 10,
  parameter int          DATA_W   = 8,
  parameter int unsigned PERIOD   = 1_000_000,
  parameter int          BAUD_DIV = 87,
  parameter int          SCLK_DIV = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // detector SRAM
  output logic [ADDR_W-1:0]     sram_addr,
  output logic [DATA_W-1:0]     sram_wdata,
  input  logic [DATA_W-1:0]     sram_rdata,
  output logic                  sram_oe,
  output logic                  sram_we,
  // temperature sensor
  output logic                  temp_sclk,
  output logic                  temp_cs_n,
  input  logic                  temp_miso,
  // RadFET sensor
  output logic                  rad_sclk,
  output logic                  rad_cs_n,
  input  logic                  rad_miso,
  // host link and error pins
  output logic                  txd,
  output logic                  single_error,
  output logic                  double_error,
  // particle strike model (verification only)
  input  logic [ham_n($bits(rd_state_e))-1:0] seu_inj_readout,
  input  logic [ham_n($bits(sp_state_t))-1:0] seu_inj_temp,
  input  logic [ham_n($bits(sp_state_t))-1:0] seu_inj_rad,
  input  logic [ham_n($bits(dg_state_t))-1:0] seu_inj_dgram,
  input  logic [ham_n($bits(ut_state_t))-1:0] seu_inj_uart
);

  localparam int NFSM = 5;

  logic                 refresh;
  logic [NFSM-1:0]      sgl, dbl;
  logic                 sens_start, temp_done, rad_done;
  logic                 dg_start, dg_done;
  logic [SEU_CNT_W-1:0] seu_count;
  logic [SENS_W-1:0]    temp_value, rad_value;
  logic [ERR_CNT_W-1:0] sec_count, ded_count;
  logic                 tx_start, tx_done, tx_ready;
  logic [7:0]           tx_data;
  logic                 pass_active, temp_busy, rad_busy, dg_busy;

  readout_ctrl #(
    .ADDR_W (ADDR_W),
    .DATA_W (DATA_W),
    .PERIOD (PERIOD)
  ) u_readout (
    .clk         (clk),
    .rst_n       (rst_n),
    .refresh     (refresh),
    .sram_addr   (sram_addr),
    .sram_wdata  (sram_wdata),
    .sram_rdata  (sram_rdata),
    .sram_oe     (sram_oe),
    .sram_we     (sram_we),
    .sens_start  (sens_start),
    .temp_done   (temp_done),
    .rad_done    (rad_done),
    .dg_start    (dg_start),
    .dg_done     (dg_done),
    .seu_count   (seu_count),
    .pass_active (pass_active),
    .seu_inject  (seu_inj_readout),
    .single_err  (sgl[0]),
    .double_err  (dbl[0])
  );

  sensor_spi #(.SCLK_DIV(SCLK_DIV)) u_temp (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .start      (sens_start),
    .busy       (temp_busy),
    .done       (temp_done),
    .value      (temp_value),
    .sclk       (temp_sclk),
    .cs_n       (temp_cs_n),
    .miso       (temp_miso),
    .seu_inject (seu_inj_temp),
    .single_err (sgl[1]),
    .double_err (dbl[1])
  );

  sensor_spi #(.SCLK_DIV(SCLK_DIV)) u_rad (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .start      (sens_start),
    .busy       (rad_busy),
    .done       (rad_done),
    .value      (rad_value),
    .sclk       (rad_sclk),
    .cs_n       (rad_cs_n),
    .miso       (rad_miso),
    .seu_inject (seu_inj_rad),
    .single_err (sgl[2]),
    .double_err (dbl[2])
  );

  datagram_tx u_dgram (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .start      (dg_start),
    .seu_count  (seu_count),
    .temp_value (temp_value),
    .rad_value  (rad_value),
    .sec_count  (sec_count),
    .ded_count  (ded_count),
    .busy       (dg_busy),
    .done       (dg_done),
    .tx_start   (tx_start),
    .tx_data    (tx_data),
    .tx_done    (tx_done),
    .seu_inject (seu_inj_dgram),
    .single_err (sgl[3]),
    .double_err (dbl[3])
  );

  uart_tx #(.BAUD_DIV(BAUD_DIV)) u_uart (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .start      (tx_start),
    .data       (tx_data),
    .ready      (tx_ready),
    .done       (tx_done),
    .txd        (txd),
    .seu_inject (seu_inj_uart),
    .single_err (sgl[4]),
    .double_err (dbl[4])
  );

  seu_error_monitor #(.NFSM(NFSM)) u_mon (
    .clk          (clk),
    .rst_n        (rst_n),
    .single_in    (sgl),
    .double_in    (dbl),
    .single_error (single_error),
    .double_error (double_error),
    .refresh      (refresh),
    .sec_count    (sec_count),
    .ded_count    (ded_count)
  );

`ifndef SYNTHESIS
  // the datagram sender only starts a byte when the transmitter is idle
  a_tx_handshake: assert property (@(posedge clk) disable iff (!rst_n)
    tx_start |-> tx_ready);
  // sensor reads and datagrams are only started when their block is idle
  a_sens_idle: assert property (@(posedge clk) disable iff (!rst_n)
    sens_start |-> !temp_busy && !rad_busy);
  a_dg_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dg_start |-> !dg_busy && pass_active);
  // the SRAM is never read and written in the same cycle
  a_sram_rw: assert property (@(posedge clk) disable iff (!rst_n)
    !(sram_oe && sram_we));
`endif

endmodule
