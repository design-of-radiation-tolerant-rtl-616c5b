// readout_ctrl - main state machine of the readout system.
//
// A measurement pass starts when the period timer expires (right after reset
// or a system refresh, then every PERIOD cycles). The controller walks the
// detector SRAM from address 0 to 2**ADDR_W - 1. For each word it drives the
// address with sram_oe high for two cycles (RD_READ, RD_SAMPLE), compares
// the word read at the end of RD_SAMPLE with the reference pattern REF_WORD
// (the detector is programmed with zeroes) and adds the number of differing
// bits to the SEU counter. A word that differs is written back with the
// reference pattern in the next cycle (RD_REPROG, sram_we high), so the
// memory is ready for the next exposure. A word costs 3 cycles, 4 if it is
// reprogrammed. After the last word both sensors are read, then the
// datagram is sent; the SEU count stays on 'seu_count' until the next pass.
//
// Interfaces: SRAM with registered address, combinational read data sampled
// one cycle after the address is driven, write on sram_we (one cycle).
// Sensors and datagram sender through start/done pulses.
//
// Counting disagreements with reference data, reprogramming upset words and
// reporting the count follow the design description, as does the use of a
// Gray-coded, Hamming-protected state register. The address counter is a
// plain register on purpose: an upset there only makes the pass read another
// location. The period timer, the per-word write-back and the access timing
// are this design's own choices.
module readout_ctrl
  import roic_pkg::*;
#(
  parameter int             ADDR_W   = 10,
  parameter int             DATA_W   = 8,
  parameter logic [DATA_W-1:0] REF_WORD = '0,
  parameter int unsigned    PERIOD   = 1_000_000,
  parameter int             SN       = ham_n($bits(rd_state_e))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 refresh,
  // detector SRAM
  output logic [ADDR_W-1:0]    sram_addr,
  output logic [DATA_W-1:0]    sram_wdata,
  input  logic [DATA_W-1:0]    sram_rdata,
  output logic                 sram_oe,
  output logic                 sram_we,
  // sensors
  output logic                 sens_start,
  input  logic                 temp_done,
  input  logic                 rad_done,
  // datagram
  output logic                 dg_start,
  input  logic                 dg_done,
  output logic [SEU_CNT_W-1:0] seu_count,
  output logic                 pass_active,
  // protection
  input  logic [SN-1:0]        seu_inject,
  output logic                 single_err,
  output logic                 double_err
);

  localparam int TW = $clog2(PERIOD + 1);

  rd_state_e          st, st_next;
  logic [$bits(rd_state_e)-1:0] st_bits;
  logic [TW-1:0]      timer;
  logic               timer_exp;
  logic [$clog2(DATA_W+1)-1:0] diff_bits;
  logic [SEU_CNT_W:0] sum;
  logic               temp_seen, rad_seen;

  seu_state_reg #(.K($bits(rd_state_e)), .INIT_STATE(HAM_MAX'(RD_IDLE))) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .next_state (st_next),
    .inject     (seu_inject),
    .state      (st_bits),
    .single_err (single_err),
    .double_err (double_err)
  );

  assign st = rd_state_e'(st_bits);

  always_comb begin
    diff_bits = '0;
    for (int i = 0; i < DATA_W; i++)
      diff_bits += $bits(diff_bits)'(sram_rdata[i] ^ REF_WORD[i]);
  end

  assign timer_exp = (timer == '0);
  assign sum       = {1'b0, seu_count} + (SEU_CNT_W+1)'(diff_bits);

  always_comb begin
    st_next = st;
    unique case (st)
      RD_IDLE:       if (timer_exp) st_next = RD_READ;
      RD_READ:       st_next = RD_SAMPLE;
      RD_SAMPLE:     st_next = (diff_bits != '0) ? RD_REPROG : RD_ADVANCE;
      RD_REPROG:     st_next = RD_ADVANCE;
      RD_ADVANCE:    st_next = (sram_addr == '1) ? RD_SENSE_GO : RD_READ;
      RD_SENSE_GO:   st_next = RD_SENSE_WAIT;
      RD_SENSE_WAIT: if ((temp_seen || temp_done) && (rad_seen || rad_done)) st_next = RD_SEND_GO;
      RD_SEND_GO:    st_next = RD_SEND_WAIT;
      RD_SEND_WAIT:  if (dg_done) st_next = RD_IDLE;
      default:       st_next = RD_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      sram_addr <= '0;
      seu_count <= '0;
      temp_seen <= 1'b0;
      rad_seen  <= 1'b0;
    end else if (refresh) begin
      timer     <= '0;
      sram_addr <= '0;
      temp_seen <= 1'b0;
      rad_seen  <= 1'b0;
    end else begin
      // period timer: reloaded when a pass starts, counts down to zero
      if (st == RD_IDLE && timer_exp) timer <= TW'(PERIOD - 1);
      else if (!timer_exp)            timer <= timer - TW'(1);

      if (st == RD_IDLE && timer_exp) seu_count <= '0;
      else if (st == RD_SAMPLE)
        seu_count <= sum[SEU_CNT_W] ? '1 : sum[SEU_CNT_W-1:0];

      if (st == RD_ADVANCE) sram_addr <= sram_addr + ADDR_W'(1);

      if (st == RD_SENSE_GO) begin
        temp_seen <= 1'b0;
        rad_seen  <= 1'b0;
      end else begin
        if (temp_done) temp_seen <= 1'b1;
        if (rad_done)  rad_seen  <= 1'b1;
      end
    end
  end

  assign sram_oe     = (st == RD_READ) || (st == RD_SAMPLE);
  assign sram_we     = (st == RD_REPROG);
  assign sram_wdata  = REF_WORD;
  assign sens_start  = (st == RD_SENSE_GO);
  assign dg_start    = (st == RD_SEND_GO);
  assign pass_active = (st != RD_IDLE);

endmodule
