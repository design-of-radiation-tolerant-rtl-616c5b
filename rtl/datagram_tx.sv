// datagram_tx - builds the measurement datagram and sends it to the host
// through the serial transmitter.
//
// On 'start' the sender takes a snapshot of its inputs (SEU count of the last
// memory pass, the two sensor words and the two error event counters of the
// protected state machines), clears the CRC and then hands the DG_BYTES bytes
// of the datagram (layout in roic_pkg) to the transmitter one at a time:
// the DG_PAYLOAD payload bytes, each folded into the CRC-16 as it is sent,
// followed by the CRC, high byte first. 'done' pulses when the transmitter
// reports the last byte sent.
//
// Handshake with the transmitter: 'tx_start' is high for one cycle with the
// byte on 'tx_data' (the transmitter is idle then), and the sender waits for
// the transmitter's 'tx_done' pulse before the next byte. With a transmitter
// that needs T cycles per byte, a datagram takes DG_BYTES * (T + 1) cycles.
//
// That the datagram carries the SEU count and the error information and is
// protected by a CRC follows the design description; the field order, widths
// and sync byte are this design's own choice. The phase and byte index form
// the state of a Hamming-protected state machine.
module datagram_tx
  import roic_pkg::*;
#(
  parameter int SN = ham_n($bits(dg_state_t))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 refresh,
  input  logic                 start,
  input  logic [SEU_CNT_W-1:0] seu_count,
  input  logic [SENS_W-1:0]    temp_value,
  input  logic [SENS_W-1:0]    rad_value,
  input  logic [ERR_CNT_W-1:0] sec_count,
  input  logic [ERR_CNT_W-1:0] ded_count,
  output logic                 busy,
  output logic                 done,
  output logic                 tx_start,
  output logic [7:0]           tx_data,
  input  logic                 tx_done,
  input  logic [SN-1:0]        seu_inject,
  output logic                 single_err,
  output logic                 double_err
);

  dg_state_t st, st_next;
  logic [8*DG_PAYLOAD-1:0] payload;
  logic [15:0] crc;
  logic        crc_clear;
  logic        crc_en;

  seu_state_reg #(.K($bits(dg_state_t)), .INIT_STATE(HAM_MAX'(dg_state_t'{DG_IDLE, 4'd0}))) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .next_state (st_next),
    .inject     (seu_inject),
    .state      (st),
    .single_err (single_err),
    .double_err (double_err)
  );

  crc16 u_crc (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (crc_clear),
    .en      (crc_en),
    .data_in (tx_data),
    .crc     (crc)
  );

  // byte selected by the byte index
  always_comb begin
    if (st.idx < 4'(DG_PAYLOAD))
      tx_data = payload[8*(DG_PAYLOAD-1-int'(st.idx)) +: 8];
    else if (st.idx == 4'(DG_PAYLOAD))
      tx_data = crc[15:8];
    else
      tx_data = crc[7:0];
  end

  always_comb begin
    st_next   = st;
    tx_start  = 1'b0;
    crc_en    = 1'b0;
    crc_clear = 1'b0;
    done      = 1'b0;
    unique case (st.phase)
      DG_IDLE: begin
        st_next.idx = 4'd0;
        if (start) begin
          st_next.phase = DG_LOAD;
          crc_clear     = 1'b1;
        end
      end
      DG_LOAD: begin
        tx_start      = 1'b1;
        crc_en        = (st.idx < 4'(DG_PAYLOAD));
        st_next.phase = DG_WAIT;
      end
      DG_WAIT: begin
        if (tx_done) begin
          if (st.idx >= 4'(DG_BYTES - 1)) begin
            st_next = dg_state_t'{DG_IDLE, 4'd0};
            done    = 1'b1;
          end else begin
            st_next = dg_state_t'{DG_LOAD, st.idx + 4'd1};
          end
        end
      end
      default: st_next = dg_state_t'{DG_IDLE, 4'd0};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) payload <= '0;
    else if (st.phase == DG_IDLE && start)
      payload <= {DG_SYNC, seu_count, temp_value, rad_value, sec_count, ded_count};
  end

  assign busy = (st.phase != DG_IDLE);

endmodule
