// uart_tx - asynchronous serial transmitter driving the TxD line to the host.
//
// Frame: one start bit (0), eight data bits least significant first, one stop
// bit (1); the line idles high. Each bit lasts BAUD_DIV clock cycles. A frame
// starts on the cycle after 'start' is seen while idle ('ready' high); 'done'
// pulses for one cycle in the last cycle of the stop bit; 'ready' is high
// again from the next cycle on. The design description names only the TxD pin;
// the frame format and baud divisor are this design's own choice.
//
// The transmitter's control state (busy flag and bit index) is kept in a
// Hamming-protected seu_state_reg like every other state machine here; the
// baud counter and the frame shift data are plain registers (an upset there
// garbles one frame, which the datagram CRC reveals).
module uart_tx
  import roic_pkg::*;
#(
  parameter int BAUD_DIV = 87,
  parameter int SN       = ham_n($bits(ut_state_t))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          refresh,
  input  logic          start,
  input  logic [7:0]    data,
  output logic          ready,
  output logic          done,
  output logic          txd,
  input  logic [SN-1:0] seu_inject,
  output logic          single_err,
  output logic          double_err
);

  localparam int CW = (BAUD_DIV > 1) ? $clog2(BAUD_DIV) : 1;

  ut_state_t   st, st_next;
  logic [9:0]  frame;
  logic [CW-1:0] baud_cnt;
  logic        bit_end;

  seu_state_reg #(.K($bits(ut_state_t)), .INIT_STATE(HAM_MAX'(ut_state_t'{UT_IDLE, 4'd0}))) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .next_state (st_next),
    .inject     (seu_inject),
    .state      (st),
    .single_err (single_err),
    .double_err (double_err)
  );

  assign bit_end = (baud_cnt == CW'(BAUD_DIV - 1));

  always_comb begin
    st_next = st;
    done    = 1'b0;
    unique case (st.phase)
      UT_IDLE: begin
        st_next.bit_idx = 4'd0;
        if (start) st_next.phase = UT_SEND;
      end
      UT_SEND: begin
        if (bit_end) begin
          if (st.bit_idx >= 4'd9) begin
            st_next = ut_state_t'{UT_IDLE, 4'd0};
            done    = 1'b1;
          end else begin
            st_next.bit_idx = st.bit_idx + 4'd1;
          end
        end
      end
      default: st_next = ut_state_t'{UT_IDLE, 4'd0};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame    <= '1;
      baud_cnt <= '0;
    end else if (st.phase == UT_IDLE) begin
      baud_cnt <= '0;
      if (start) frame <= {1'b1, data, 1'b0};
    end else begin
      baud_cnt <= bit_end ? '0 : baud_cnt + CW'(1);
    end
  end

  assign ready = (st.phase == UT_IDLE);
  assign txd   = (st.phase == UT_SEND && st.bit_idx <= 4'd9) ? frame[st.bit_idx] : 1'b1;

endmodule
