// sensor_spi - serial reader for one sensor (temperature or RadFET).
//
// The sensors are attached over a standard serial link; this design uses the
// simplest common form, an SPI master in mode 0 that only receives: 'start'
// pulls cs_n low, and after SCLK_DIV cycles the first rising edge of sclk
// samples miso. Each sclk half period lasts SCLK_DIV cycles, WIDTH bits are
// shifted in most significant first on the rising edges, then cs_n returns
// high, and 'done' pulses for one cycle together with the new 'value'. 'done'
// comes 2*WIDTH*SCLK_DIV + 1 cycles after the cycle that carried 'start'. The
// sensor is expected to present its most significant bit when cs_n falls and
// to shift on falling sclk edges.
//
// That the sensors are read serially follows the design description; the
// SPI mode, word width and timing are this design's own choices. The phase
// and bit counter form the state of a Hamming-protected state machine; the
// clock divider and shift register are plain registers.
module sensor_spi
  import roic_pkg::*;
#(
  parameter int WIDTH    = SENS_W,
  parameter int SCLK_DIV = 5,
  parameter int SN       = ham_n($bits(sp_state_t))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             refresh,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] value,
  output logic             sclk,
  output logic             cs_n,
  input  logic             miso,
  input  logic [SN-1:0]    seu_inject,
  output logic             single_err,
  output logic             double_err
);

  localparam int CW = (SCLK_DIV > 1) ? $clog2(SCLK_DIV) : 1;

  sp_state_t        st, st_next;
  logic [CW-1:0]    div_cnt;
  logic             half_end;
  logic [WIDTH-1:0] shreg;
  logic             sample;
  logic             last_edge;

  seu_state_reg #(.K($bits(sp_state_t)), .INIT_STATE(HAM_MAX'(sp_state_t'{SP_IDLE, 5'd0}))) u_state (
    .clk        (clk),
    .rst_n      (rst_n),
    .refresh    (refresh),
    .next_state (st_next),
    .inject     (seu_inject),
    .state      (st),
    .single_err (single_err),
    .double_err (double_err)
  );

  assign half_end = (div_cnt == CW'(SCLK_DIV - 1));

  always_comb begin
    st_next = st;
    last_edge = 1'b0;
    sample    = 1'b0;
    unique case (st.phase)
      SP_IDLE: begin
        st_next.bit_cnt = 5'd0;
        if (start) st_next.phase = SP_SETUP;
      end
      SP_SETUP, SP_LOW: begin
        if (half_end) begin
          sample          = 1'b1;
          st_next.phase   = SP_HIGH;
          st_next.bit_cnt = st.bit_cnt + 5'd1;
        end
      end
      SP_HIGH: begin
        if (half_end) begin
          if (st.bit_cnt >= 5'(WIDTH)) begin
            st_next   = sp_state_t'{SP_IDLE, 5'd0};
            last_edge = 1'b1;
          end else begin
            st_next.phase = SP_LOW;
          end
        end
      end
      default: st_next = sp_state_t'{SP_IDLE, 5'd0};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      shreg   <= '0;
      value   <= '0;
      done    <= 1'b0;
    end else begin
      done <= last_edge;
      if (st.phase == SP_IDLE || half_end) div_cnt <= '0;
      else                                 div_cnt <= div_cnt + CW'(1);
      if (sample) shreg <= {shreg[WIDTH-2:0], miso};
      if (last_edge) value <= shreg;
    end
  end

  assign busy = (st.phase != SP_IDLE);
  assign cs_n = (st.phase == SP_IDLE);
  assign sclk = (st.phase == SP_HIGH);

endmodule
