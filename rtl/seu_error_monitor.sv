// seu_error_monitor - collects the error flags of all Hamming-protected
// state machines.
//
// Each cycle it ORs the NFSM single-error flags and the NFSM double-error
// flags. The results are registered and drive the SingleError and
// DoubleError pins for one cycle per event. A double error also produces the
// system refresh pulse (same cycle as the DoubleError pin) that sends every
// state machine and the readout datapath back to its initial state. Two
// event counters (ERR_CNT_W bits, wrapping) count the cycles with a
// corrected single error and with a double error; they are reported to the
// host in every datagram and are cleared only by reset, so the host can take
// differences between datagrams.
//
// The SingleError/DoubleError outputs, reporting corrected errors to the
// host and refreshing the system on a double error follow the design
// description; the pulse form of the pins and the counters are this design's
// own choice.
module seu_error_monitor
  import roic_pkg::*;
#(
  parameter int NFSM = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NFSM-1:0]      single_in,
  input  logic [NFSM-1:0]      double_in,
  output logic                 single_error,
  output logic                 double_error,
  output logic                 refresh,
  output logic [ERR_CNT_W-1:0] sec_count,
  output logic [ERR_CNT_W-1:0] ded_count
);

  logic any_single, any_double;

  assign any_single = |single_in;
  assign any_double = |double_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      single_error <= 1'b0;
      double_error <= 1'b0;
      sec_count    <= '0;
      ded_count    <= '0;
    end else begin
      single_error <= any_single;
      double_error <= any_double;
      if (any_single) sec_count <= sec_count + ERR_CNT_W'(1);
      if (any_double) ded_count <= ded_count + ERR_CNT_W'(1);
    end
  end

  assign refresh = double_error;

endmodule
