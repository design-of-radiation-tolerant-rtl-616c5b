// tb_seu_error_monitor - self-checking test of the error monitor.
//
// NFSM = 5 random single/double flag patterns are applied for 2000 cycles.
// A model predicts, one cycle later, the SingleError and DoubleError pins
// (OR of the flags), the refresh pulse (equal to DoubleError) and the two
// wrapping event counters.
module tb_seu_error_monitor;
  import roic_pkg::*;

  localparam int NF = 5;

  int checks = 0, failures = 0;

  logic                 clk = 0, rst_n = 0;
  logic [NF-1:0]        single_in = '0, double_in = '0;
  logic                 single_error, double_error, refresh;
  logic [ERR_CNT_W-1:0] sec_count, ded_count;
  logic                 m_s = 0, m_d = 0;
  logic [ERR_CNT_W-1:0] m_sc = 0, m_dc = 0;

  seu_error_monitor #(.NFSM(NF)) dut (
    .clk, .rst_n, .single_in, .double_in, .single_error, .double_error, .refresh,
    .sec_count, .ded_count
  );

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      single_in = ($urandom_range(2) == 0) ? NF'($urandom) : '0;
      double_in = ($urandom_range(4) == 0) ? NF'(1) << $urandom_range(NF - 1) : '0;
      @(posedge clk);
      m_s = |single_in;
      m_d = |double_in;
      if (m_s) m_sc = m_sc + 1'b1;
      if (m_d) m_dc = m_dc + 1'b1;
      @(negedge clk);
      checks++;
      if (single_error !== m_s || double_error !== m_d || refresh !== m_d ||
          sec_count !== m_sc || ded_count !== m_dc) begin
        failures++;
        $display("FAIL cycle %0d: %b %b %b %0d %0d", c, single_error, double_error, refresh,
                 sec_count, ded_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
