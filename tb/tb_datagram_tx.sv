// tb_datagram_tx - self-checking test of the datagram sender.
//
// A transmitter model in the testbench accepts a byte on tx_start, records
// it and answers with tx_done T = 7 cycles later. For random field values
// the recorded datagram must be: sync byte A5, SEU count (3 bytes, MSB
// first), temperature and RadFET words (2 bytes each, MSB first), single
// and double error counters, and a CRC-16/CCITT (init FFFF) over the first
// ten bytes, high byte first; the CRC is recomputed here bit by bit. Inputs
// are changed right after 'start' to check the snapshot. 'done' must come
// 12 * (T + 1) cycles after 'start'. Single flips in the protected state
// register must not disturb a datagram; a double flip must abort it (no
// 'done', sender idle) and the next datagram must be complete.
module tb_datagram_tx;
  import roic_pkg::*;

  localparam int T  = 7;
  localparam int SN = ham_n($bits(dg_state_t));

  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  logic                 clk = 0, rst_n = 0, refresh = 0, start = 0;
  logic [SEU_CNT_W-1:0] seu_count = '0;
  logic [SENS_W-1:0]    temp_value = '0, rad_value = '0;
  logic [ERR_CNT_W-1:0] sec_count = '0, ded_count = '0;
  logic                 busy, done, tx_start, tx_done;
  logic [7:0]           tx_data;
  logic [SN-1:0]        seu_inject = '0;
  logic                 single_err, double_err;
  int                   cyc = 0;

  datagram_tx dut (
    .clk, .rst_n, .refresh, .start, .seu_count, .temp_value, .rad_value,
    .sec_count, .ded_count, .busy, .done, .tx_start, .tx_data, .tx_done,
    .seu_inject, .single_err, .double_err
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && single_err) n_single++;
  always @(posedge clk) if (rst_n && double_err) n_double++;

  // transmitter model
  logic [7:0] rx[$];
  int         tx_timer = 0;
  always @(posedge clk) begin
    tx_done <= 1'b0;
    if (tx_timer > 0) begin
      tx_timer <= tx_timer - 1;
      if (tx_timer == 1) tx_done <= 1'b1;
    end
    if (tx_start) begin
      if (tx_timer > 1) begin failures++; $display("FAIL: byte while busy"); end
      rx.push_back(tx_data);
      tx_timer <= T - 1;
    end
  end

  function automatic logic [15:0] ref_crc(input logic [7:0] b[$]);
    logic [15:0] r;
    r = 16'hFFFF;
    foreach (b[i])
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = r[15] ^ b[i][k];
        r  = r << 1;
        if (fb) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_datagram(input int upset);
    logic [7:0] exp[$];
    logic [15:0] c;
    int t0, tdone;
    exp = {};
    seu_count  = SEU_CNT_W'($urandom);
    temp_value = SENS_W'($urandom);
    rad_value  = SENS_W'($urandom);
    sec_count  = ERR_CNT_W'($urandom);
    ded_count  = ERR_CNT_W'($urandom);
    exp.push_back(8'hA5);
    exp.push_back(seu_count[23:16]);
    exp.push_back(seu_count[15:8]);
    exp.push_back(seu_count[7:0]);
    exp.push_back(temp_value[15:8]);
    exp.push_back(temp_value[7:0]);
    exp.push_back(rad_value[15:8]);
    exp.push_back(rad_value[7:0]);
    exp.push_back(sec_count);
    exp.push_back(ded_count);
    c = ref_crc(exp);
    exp.push_back(c[15:8]);
    exp.push_back(c[7:0]);
    rx = {};
    @(negedge clk);
    start = 1;
    t0    = cyc;
    @(negedge clk);
    start = 0;
    seu_count = ~seu_count;
    temp_value = ~temp_value;
    tdone = -1;
    for (int k = 0; k < 14 * (T + 1); k++) begin
      if (k == 5 * (T + 1) && upset == 1) seu_inject = SN'(1) << $urandom_range(SN - 1);
      if (k == 5 * (T + 1) && upset == 2) seu_inject = SN'(3) << $urandom_range(SN - 2);
      if (done) tdone = cyc;
      @(negedge clk);
      seu_inject = '0;
    end
    checks++;
    if (upset == 2) begin
      if (tdone >= 0 || busy) begin failures++; $display("FAIL: double error did not abort"); end
      repeat (T + 2) @(negedge clk);
    end else begin
      if (rx.size() != 12 || rx != exp) begin
        failures++;
        $display("FAIL: datagram %p expected %p", rx, exp);
      end
      checks++;
      if (tdone - t0 != 12 * (T + 1)) begin
        failures++;
        $display("FAIL: done after %0d cycles", tdone - t0);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 12; d++) one_datagram((d % 3 == 2) ? 1 : 0);
    one_datagram(2);
    one_datagram(0);
    checks++;
    if (n_single == 0 || n_double == 0) begin
      failures++;
      $display("FAIL: single=%0d double=%0d", n_single, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
