// tb_sensor_spi - self-checking test of the serial sensor reader.
//
// WIDTH = 16, SCLK_DIV = 3. A sensor model in the testbench puts the most
// significant bit of its word on miso when cs_n falls and shifts to the next
// bit on every falling sclk edge. The test checks the value read, the number
// of rising sclk edges (WIDTH), that 'done' comes 2*WIDTH*SCLK_DIV + 1 cycles
// after 'start', and that cs_n is high again afterwards. Some reads get a
// single bit flip in the protected state register (the read must still be
// correct); one gets a double flip (the reader must drop back to idle
// without 'done' and the next read must work).
module tb_sensor_spi;
  import roic_pkg::*;

  localparam int W   = 16;
  localparam int DIV = 3;
  localparam int SN  = ham_n($bits(sp_state_t));

  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  logic          clk = 0, rst_n = 0, refresh = 0, start = 0;
  logic          busy, done, sclk, cs_n, miso;
  logic [W-1:0]  value;
  logic [SN-1:0] seu_inject = '0;
  logic          single_err, double_err;
  int            cyc = 0;

  // sensor model
  logic [W-1:0]  word;
  int            bitpos;
  int            rises;

  sensor_spi #(.WIDTH(W), .SCLK_DIV(DIV)) dut (
    .clk, .rst_n, .refresh, .start, .busy, .done, .value, .sclk, .cs_n, .miso,
    .seu_inject, .single_err, .double_err
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && single_err) n_single++;
  always @(posedge clk) if (rst_n && double_err) n_double++;

  always @(negedge cs_n) bitpos = W - 1;
  always @(negedge sclk) if (!cs_n) bitpos = bitpos - 1;
  always @(posedge sclk) rises++;
  assign miso = (!cs_n && bitpos >= 0) ? word[bitpos] : 1'b0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_read(input int upset);
    int t0;
    bit seen;
    word  = W'($urandom);
    rises = 0;
    seen  = 0;
    @(negedge clk);
    start = 1;
    t0    = cyc;
    @(negedge clk);
    start = 0;
    for (int c = 0; c < 2 * W * DIV + 10; c++) begin
      if (c == W * DIV && upset == 1) seu_inject = SN'(1) << $urandom_range(SN - 1);
      if (c == W * DIV && upset == 2) seu_inject = SN'(5) << $urandom_range(SN - 3);
      if (done && !seen) begin
        seen = 1;
        checks++;
        if (cyc - t0 != 2 * W * DIV + 1 || value !== word || rises != W) begin
          failures++;
          $display("FAIL: after %0d cycles value %h word %h rises %0d", cyc - t0, value, word, rises);
        end
      end
      @(negedge clk);
      seu_inject = '0;
    end
    checks++;
    if (upset == 2) begin
      if (seen || busy || !cs_n) begin failures++; $display("FAIL: double error not restarted"); end
    end else if (!seen || !cs_n || busy) begin
      failures++;
      $display("FAIL: read did not finish");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!cs_n || busy) begin failures++; $display("FAIL: not idle after reset"); end
    for (int r = 0; r < 20; r++) one_read((r % 4 == 1) ? 1 : 0);
    one_read(2);
    one_read(0);
    checks++;
    if (n_single == 0 || n_double == 0) begin
      failures++;
      $display("FAIL: single=%0d double=%0d", n_single, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
