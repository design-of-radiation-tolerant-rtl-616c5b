// tb_uart_tx - self-checking test of the serial transmitter.
//
// BAUD_DIV = 6. A receiver in the testbench waits for the falling start
// edge, samples every bit in its middle and checks start bit, eight data bits
// (LSB first) and stop bit against the byte given to 'start'. It also checks
// that 'done' comes exactly 10 * BAUD_DIV cycles after the 'start' cycle and
// that 'ready' is low while a frame is sent. During some frames a single bit
// of the protected state register is flipped: the frame must still be
// correct and single_err must be reported. One frame gets a double flip: the
// transmitter must return to idle (line high, no 'done') and send the next
// byte correctly.
module tb_uart_tx;
  import roic_pkg::*;

  localparam int DIV = 6;
  localparam int SN  = ham_n($bits(ut_state_t));

  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0;

  logic          clk = 0, rst_n = 0, refresh = 0, start = 0;
  logic [7:0]    data = '0;
  logic          ready, done, txd;
  logic [SN-1:0] seu_inject = '0;
  logic          single_err, double_err;
  int            cyc = 0;

  uart_tx #(.BAUD_DIV(DIV)) dut (
    .clk, .rst_n, .refresh, .start, .data, .ready, .done, .txd,
    .seu_inject, .single_err, .double_err
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && single_err) n_single++;
  always @(posedge clk) if (rst_n && double_err) n_double++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one byte and receive it; upset: 0 none, 1 single flip, 2 double flip
  task automatic one_frame(input logic [7:0] b, input int upset);
    int t0;
    logic [9:0] got;
    @(negedge clk);
    checks++;
    if (!ready || txd !== 1'b1) begin failures++; $display("FAIL: not idle before frame"); end
    start = 1;
    data  = b;
    t0    = cyc;
    @(negedge clk);
    start = 0;
    data  = 8'($urandom);
    // mid-bit sampling of the 10 frame bits
    for (int i = 0; i < 10; i++) begin
      repeat (DIV / 2) @(negedge clk);
      got[i] = txd;
      if (i == 4 && upset == 1) seu_inject = SN'(1) << $urandom_range(SN - 1);
      if (i == 4 && upset == 2) seu_inject = SN'(3) << $urandom_range(SN - 2);
      if (ready && upset == 0) begin failures++; $display("FAIL: ready during frame"); end
      @(negedge clk);
      seu_inject = '0;
      repeat (DIV - DIV / 2 - 1) @(negedge clk);
      if (upset == 2 && i == 4) break;
    end
    if (upset == 2) begin
      repeat (12 * DIV) begin
        @(negedge clk);
        if (done) begin failures++; $display("FAIL: done after double error"); end
      end
      checks++;
      if (!ready || txd !== 1'b1) begin failures++; $display("FAIL: not idle after double error"); end
    end else begin
      checks++;
      if (got !== {1'b1, b, 1'b0}) begin
        failures++;
        $display("FAIL: frame %b expected %b", got, {1'b1, b, 1'b0});
      end
    end
  endtask

  // 'done' timing monitor
  int t_start = -1;
  always @(posedge clk) begin
    if (start && ready) t_start <= cyc;
    if (done) begin
      checks++;
      if (cyc - t_start != 10 * DIV) begin
        failures++;
        $display("FAIL: done after %0d cycles", cyc - t_start);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) one_frame(8'($urandom), (f % 5 == 3) ? 1 : 0);
    one_frame(8'h5A, 2);
    one_frame(8'hC3, 0);
    checks++;
    if (n_single == 0 || n_double == 0) begin
      failures++;
      $display("FAIL: single=%0d double=%0d", n_single, n_double);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
