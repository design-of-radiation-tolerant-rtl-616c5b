// tb_seu_state_reg - self-checking test of the Hamming-protected state
// register.
//
// The register (K = 4, initial state 4'h3) is closed into a loop that makes
// the next state the current state plus one, as a counting state machine
// would. A model in the testbench predicts the state every cycle. The test
// then injects single bit flips into random code bits (the state sequence
// must go on undisturbed and single_err must pulse once), double flips
// (double_err must pulse and the state must restart from 4'h3) and
// external refresh pulses (restart from 4'h3 without any error flag).
module tb_seu_state_reg;

  localparam int K = 4;
  localparam int N = 8;
  localparam logic [K-1:0] INIT = 4'h3;

  int checks = 0, failures = 0;
  int n_single = 0, n_double = 0, n_refresh = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         refresh = 0;
  logic [N-1:0] inject = '0;
  logic [K-1:0] state, next_state;
  logic         single_err, double_err;
  logic [K-1:0] model;

  seu_state_reg #(.K(K), .INIT_STATE(64'(INIT))) dut (
    .clk, .rst_n, .refresh, .next_state, .inject, .state, .single_err, .double_err
  );

  assign next_state = state + K'(1);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = INIT;
    repeat (2) @(negedge clk);
    checks++;
    if (state !== INIT) begin failures++; $display("FAIL: reset state %h", state); end
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int kind;
      kind = $urandom_range(9);
      inject  = '0;
      refresh = 1'b0;
      if (kind == 0) begin
        inject = N'(1) << $urandom_range(N - 1);
      end else if (kind == 1) begin
        int i, j;
        i = $urandom_range(N - 1);
        j = (i + 1 + $urandom_range(N - 2)) % N;
        inject = (N'(1) << i) | (N'(1) << j);
      end else if (kind == 2) begin
        refresh = 1'b1;
      end
      @(posedge clk);
      // the value written at this edge
      model = refresh ? INIT : model + K'(1);
      #1;
      inject  = '0;
      refresh = 1'b0;
      if (kind == 1) model = INIT;  // double error restarts after this cycle
      // check the cycle that sees the (possibly upset) word
      checks++;
      if (kind == 0) begin
        n_single++;
        if (!single_err || double_err || state !== model) begin
          failures++;
          $display("FAIL single: s=%b d=%b state=%h model=%h", single_err, double_err, state, model);
        end
      end else if (kind == 1) begin
        n_double++;
        if (!double_err || single_err || state !== INIT) begin
          failures++;
          $display("FAIL double: s=%b d=%b state=%h", single_err, double_err, state);
        end
        // the restart is written at the next edge; the state shown is INIT
        model = INIT - K'(1);
      end else begin
        if (kind == 2) n_refresh++;
        if (single_err || double_err || state !== model) begin
          failures++;
          $display("FAIL clean: s=%b d=%b state=%h model=%h", single_err, double_err, state, model);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_single == 0 || n_double == 0 || n_refresh == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened %0d %0d %0d", n_single, n_double, n_refresh);
    end
    $display("single=%0d double=%0d refresh=%0d", n_single, n_double, n_refresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
