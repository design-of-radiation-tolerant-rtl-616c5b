// tb_readout_ctrl - self-checking test of the main readout state machine.
//
// ADDR_W = 5 (32 words of 8 bits), PERIOD = 400. The testbench holds a model
// of the detector SRAM (combinational read, write on sram_we) and fills it
// with zeroes plus random upsets before each pass. Sensor and datagram
// blocks are modelled by done pulses a few cycles after their start pulses.
// Per pass it checks: the SEU count at dg_start equals the number of set
// bits planted; every upset word is written back to zero exactly once and
// the memory is all zero afterwards; each address is read in order; the scan
// takes 3 cycles per clean word and 4 per upset word; passes start PERIOD
// cycles apart. It also injects single flips into the protected state
// register (must not change any result) and applies a refresh in the middle
// of a pass (the pass must restart from address 0 and complete).
module tb_readout_ctrl;
  import roic_pkg::*;

  localparam int AW     = 5;
  localparam int DW     = 8;
  localparam int WORDS  = 1 << AW;
  localparam int PERIOD = 400;
  localparam int SN     = ham_n($bits(rd_state_e));

  int checks = 0, failures = 0;
  int n_single = 0, n_reprog = 0, n_refresh = 0, n_pass = 0;

  logic                 clk = 0, rst_n = 0, refresh = 0;
  logic [AW-1:0]        sram_addr;
  logic [DW-1:0]        sram_wdata, sram_rdata;
  logic                 sram_oe, sram_we;
  logic                 sens_start, temp_done = 0, rad_done = 0;
  logic                 dg_start, dg_done = 0;
  logic [SEU_CNT_W-1:0] seu_count;
  logic                 pass_active;
  logic [SN-1:0]        seu_inject = '0;
  logic                 single_err, double_err;
  int                   cyc = 0;

  logic [DW-1:0] mem [WORDS];
  int            writes [WORDS];

  readout_ctrl #(.ADDR_W(AW), .DATA_W(DW), .PERIOD(PERIOD)) dut (
    .clk, .rst_n, .refresh, .sram_addr, .sram_wdata, .sram_rdata, .sram_oe, .sram_we,
    .sens_start, .temp_done, .rad_done, .dg_start, .dg_done, .seu_count, .pass_active,
    .seu_inject, .single_err, .double_err
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && single_err) n_single++;

  assign sram_rdata = mem[sram_addr];
  always @(posedge clk) if (sram_we) begin
    mem[sram_addr] <= sram_wdata;
    writes[sram_addr]++;
    n_reprog++;
  end

  // sensor and datagram models
  always @(posedge clk) begin
    if (sens_start) begin
      fork
        begin repeat (5) @(posedge clk); temp_done <= 1; @(posedge clk); temp_done <= 0; end
        begin repeat (9) @(posedge clk); rad_done <= 1;  @(posedge clk); rad_done <= 0;  end
      join_none
    end
    if (dg_start) begin
      fork
        begin repeat (20) @(posedge clk); dg_done <= 1; @(posedge clk); dg_done <= 0; end
      join_none
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // plant upsets, return number of set bits and of upset words
  task automatic plant(output int bits, output int words);
    bits  = 0;
    words = 0;
    foreach (mem[i]) begin
      mem[i]    = '0;
      writes[i] = 0;
      if ($urandom_range(3) == 0) begin
        mem[i] = DW'($urandom) | DW'(1);
        words++;
        bits += $countones(mem[i]);
      end
    end
  endtask

  // run one pass from its first read; returns the cycle of dg_start
  task automatic run_pass(input int bits, input int words, input bit upsets_in_pass,
                          output int t_first);
    int t_scan_end;
    int next_addr;
    // wait for the first read
    while (!(sram_oe && sram_addr == '0)) @(negedge clk);
    t_first   = cyc;
    next_addr = 0;
    while (!sens_start) begin
      if (sram_oe && sram_addr != AW'(next_addr) && sram_addr != AW'(next_addr - 1)) begin
        failures++;
        $display("FAIL: address %0d out of order (expected %0d)", sram_addr, next_addr);
      end
      if (sram_oe) next_addr = int'(sram_addr) + 1;
      if (upsets_in_pass && $urandom_range(15) == 0) seu_inject = SN'(1) << $urandom_range(SN - 1);
      @(negedge clk);
      seu_inject = '0;
    end
    t_scan_end = cyc;
    checks++;
    if (t_scan_end - t_first != 3 * WORDS + words) begin
      failures++;
      $display("FAIL: scan took %0d cycles, expected %0d", t_scan_end - t_first, 3 * WORDS + words);
    end
    while (!dg_start) @(negedge clk);
    checks++;
    if (seu_count !== SEU_CNT_W'(bits)) begin
      failures++;
      $display("FAIL: seu_count %0d expected %0d", seu_count, bits);
    end
    checks++;
    foreach (mem[i]) if (mem[i] != '0 || writes[i] > 1) begin
      failures++;
      $display("FAIL: word %0d = %h after pass, %0d writes", i, mem[i], writes[i]);
      break;
    end
    while (pass_active) @(negedge clk);
    n_pass++;
  endtask

  initial begin
    int bits, words, t1, t2;
    plant(bits, words);
    repeat (2) @(negedge clk);
    rst_n = 1;
    // pass 1 starts right after reset
    run_pass(bits, words, 0, t1);
    // pass 2 with single upsets in the state register
    plant(bits, words);
    run_pass(bits, words, 1, t2);
    checks++;
    if (t2 - t1 != PERIOD) begin
      failures++;
      $display("FAIL: passes %0d cycles apart, expected %0d", t2 - t1, PERIOD);
    end
    // pass 3 interrupted by a refresh, then restarted
    plant(bits, words);
    while (!(sram_oe && sram_addr == AW'(WORDS / 2))) @(negedge clk);
    refresh = 1;
    n_refresh++;
    @(negedge clk);
    refresh = 0;
    checks++;
    if (pass_active) begin failures++; $display("FAIL: still active after refresh"); end
    // words scanned before the refresh are clean now; plant again and rescan
    plant(bits, words);
    run_pass(bits, words, 0, t1);
    checks++;
    if (n_single == 0 || n_reprog == 0 || n_refresh == 0 || n_pass != 3) begin
      failures++;
      $display("FAIL: single=%0d reprog=%0d refresh=%0d pass=%0d", n_single, n_reprog, n_refresh, n_pass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
