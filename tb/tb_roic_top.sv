// tb_roic_top - end-to-end test of the readout controller at its default
// parameters (1024 x 8 detector SRAM, PERIOD 1,000,000 cycles, BAUD_DIV 87,
// SCLK_DIV 5).
//
// Models in the testbench: the detector SRAM (combinational read, write on
// sram_we), two SPI sensors returning fixed words, and a serial receiver on
// TxD that collects bytes (8N1, LSB first). The scenario:
//   pass 1  starts after reset; random upsets are planted in the SRAM and one
//           single bit flip is injected into each of the five protected state
//           registers during the scan. Its datagram must carry the planted
//           bit count, both sensor words, 5 corrected errors, 0 double
//           errors and a valid CRC, and the SRAM must be all zero afterwards.
//   pass 2  is forced by a double flip in the readout state register (system
//           refresh, restart at once). Its datagram is cut off by a double
//           flip in the datagram sender's state register.
//   pass 3  follows that second refresh at once; its datagram must be complete
//           and report 2 double errors.
//   pass 4  is started by the period timer, PERIOD cycles after pass 3.
// Every mechanism (upset counting, reprogramming, sensor reads, CRC,
// single-error correction, double-error refresh, aborted datagram, timed
// pass) is counted and must have happened.
module tb_roic_top;
  import roic_pkg::*;

  localparam int AW     = 10;
  localparam int DW     = 8;
  localparam int WORDS  = 1 << AW;
  localparam int BAUD   = 87;
  localparam int PERIOD = 1_000_000;
  localparam logic [15:0] TEMP_WORD = 16'h1A2B;
  localparam logic [15:0] RAD_WORD  = 16'hC0DE;

  localparam int N_RD = ham_n($bits(rd_state_e));
  localparam int N_SP = ham_n($bits(sp_state_t));
  localparam int N_DG = ham_n($bits(dg_state_t));
  localparam int N_UT = ham_n($bits(ut_state_t));

  int checks = 0, failures = 0;
  int n_reprog = 0, n_single = 0, n_double = 0, n_dgram_ok = 0, n_abort = 0;
  int n_timed = 0, n_sensor = 0, n_pass = 0;

  logic            clk = 0, rst_n = 0;
  logic [AW-1:0]   sram_addr;
  logic [DW-1:0]   sram_wdata, sram_rdata;
  logic            sram_oe, sram_we;
  logic            temp_sclk, temp_cs_n, temp_miso;
  logic            rad_sclk, rad_cs_n, rad_miso;
  logic            txd, single_error, double_error;
  logic [N_RD-1:0] seu_inj_readout = '0;
  logic [N_SP-1:0] seu_inj_temp = '0, seu_inj_rad = '0;
  logic [N_DG-1:0] seu_inj_dgram = '0;
  logic [N_UT-1:0] seu_inj_uart = '0;
  int              cyc = 0;

  roic_top dut (
    .clk, .rst_n, .sram_addr, .sram_wdata, .sram_rdata, .sram_oe, .sram_we,
    .temp_sclk, .temp_cs_n, .temp_miso, .rad_sclk, .rad_cs_n, .rad_miso,
    .txd, .single_error, .double_error,
    .seu_inj_readout, .seu_inj_temp, .seu_inj_rad, .seu_inj_dgram, .seu_inj_uart
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && single_error) n_single++;
  always @(posedge clk) if (rst_n && double_error) n_double++;

  // ---------------- detector SRAM model ----------------
  logic [DW-1:0] mem [WORDS];
  assign sram_rdata = mem[sram_addr];
  always @(posedge clk) if (sram_we) begin
    mem[sram_addr] <= sram_wdata;
    n_reprog++;
  end

  function automatic int plant();
    int bits;
    bits = 0;
    foreach (mem[i]) begin
      if ($urandom_range(15) == 0) mem[i] = DW'($urandom) | DW'(8'h10);
      bits += $countones(mem[i]);
    end
    return bits;
  endfunction

  function automatic bit mem_clean();
    foreach (mem[i]) if (mem[i] != '0) return 0;
    return 1;
  endfunction

  // pass start: first read of address 0
  logic a0_q = 0;
  int   t_pass = -1;
  always @(posedge clk) begin
    a0_q <= sram_oe && sram_addr == '0;
    if (sram_oe && sram_addr == '0 && !a0_q) begin
      t_pass <= cyc;
      n_pass++;
    end
  end

  // ---------------- SPI sensor models ----------------
  int tpos, rpos;
  always @(negedge temp_cs_n) begin tpos = 15; n_sensor++; end
  always @(negedge temp_sclk) if (!temp_cs_n) tpos = tpos - 1;
  assign temp_miso = (!temp_cs_n && tpos >= 0) ? TEMP_WORD[tpos] : 1'b0;
  always @(negedge rad_cs_n) begin rpos = 15; n_sensor++; end
  always @(negedge rad_sclk) if (!rad_cs_n) rpos = rpos - 1;
  assign rad_miso = (!rad_cs_n && rpos >= 0) ? RAD_WORD[rpos] : 1'b0;

  // ---------------- serial receiver on TxD ----------------
  logic [7:0] rxq[$];
  initial forever begin
    @(negedge clk);
    if (rst_n && txd == 1'b0) begin
      logic [7:0] b;
      repeat (BAUD / 2) @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BAUD) @(negedge clk);
        b[i] = txd;
      end
      repeat (BAUD) @(negedge clk);
      if (txd == 1'b1) rxq.push_back(b);
    end
  end

  function automatic logic [15:0] ref_crc(input logic [7:0] b[$], input int n);
    logic [15:0] r;
    r = 16'hFFFF;
    for (int i = 0; i < n; i++)
      for (int k = 7; k >= 0; k--) begin
        logic fb;
        fb = r[15] ^ b[i][k];
        r  = r << 1;
        if (fb) r = r ^ 16'h1021;
      end
    return r;
  endfunction

  task automatic expect_datagram(input int bits, input int sec, input int ded);
    logic [7:0] d[$];
    logic [15:0] c;
    int waited;
    waited = 0;
    while (rxq.size() < 12 && waited < 60000) begin
      @(negedge clk);
      waited++;
    end
    checks++;
    if (rxq.size() < 12) begin
      failures++;
      $display("FAIL: no datagram (%0d bytes)", rxq.size());
      return;
    end
    d = {};
    repeat (12) d.push_back(rxq.pop_front());
    c = ref_crc(d, 10);
    checks++;
    if (d[0] !== 8'hA5 || {d[1], d[2], d[3]} !== 24'(bits) || {d[4], d[5]} !== TEMP_WORD ||
        {d[6], d[7]} !== RAD_WORD || d[8] !== 8'(sec) || d[9] !== 8'(ded) ||
        {d[10], d[11]} !== c) begin
      failures++;
      $display("FAIL: datagram %p, expected bits=%0d sec=%0d ded=%0d crc=%h", d, bits, sec, ded, c);
    end else begin
      n_dgram_ok++;
    end
  endtask

  // one single flip in each protected state register, spread over the scan
  task automatic single_flips();
    repeat (200) @(negedge clk);
    seu_inj_readout = N_RD'(1) << $urandom_range(N_RD - 1);
    @(negedge clk); seu_inj_readout = '0; repeat (100) @(negedge clk);
    seu_inj_temp = N_SP'(1) << $urandom_range(N_SP - 1);
    @(negedge clk); seu_inj_temp = '0; repeat (100) @(negedge clk);
    seu_inj_rad = N_SP'(1) << $urandom_range(N_SP - 1);
    @(negedge clk); seu_inj_rad = '0; repeat (100) @(negedge clk);
    seu_inj_dgram = N_DG'(1) << $urandom_range(N_DG - 1);
    @(negedge clk); seu_inj_dgram = '0; repeat (100) @(negedge clk);
    seu_inj_uart = N_UT'(1) << $urandom_range(N_UT - 1);
    @(negedge clk); seu_inj_uart = '0;
  endtask

  initial begin
    #(64'd25_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bits, t3;
    foreach (mem[i]) mem[i] = '0;
    bits = plant();
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- pass 1 ----
    single_flips();
    expect_datagram(bits, 5, 0);
    checks++;
    if (!mem_clean() || n_reprog == 0) begin failures++; $display("FAIL: SRAM not reprogrammed"); end

    // ---- pass 2: double error in the readout FSM restarts the system ----
    repeat (1000) @(negedge clk);
    bits = plant();
    seu_inj_readout = N_RD'(3);
    @(negedge clk);
    seu_inj_readout = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (cyc - t_pass > 20) begin failures++; $display("FAIL: no pass after refresh"); end
    // abort its datagram after four bytes with a double error in the sender
    while (rxq.size() < 4) @(negedge clk);
    seu_inj_dgram = N_DG'(6);
    @(negedge clk);
    seu_inj_dgram = '0;
    n_abort++;
    bits = plant();           // new upsets for pass 3, which starts now
    repeat (2000) @(negedge clk);
    rxq = {};                 // drop the partial datagram
    t3 = t_pass;
    checks++;
    if (cyc - t3 > 2100) begin failures++; $display("FAIL: no pass after second refresh"); end

    // ---- pass 3 ----
    expect_datagram(bits, 5, 2);
    checks++;
    if (!mem_clean()) begin failures++; $display("FAIL: SRAM not clean after pass 3"); end

    // ---- pass 4, started by the period timer ----
    bits = plant();
    while (t_pass == t3) @(negedge clk);
    checks++;
    if (t_pass - t3 != PERIOD) begin
      failures++;
      $display("FAIL: timed pass %0d cycles after the previous one", t_pass - t3);
    end else n_timed++;
    expect_datagram(bits, 5, 2);

    // ---- every mechanism happened ----
    checks++;
    if (n_reprog == 0 || n_single != 5 || n_double != 2 || n_dgram_ok != 3 || n_abort != 1 ||
        n_timed != 1 || n_sensor < 8 || n_pass != 4) begin
      failures++;
      $display("FAIL: mechanisms reprog=%0d single=%0d double=%0d dgram=%0d abort=%0d timed=%0d sensor=%0d pass=%0d",
               n_reprog, n_single, n_double, n_dgram_ok, n_abort, n_timed, n_sensor, n_pass);
    end
    $display("reprog=%0d single=%0d double=%0d dgram=%0d abort=%0d timed=%0d sensor=%0d pass=%0d",
             n_reprog, n_single, n_double, n_dgram_ok, n_abort, n_timed, n_sensor, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
