// tb_crc16 - self-checking test of the byte-serial CRC-16/CCITT generator.
//
// The standard check string "123456789" must give 16'h29B1. Then 200 random
// messages of 1..16 bytes are fed with random idle cycles between bytes and
// compared with a bit-serial reference computed in this testbench
// (shift register with feedback taps of x^16 + x^12 + x^5 + 1, start 0xFFFF).
module tb_crc16;

  int checks = 0, failures = 0;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        clear = 0;
  logic        en = 0;
  logic [7:0]  data_in = '0;
  logic [15:0] crc;

  crc16 dut (.clk, .rst_n, .clear, .en, .data_in, .crc);

  always #5 clk = ~clk;

  function automatic logic [15:0] ref_bit(input logic [15:0] r, input logic b);
    logic fb;
    fb = r[15] ^ b;
    r  = {r[14:0], 1'b0};
    if (fb) begin
      r[0]  = ~r[0];
      r[5]  = ~r[5];
      r[12] = ~r[12];
    end
    return r;
  endfunction

  task automatic feed(input logic [7:0] b);
    @(negedge clk);
    en      = 1;
    data_in = b;
    @(negedge clk);
    en = 0;
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  task automatic restart();
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string s;
    logic [15:0] r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (crc !== 16'hFFFF) begin failures++; $display("FAIL: reset value %h", crc); end
    s = "123456789";
    restart();
    for (int i = 0; i < s.len(); i++) feed(s[i]);
    checks++;
    if (crc !== 16'h29B1) begin failures++; $display("FAIL: check value %h", crc); end
    for (int m = 0; m < 200; m++) begin
      int len;
      len = 1 + $urandom_range(15);
      r   = 16'hFFFF;
      restart();
      for (int i = 0; i < len; i++) begin
        logic [7:0] b;
        b = 8'($urandom);
        for (int k = 7; k >= 0; k--) r = ref_bit(r, b[k]);
        feed(b);
      end
      checks++;
      if (crc !== r) begin failures++; $display("FAIL: msg %0d crc %h ref %h", m, crc, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
