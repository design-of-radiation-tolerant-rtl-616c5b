// tb_hamming_enc - self-checking test of the SEC-DED encoder.
//
// For K = 4 and K = 11 every (K = 4) or 2000 random (K = 11) data values are
// encoded and the code word is checked against the defining properties of
// the extended Hamming code, computed here independently of the encoder:
// the XOR of the indices of all set bits is zero, the overall parity is even,
// and the data bits appear in order at the positions that are not powers of
// two. One hand-computed word is compared literally: K = 4, data 4'b1011
// gives 8'hAA.
module tb_hamming_enc;
  import roic_pkg::*;

  localparam int KA = 4,  NA = 8;
  localparam int KB = 11, NB = 16;

  int checks = 0, failures = 0;

  logic [KA-1:0] da;
  logic [NA-1:0] ca;
  logic [KB-1:0] db;
  logic [NB-1:0] cb;

  hamming_enc #(.K(KA)) u_a (.data(da), .code(ca));
  hamming_enc #(.K(KB)) u_b (.data(db), .code(cb));

  function automatic bit word_ok(input logic [63:0] c, input int n, input logic [63:0] d);
    int syn;
    int k;
    bit ok;
    syn = 0;
    k   = 0;
    ok  = 1;
    for (int p = 1; p < n; p++) if (c[p]) syn ^= p;
    if (syn != 0) ok = 0;
    begin
      logic par;
      par = 0;
      for (int p = 0; p < n; p++) par ^= c[p];
      if (par != 1'b0) ok = 0;
    end
    for (int p = 3; p < n; p++)
      if ((p & (p - 1)) != 0) begin
        if (c[p] != d[k]) ok = 0;
        k++;
      end
    return ok;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    da = 4'b1011;
    #1;
    checks++;
    if (ca !== 8'hAA) begin
      failures++;
      $display("FAIL: known word %h, expected aa", ca);
    end
    for (int v = 0; v < 16; v++) begin
      da = KA'(v);
      #1;
      checks++;
      if (!word_ok(64'(ca), NA, 64'(da))) begin
        failures++;
        $display("FAIL: K=4 data %h code %h", da, ca);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      db = KB'($urandom);
      #1;
      checks++;
      if (!word_ok(64'(cb), NB, 64'(db))) begin
        failures++;
        $display("FAIL: K=11 data %h code %h", db, cb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
