// tb_hamming_dec - self-checking test of the SEC-DED decoder.
//
// Code words are built by a reference encoder in this testbench (check bits
// from the parity of the covered positions, overall parity at bit 0). For
// K = 4 every data value is decoded clean, with each single bit flipped and
// with each pair of bits flipped; for K = 7 the same is done for 300 random
// values. Clean words must decode without flags, single flips must decode to
// the original data with single_err, double flips must raise double_err only.
module tb_hamming_dec;

  localparam int KA = 4, NA = 8;
  localparam int KB = 7, NB = 12;

  int checks = 0, failures = 0;

  logic [NA-1:0] ca;
  logic [KA-1:0] da;
  logic          sa, xa;
  logic [NB-1:0] cb;
  logic [KB-1:0] db;
  logic          sb, xb;

  hamming_dec #(.K(KA)) u_a (.code(ca), .data(da), .single_err(sa), .double_err(xa));
  hamming_dec #(.K(KB)) u_b (.code(cb), .data(db), .single_err(sb), .double_err(xb));

  function automatic logic [63:0] ref_encode(input logic [63:0] d, input int n);
    logic [63:0] c;
    int k;
    c = '0;
    k = 0;
    for (int p = 3; p < n; p++)
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k++;
      end
    for (int b = 1; b < n; b = b * 2) begin
      logic par;
      par = 0;
      for (int p = 1; p < n; p++) if ((p & b) != 0 && p != b) par ^= c[p];
      c[b] = par;
    end
    c[0] = ^c;
    return c;
  endfunction

  task automatic check_a(input logic [KA-1:0] d, input logic [NA-1:0] flip, input int nflip);
    ca = NA'(ref_encode(64'(d), NA)) ^ flip;
    #1;
    checks++;
    if (nflip < 2 && (da !== d || sa !== (nflip == 1) || xa !== 1'b0)) begin
      failures++;
      $display("FAIL K=4 d=%h flip=%b got d=%h s=%b x=%b", d, flip, da, sa, xa);
    end
    if (nflip == 2 && (xa !== 1'b1 || sa !== 1'b0)) begin
      failures++;
      $display("FAIL K=4 double d=%h flip=%b s=%b x=%b", d, flip, sa, xa);
    end
  endtask

  task automatic check_b(input logic [KB-1:0] d, input logic [NB-1:0] flip, input int nflip);
    cb = NB'(ref_encode(64'(d), NB)) ^ flip;
    #1;
    checks++;
    if (nflip < 2 && (db !== d || sb !== (nflip == 1) || xb !== 1'b0)) begin
      failures++;
      $display("FAIL K=7 d=%h flip=%b got d=%h s=%b x=%b", d, flip, db, sb, xb);
    end
    if (nflip == 2 && (xb !== 1'b1 || sb !== 1'b0)) begin
      failures++;
      $display("FAIL K=7 double d=%h flip=%b s=%b x=%b", d, flip, sb, xb);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      check_a(KA'(v), '0, 0);
      for (int i = 0; i < NA; i++) begin
        check_a(KA'(v), NA'(1) << i, 1);
        for (int j = i + 1; j < NA; j++) check_a(KA'(v), (NA'(1) << i) | (NA'(1) << j), 2);
      end
    end
    for (int t = 0; t < 300; t++) begin
      logic [KB-1:0] v;
      int i, j;
      v = KB'($urandom);
      i = $urandom_range(NB - 1);
      j = (i + 1 + $urandom_range(NB - 2)) % NB;
      check_b(v, '0, 0);
      check_b(v, NB'(1) << i, 1);
      check_b(v, (NB'(1) << i) | (NB'(1) << j), 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
