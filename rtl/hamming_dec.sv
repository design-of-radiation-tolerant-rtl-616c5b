// hamming_dec - extended Hamming (SEC-DED) decoder for a K-bit state value.
//
// Purely combinational. The syndrome is the XOR of the indices of all set
// code bits; together with the overall parity it classifies the word:
//   syndrome 0, parity even  -> no error
//   parity odd               -> single error at position 'syndrome'
//                               (position 0: the parity bit itself), corrected
//   syndrome != 0, even      -> double error, detected, not correctable
// An odd parity with a syndrome that points outside the word can only come
// from three or more flips and is reported as double error as well.
// Single error correction and double error detection follow the design
// description; the code layout matches hamming_enc.
//
// Ports: code (N bits) in; data (K bits, corrected), single_err, double_err out.
module hamming_dec
  import roic_pkg::*;
#(
  parameter int K = 4,
  parameter int N = ham_n(K),
  parameter int R = ham_r(K)
) (
  input  logic [N-1:0] code,
  output logic [K-1:0] data,
  output logic         single_err,
  output logic         double_err
);

  logic [R-1:0] syndrome;
  logic         parity;
  logic [N-1:0] fixed;

  always_comb begin
    syndrome = '0;
    for (int p = 1; p < N; p++)
      if (code[p]) syndrome ^= R'(p);
    parity = ^code;

    single_err = 1'b0;
    double_err = 1'b0;
    fixed      = code;
    if (parity) begin
      if (int'(syndrome) < N) begin
        single_err = 1'b1;
        fixed[syndrome] = ~code[syndrome];
      end else begin
        double_err = 1'b1;
      end
    end else if (syndrome != '0) begin
      double_err = 1'b1;
    end

    data = '0;
    begin
      int d;
      d = 0;
      for (int p = 1; p < N; p++) begin
        if ((p & (p - 1)) != 0) begin
          data[d] = fixed[p];
          d++;
        end
      end
    end
  end

endmodule
