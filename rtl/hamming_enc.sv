// hamming_enc - extended Hamming (SEC-DED) encoder for a K-bit state value.
//
// Purely combinational. The N = K + R + 1 bit code word places the check
// bits at the power-of-two positions, the data bits at the other positions
// in ascending order, and an overall parity bit at position 0, so that a
// decoder can correct one flipped bit and detect two. The use of Hamming
// coding with double error detection for state registers follows the design
// description; the bit ordering is this design's own choice.
//
// Ports: data (K bits) in, code (N bits) out; no clock.
module hamming_enc
  import roic_pkg::*;
#(
  parameter int K = 4,
  parameter int N = ham_n(K)
) (
  input  logic [K-1:0] data,
  output logic [N-1:0] code
);

  always_comb code = N'(ham_encode(HAM_MAX'(data), K));

endmodule
