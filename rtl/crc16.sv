// crc16 - CRC-16/CCITT generator for the datagram sent to the host computer.
//
// Byte-serial: 'clear' loads the initial value 0xFFFF, 'en' folds 'data_in'
// into the register, most significant bit first, generator polynomial
// x^16 + x^12 + x^5 + 1 (0x1021), no reflection, no final XOR. A whole byte
// is processed in one clock cycle; 'crc' is the register value. The design
// description only states that a cyclic redundancy check protects the
// datagram; the polynomial, width and byte-wise form are this design's choice.
module crc16
  import roic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [7:0]  data_in,
  output logic [15:0] crc
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= CRC_INIT;
    else if (clear) crc <= CRC_INIT;
    else if (en)    crc <= crc16_byte(crc, data_in);
  end

endmodule
