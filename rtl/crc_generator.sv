// crc_generator: CRC remainder of a data word.
//
// The data word is extended by CRC_W zero bits and divided, modulo 2, by the
// divisor div_i; the CRC_W-bit remainder is returned in crc_o. The sender
// appends it below the data, so {data_i, crc_o} is a multiple of the divisor.
// The division runs most significant bit first as an unrolled long division:
// whenever the leading bit of the running dividend is 1, the divisor is XORed
// in under it.
//
// Interface: purely combinational. div_i is the full CRC_W+1-bit polynomial
// with its top bit (x^CRC_W) set; the method uses 0x107 (x^8 + x^2 + x + 1,
// the ATM header check). Plain remainder, no initial value and no final
// inversion, as in the method this follows. Making the divisor an input
// rather than a constant also follows it; sizes are parameters here.
module crc_generator #(
  parameter int unsigned DATA_W = edac_pkg::DATA_W,
  parameter int unsigned CRC_W  = edac_pkg::CRC_W
) (
  input  logic [DATA_W-1:0] data_i,
  input  logic [CRC_W:0]    div_i,
  output logic [CRC_W-1:0]  crc_o
);

  always_comb begin
    logic [DATA_W+CRC_W-1:0] dividend;
    dividend = {data_i, {CRC_W{1'b0}}};
    for (int i = DATA_W + CRC_W - 1; i >= int'(CRC_W); i--) begin
      if (dividend[i]) dividend[i -: CRC_W+1] = dividend[i -: CRC_W+1] ^ div_i;
    end
    crc_o = dividend[CRC_W-1:0];
  end

endmodule
