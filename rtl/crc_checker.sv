// crc_checker: CRC check of a received message {data, crc}.
//
// The K-bit message is extended by CRC_W zero bits and divided, modulo 2, by
// div_i, exactly as the generator treats the data word; the remainder is
// rem_o, zero for a good frame. For a message the generator produced,
// {data, crc} is a multiple of the divisor and so is its shifted copy, so the
// remainder is zero. A non-zero remainder is the receiver's request to resend
// the frame. Dividing the message with the appended zeros (rather than the
// message alone) is this design's reading of the method: it is the form that
// gives the non-zero request values the method reports for corrupted frames.
//
// Interface: purely combinational. div_i carries the full polynomial with its
// top bit set (0x107 in the reference configuration).
module crc_checker #(
  parameter int unsigned K     = edac_pkg::MSG_W,
  parameter int unsigned CRC_W = edac_pkg::CRC_W
) (
  input  logic [K-1:0]     msg_i,
  input  logic [CRC_W:0]   div_i,
  output logic [CRC_W-1:0] rem_o
);

  always_comb begin
    logic [K+CRC_W-1:0] dividend;
    dividend = {msg_i, {CRC_W{1'b0}}};
    for (int i = K + CRC_W - 1; i >= int'(CRC_W); i--) begin
      if (dividend[i]) dividend[i -: CRC_W+1] = dividend[i -: CRC_W+1] ^ div_i;
    end
    rem_o = dividend[CRC_W-1:0];
  end

endmodule
