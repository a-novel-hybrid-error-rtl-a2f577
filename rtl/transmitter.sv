// transmitter: sending end of the hybrid Hamming + CRC scheme.
//
// The 32-bit data word is captured in a register on the rising edge of clk.
// From that register a CRC generator computes the 8-bit remainder with the
// divisor on div, the remainder is appended below the data to form the
// 40-bit message {data, crc}, and a Hamming encoder adds six even-parity check
// bits to give the 46-bit outputdata. Example (div = 0x107):
// datain 0x87654321 -> CRC 0xD5 -> outputdata 0x3C5DCA8661D5.
//
// Timing: outputdata is the code of the datain value sampled at the last
// rising clock edge, so a new word appears one edge after it is applied; the
// path from the register to outputdata is combinational, and a change of div
// shows at once. There is no reset; the register holds what the first edge
// loads.
//
// Port names, widths and the chain CRC generator -> Hamming encoder follow
// the method. Registering the 32 data bits (and not the 46 output bits) is
// this design's choice, made to match the 32 registers the method reports for
// its transmitter. outputdata[45] is code position 1.
module transmitter #(
  parameter int unsigned DATA_W = edac_pkg::DATA_W,
  parameter int unsigned CRC_W  = edac_pkg::CRC_W,
  parameter int unsigned N      = edac_pkg::CODE_W
) (
  input  logic              clk,
  input  logic [CRC_W:0]    div,
  input  logic [DATA_W-1:0] datain,
  output logic [N-1:0]      outputdata
);

  logic [DATA_W-1:0] data_q;
  logic [CRC_W-1:0]  crc;

  always_ff @(posedge clk) data_q <= datain;

  crc_generator #(.DATA_W(DATA_W), .CRC_W(CRC_W)) u_crc (
    .data_i (data_q),
    .div_i  (div),
    .crc_o  (crc)
  );

  hamming_encoder #(.K(DATA_W + CRC_W), .N(N)) u_ham (
    .msg_i  ({data_q, crc}),
    .code_o (outputdata)
  );

endmodule
