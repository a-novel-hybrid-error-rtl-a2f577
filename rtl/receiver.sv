// receiver: receiving end of the hybrid Hamming + CRC scheme.
//
// The 46-bit received word hamin goes through a Hamming decoder, which
// inverts the bit its syndrome points at and drops the six check bits,
// leaving the 40-bit message {data, crc}. A CRC checker divides that message
// (extended by 8 zero bits) by the divisor; a zero remainder means the frame
// is good. Single-bit errors are thus corrected on the spot (forward error
// correction), and anything the Hamming code cannot fix is caught by the CRC
// and answered with a request to resend (automatic repeat request).
//
// Outputs:
//   received  the 32 data bits of the corrected message.
//   retrans   the CRC remainder: 8'h00 when the frame is good, otherwise
//             non-zero, asking the sender to transmit the frame again.
//   sedandc   1 when the Hamming syndrome is non-zero, i.e. the decoder found
//             and inverted a bit.
//
// Timing: received and retrans are registered on the rising edge of clock
// (40 flip-flops), so they show the word present before the last edge;
// sedandc is combinational from hamin. There is no reset.
//
// Port names and widths, and the chain Hamming decoder -> CRC checker, follow
// the method; which outputs are registered is this design's choice, made to
// match the 40 flip-flops the method reports for its receiver. hamin[45] is
// code position 1.
module receiver #(
  parameter int unsigned DATA_W = edac_pkg::DATA_W,
  parameter int unsigned CRC_W  = edac_pkg::CRC_W,
  parameter int unsigned N      = edac_pkg::CODE_W
) (
  input  logic              clock,
  input  logic [CRC_W:0]    divisor,
  input  logic [N-1:0]      hamin,
  output logic [DATA_W-1:0] received,
  output logic [CRC_W-1:0]  retrans,
  output logic              sedandc
);

  localparam int unsigned K = DATA_W + CRC_W;

  logic [K-1:0]     msg;
  logic [CRC_W-1:0] remainder;

  hamming_decoder #(.K(K), .N(N)) u_ham (
    .code_i       (hamin),
    .msg_o        (msg),
    .syndrome_o   (),
    .single_err_o (sedandc)
  );

  crc_checker #(.K(K), .CRC_W(CRC_W)) u_crc (
    .msg_i (msg),
    .div_i (divisor),
    .rem_o (remainder)
  );

  always_ff @(posedge clock) begin
    received <= msg[K-1:CRC_W];
    retrans  <= remainder;
  end

endmodule
