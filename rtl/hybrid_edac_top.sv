// hybrid_edac_top: both ends of the hybrid Hamming + CRC link.
//
// The transmitter turns datain into a 46-bit word (CRC-8 appended, then
// Hamming-encoded) on tx_word. The transmission medium is outside this
// module: whatever it delivers comes back in on rx_word, where the receiver
// corrects a single flipped bit, strips the check bits and checks the CRC.
// received is the corrected data, sedandc says a bit was corrected, and
// retrans is non-zero when the CRC failed: the sender must then send the same
// word again. Closing that loop (holding datain and resending) is up to the
// logic that drives datain, since the transmitter has no input for it.
//
// Timing: tx_word follows datain one rising edge of clk later; received and
// retrans follow rx_word one edge later; sedandc is combinational from
// rx_word. With rx_word = tx_word a word therefore takes two edges from
// datain to received. One divisor input (0x107 for the method's CRC-8) feeds
// both ends. The split of the medium into two ports is this design's choice.
module hybrid_edac_top #(
  parameter int unsigned DATA_W = edac_pkg::DATA_W,
  parameter int unsigned CRC_W  = edac_pkg::CRC_W,
  parameter int unsigned N      = edac_pkg::CODE_W
) (
  input  logic              clk,
  input  logic [CRC_W:0]    div,
  input  logic [DATA_W-1:0] datain,
  output logic [N-1:0]      tx_word,
  input  logic [N-1:0]      rx_word,
  output logic [DATA_W-1:0] received,
  output logic [CRC_W-1:0]  retrans,
  output logic              sedandc
);

  transmitter #(.DATA_W(DATA_W), .CRC_W(CRC_W), .N(N)) u_tx (
    .clk        (clk),
    .div        (div),
    .datain     (datain),
    .outputdata (tx_word)
  );

  receiver #(.DATA_W(DATA_W), .CRC_W(CRC_W), .N(N)) u_rx (
    .clock    (clk),
    .divisor  (div),
    .hamin    (rx_word),
    .received (received),
    .retrans  (retrans),
    .sedandc  (sedandc)
  );

endmodule
