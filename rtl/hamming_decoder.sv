// hamming_decoder: even-parity Hamming decoder, N code bits to K message bits.
//
// Syndrome bit j is the XOR of every received bit whose position (1..N) has
// bit j set, check bit included; read as a number (bit R-1 first) the
// syndrome is the position of a single flipped bit, or 0 when all groups have
// even parity. The bit at that position is inverted, the check bits at the
// power-of-two positions are dropped, and the remaining bits, in position
// order, form msg_o (position 3 becomes msg_o[K-1]). single_err_o is 1
// whenever the syndrome is non-zero: the decoder then assumes one error and
// corrects it. Two or more flipped bits also give a non-zero syndrome and
// make it invert a wrong bit; catching that is left to the CRC check behind
// it. A syndrome above N names no bit, and then nothing is inverted (this
// design's choice).
//
// Bit order on the port: code_i[N-1] is position 1, as in hamming_encoder.
// Interface: purely combinational.
module hamming_decoder #(
  parameter int unsigned K = edac_pkg::MSG_W,
  parameter int unsigned N = edac_pkg::CODE_W,
  localparam int unsigned R = edac_pkg::hamming_check_bits(K)
) (
  input  logic [N-1:0] code_i,
  output logic [K-1:0] msg_o,
  output logic [R-1:0] syndrome_o,
  output logic         single_err_o
);

  if (N != K + R) begin : g_bad_size
    $error("hamming_decoder: N must be K + %0d", R);
  end

  logic [R-1:0] syndrome;
  logic [N-1:0] corrected;

  always_comb begin
    for (int j = 0; j < int'(R); j++) begin
      syndrome[j] = 1'b0;
      for (int p = 1; p <= int'(N); p++) begin
        if (p[j]) syndrome[j] ^= code_i[int'(N) - p];
      end
    end
  end

  always_comb begin
    int k;
    // Invert the bit the syndrome points at.
    corrected = code_i;
    for (int p = 1; p <= int'(N); p++) begin
      if (int'(syndrome) == p) corrected[int'(N) - p] = ~code_i[int'(N) - p];
    end
    // Drop the check bits.
    msg_o = '0;
    k = int'(K) - 1;
    for (int p = 1; p <= int'(N); p++) begin
      if ((p & (p - 1)) != 0) begin
        msg_o[k] = corrected[int'(N) - p];
        k--;
      end
    end
  end

  assign syndrome_o   = syndrome;
  assign single_err_o = (syndrome != '0);

endmodule
