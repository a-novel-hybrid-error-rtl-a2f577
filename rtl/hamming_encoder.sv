// hamming_encoder: even-parity Hamming encoder, K message bits to N code bits.
//
// Code positions are numbered 1..N. The check bits R1, R2, R4, ... sit at the
// power-of-two positions, and the message bits fill the other positions in
// order: msg_i[K-1] (the first message bit) goes to position 3, the next to
// position 5, then 6, 7, 9, and so on up to position N. Check bit R(2^j) is
// the XOR of every message bit whose position has bit j set, so each parity
// group, check bit included, has even parity. With K = 40 and N = 46 these are
// the six check bits R1..R32 of the method.
//
// Bit order on the port: code_o[N-1] is position 1 and code_o[0] is position
// N, so the word read as a hex number starts with position 1, as the method
// prints its codewords.
//
// Interface: purely combinational.
module hamming_encoder #(
  parameter int unsigned K = edac_pkg::MSG_W,
  parameter int unsigned N = edac_pkg::CODE_W
) (
  input  logic [K-1:0] msg_i,
  output logic [N-1:0] code_o
);

  localparam int unsigned R = edac_pkg::hamming_check_bits(K);

  if (N != K + R) begin : g_bad_size
    $error("hamming_encoder: N must be K + %0d", R);
  end

  always_comb begin
    logic [N-1:0] code;
    int           k;
    logic         par;
    code = '0;
    // Message bits into the positions that are not powers of two.
    k = int'(K) - 1;
    for (int p = 1; p <= int'(N); p++) begin
      if ((p & (p - 1)) != 0) begin
        code[int'(N) - p] = msg_i[k];
        k--;
      end
    end
    // Check bit at position 2^j covers every position with bit j set.
    for (int j = 0; j < int'(R); j++) begin
      par = 1'b0;
      for (int p = 1; p <= int'(N); p++) begin
        if (p[j] && ((p & (p - 1)) != 0)) par ^= code[int'(N) - p];
      end
      code[int'(N) - (1 << j)] = par;
    end
    code_o = code;
  end

endmodule
