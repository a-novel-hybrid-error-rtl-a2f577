// edac_ref_pkg: reference models and known-answer vectors for the testbenches.
//
// The models are written differently from the RTL on purpose:
//  * CRC: a bit-serial shift register (feedback = top bit XOR next input bit),
//    instead of the RTL's unrolled long division.
//  * Hamming: the "XOR of the positions of all ones" view of the code. For a
//    valid even-parity Hamming word the XOR of the positions (1..46) of its
//    1-bits is zero, so the check bits of a word are the bits of the XOR of
//    the positions of its 1-valued message bits, and the syndrome of a
//    received word is the XOR of the positions of its 1-bits.
// Bit order: position 1 is bit 45 of a 46-bit word (the leftmost hex digit).
//
// The known-answer vectors are the published example words of the method:
// data words with their 46-bit codes, and received words (clean, one bit
// flipped, several bits flipped) with the expected data, CRC remainder and
// single-error flag.
package edac_ref_pkg;

  localparam logic [8:0] DIV = 9'h107;

  // Serial CRC-8 of n bits of v (MSB first) with the polynomial poly:
  // the remainder of v * x^8 modulo poly.
  function automatic logic [7:0] crc_serial(input logic [63:0] v, input int n,
                                           input logic [8:0] poly);
    logic [7:0] c;
    logic       fb;
    c = '0;
    for (int i = n - 1; i >= 0; i--) begin
      fb = c[7] ^ v[i];
      c  = {c[6:0], 1'b0};
      if (fb) c ^= poly[7:0];
    end
    return c;
  endfunction

  function automatic bit is_pow2(input int p);
    return (p & (p - 1)) == 0;
  endfunction

  // 40-bit message -> 46-bit Hamming word, via the XOR of positions.
  function automatic logic [45:0] ham_encode(input logic [39:0] msg);
    logic [45:0] w;
    int          k;
    int          acc;
    w = '0; k = 39; acc = 0;
    for (int p = 1; p <= 46; p++) begin
      if (!is_pow2(p)) begin
        w[46 - p] = msg[k];
        if (msg[k]) acc ^= p;
        k--;
      end
    end
    for (int j = 0; j < 6; j++) w[46 - (1 << j)] = acc[j];
    return w;
  endfunction

  function automatic int syndrome_of(input logic [45:0] w);
    int acc;
    acc = 0;
    for (int p = 1; p <= 46; p++) if (w[46 - p]) acc ^= p;
    return acc;
  endfunction

  // Correct the bit the syndrome names (if any) and strip the check bits.
  function automatic logic [39:0] ham_decode(input logic [45:0] w);
    logic [39:0] m;
    int          s;
    int          k;
    s = syndrome_of(w);
    if (s >= 1 && s <= 46) w[46 - s] = ~w[46 - s];
    k = 39;
    for (int p = 1; p <= 46; p++) begin
      if (!is_pow2(p)) begin
        m[k] = w[46 - p];
        k--;
      end
    end
    return m;
  endfunction

  // Known answers: data word -> transmitted word.
  localparam int N_TX = 8;
  localparam logic [31:0] TX_DATA [N_TX] = '{
    32'h87654321, 32'hAAAAAAAA, 32'hFFFFFFFF, 32'h1A2B3C4D,
    32'hF0F0F0F0, 32'h198491AD, 32'hFEDCBA98, 32'h13579024};
  localparam logic [45:0] TX_CODE [N_TX] = '{
    46'h3C5DCA8661D5, 46'h1D2AD5556A69, 46'h3FBFFFFFBFDE, 46'h20A896788DB5,
    46'h0F83E1E1B0A5, 46'h20A649236DDF, 46'h1BBB7975181E, 46'h208D2F202472};

  // Known answers: received word -> data, remainder, single-error flag.
  typedef struct packed {
    logic [45:0] hamin;
    logic [31:0] data;
    logic [7:0]  retrans;
    logic        sedandc;
  } rx_vec_t;

  localparam int N_RX = 16;
  localparam rx_vec_t RX_VEC [N_RX] = '{
    '{46'h3C5DCA8661D5, 32'h87654321, 8'h00, 1'b0},
    '{46'h3C5DCA8661D4, 32'h87654321, 8'h00, 1'b1},
    '{46'h1D2AD5556A69, 32'hAAAAAAAA, 8'h00, 1'b0},
    '{46'h1D2AD5556A65, 32'hBAAAAAAA, 8'h16, 1'b1},
    '{46'h3FBFFFFFBFDE, 32'hFFFFFFFF, 8'h00, 1'b0},
    '{46'h3FBFFFFFBFDF, 32'hFFFFFFFF, 8'h00, 1'b1},
    '{46'h20A896788DB5, 32'h1A2B3C4D, 8'h00, 1'b0},
    '{46'h20A896788DB1, 32'h1A2B3C4D, 8'h00, 1'b1},
    '{46'h0F83E1E1B0A5, 32'hF0F0F0F0, 8'h00, 1'b0},
    '{46'h0F83E101B0A5, 32'hF0F000F0, 8'h6C, 1'b1},
    '{46'h20A649236DDF, 32'h198491AD, 8'h00, 1'b0},
    '{46'h20A649A36DDF, 32'h198491AD, 8'h00, 1'b1},
    '{46'h1BBB7975181E, 32'hFEDCBA98, 8'h00, 1'b0},
    '{46'h1BBB79751B1E, 32'h7EDCBA9B, 8'hA8, 1'b1},
    '{46'h208D2F202472, 32'h13579024, 8'h00, 1'b0},
    '{46'h208D2F202471, 32'h93579024, 8'h9E, 1'b1}};

endpackage
