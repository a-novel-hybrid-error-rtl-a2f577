// edac_pkg: sizes and the default divisor shared by the hybrid Hamming + CRC
// error detection and correction (EDAC) blocks.
//
// A 32-bit data word gets an 8-bit CRC appended (40-bit message), and the
// message is then protected by a 6-check-bit even-parity Hamming code
// (46-bit word on the line). The divisor is the ATM header-error-check
// polynomial x^8 + x^2 + x + 1, written as the 9-bit value 0x107. These sizes
// and the polynomial follow the method this RTL implements; the package itself
// is only a convenience of this code base.
package edac_pkg;

  localparam int unsigned DATA_W = 32;              // payload bits
  localparam int unsigned CRC_W  = 8;               // CRC remainder bits
  localparam int unsigned MSG_W  = DATA_W + CRC_W;  // Hamming message bits (40)
  localparam int unsigned PAR_W  = 6;               // Hamming check bits
  localparam int unsigned CODE_W = MSG_W + PAR_W;   // bits on the line (46)

  // CRC-8 divisor x^8 + x^2 + x + 1 (bit 8 is the x^8 term).
  localparam logic [CRC_W:0] CRC8_ATM_DIV = 9'h107;

  // Number of check bits r an even-parity Hamming code needs for m message
  // bits: the smallest r with 2^r >= m + r + 1.
  function automatic int unsigned hamming_check_bits(input int unsigned m);
    int unsigned r;
    r = 0;
    while ((1 << r) < m + r + 1) r++;
    return r;
  endfunction

endpackage
