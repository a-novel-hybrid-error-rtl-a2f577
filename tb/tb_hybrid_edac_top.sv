// tb_hybrid_edac_top: end-to-end test of the hybrid Hamming + CRC link with
// the top at its default sizes (32 data bits, CRC-8 0x107, 46-bit words).
//
// The testbench plays the two parts outside the top:
//  * the transmission medium: rx_word = tx_word XOR an error mask;
//  * the sender's repeat logic: while retrans is non-zero after a word, the
//    same data word is sent again.
// Each frame's first attempt meets one of four channels: clean, one flipped
// bit, two flipped bits anywhere, or a burst of 3 to 6 adjacent bits with
// both end bits flipped. Repeats meet a clean channel or one flipped bit.
// Every one of these patterns is either corrected by the Hamming code or
// flagged by the CRC, so each frame must finally arrive intact.
//
// Checked per attempt: tx_word is the reference code one edge after datain;
// sedandc right after the channel delivers the word; received and retrans one
// edge later, against the reference model. Counted: clean deliveries, single
// errors corrected without a repeat, repeat requests, frames that needed a
// repeat. A mechanism that never happened counts as a failure.
module tb_hybrid_edac_top;
  import edac_ref_pkg::*;

  localparam int FRAMES    = 400;
  localparam int MAX_TRIES = 8;

  logic        clk = 1'b0;
  logic [8:0]  div;
  logic [31:0] datain;
  logic [45:0] tx_word, rx_word, err_mask;
  logic [31:0] received;
  logic [7:0]  retrans;
  logic        sedandc;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_clean = 0, n_corrected = 0, n_retrans_req = 0, n_resent_frames = 0;

  hybrid_edac_top dut (
    .clk(clk), .div(div), .datain(datain), .tx_word(tx_word), .rx_word(rx_word),
    .received(received), .retrans(retrans), .sedandc(sedandc));

  // Transmission medium.
  assign rx_word = tx_word ^ err_mask;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [45:0] pos_bit(input int p);
    return 46'h1 << (46 - p);
  endfunction

  function automatic logic [45:0] make_error(input int kind);
    logic [45:0] e;
    int p, q, len;
    e = '0;
    case (kind)
      0: ;
      1: e = pos_bit($urandom_range(46, 1));
      2: begin
        p = $urandom_range(46, 1);
        do q = $urandom_range(46, 1); while (q == p);
        e = pos_bit(p) | pos_bit(q);
      end
      default: begin
        len = $urandom_range(6, 3);
        p   = $urandom_range(46 - len + 1, 1);
        e   = pos_bit(p) | pos_bit(p + len - 1);
        for (int i = 1; i < len - 1; i++) if ($urandom_range(1, 0) == 1) e |= pos_bit(p + i);
      end
    endcase
    return e;
  endfunction

  // One attempt: returns the retrans value the receiver produced.
  task automatic attempt(input logic [31:0] d, input logic [45:0] e, output logic [7:0] rt);
    logic [45:0] code;
    logic [39:0] m;
    code = ham_encode({d, crc_serial({32'h0, d}, 32, DIV)});
    m    = ham_decode(code ^ e);
    @(negedge clk);
    datain   = d;
    err_mask = e;
    @(posedge clk);
    #1;
    checks++;
    if (tx_word !== code) begin
      failures++;
      $display("FAIL tx_word=%h exp=%h", tx_word, code);
    end
    checks++;
    if (sedandc !== (syndrome_of(code ^ e) != 0)) begin
      failures++;
      $display("FAIL sedandc=%b for error %h", sedandc, e);
    end
    @(posedge clk);
    #1;
    checks++;
    if (received !== m[39:8] || retrans !== crc_serial({24'h0, m}, 40, DIV)) begin
      failures++;
      $display("FAIL error=%h received=%h/%h retrans=%h", e, received, m[39:8], retrans);
    end
    if (retrans != 8'h00) n_retrans_req++;
    else if (e != '0) n_corrected++;
    else n_clean++;
    rt = retrans;
  endtask

  initial begin
    logic [7:0] rt;
    int tries;
    div = DIV;
    datain = '0;
    err_mask = '0;
    repeat (2) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      logic [31:0] d;
      d = (f < N_TX) ? TX_DATA[f] : $urandom;
      attempt(d, make_error(f % 4), rt);
      tries = 1;
      while (rt != 8'h00 && tries < MAX_TRIES) begin
        attempt(d, make_error($urandom_range(1, 0)), rt);
        tries++;
      end
      if (tries > 1) n_resent_frames++;
      checks++;
      if (rt != 8'h00 || received !== d) begin
        failures++;
        $display("FAIL frame %0d: data %h arrived as %h after %0d tries", f, d, received, tries);
      end
    end
    $display("mechanisms: clean=%0d single_corrected=%0d retransmit_requests=%0d frames_resent=%0d",
             n_clean, n_corrected, n_retrans_req, n_resent_frames);
    checks += 4;
    if (n_clean == 0)         begin failures++; $display("FAIL no clean delivery"); end
    if (n_corrected == 0)     begin failures++; $display("FAIL no corrected single error"); end
    if (n_retrans_req == 0)   begin failures++; $display("FAIL no retransmission request"); end
    if (n_resent_frames == 0) begin failures++; $display("FAIL no frame resent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
