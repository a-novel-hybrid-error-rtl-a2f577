// tb_receiver: checks the receiver with a 10 ns clock. Each received word is
// applied after a falling edge; sedandc must follow it at once, while
// received and retrans must keep their previous values until the next rising
// edge and show the new word's results after it. Words: the published
// received words (clean, one bit flipped, several bits flipped), then random
// codewords with none, one or two flipped bits against the reference model.
module tb_receiver;
  import edac_ref_pkg::*;

  logic        clock = 1'b0;
  logic [8:0]  divisor;
  logic [45:0] hamin;
  logic [31:0] received;
  logic [7:0]  retrans;
  logic        sedandc;
  int checks = 0, failures = 0;
  int cycles = 0;
  int n_clean = 0, n_corrected = 0, n_retrans = 0;

  receiver dut (.clock(clock), .divisor(divisor), .hamin(hamin), .received(received),
                .retrans(retrans), .sedandc(sedandc));

  always #5 clock = ~clock;
  always @(posedge clock) cycles++;

  task automatic apply(input logic [45:0] w, input logic [31:0] exp_data,
                       input logic [7:0] exp_rt, input logic exp_se);
    logic [31:0] prev_d;
    logic [7:0]  prev_r;
    @(negedge clock);
    prev_d = received;
    prev_r = retrans;
    hamin  = w;
    #1;
    checks++;
    if (sedandc !== exp_se) begin
      failures++;
      $display("FAIL hamin=%h sedandc=%b exp=%b", w, sedandc, exp_se);
    end
    checks++;
    if (received !== prev_d || retrans !== prev_r) begin
      failures++;
      $display("FAIL registered outputs changed before the clock edge");
    end
    @(posedge clock);
    #1;
    checks++;
    if (received !== exp_data || retrans !== exp_rt) begin
      failures++;
      $display("FAIL hamin=%h received=%h/%h retrans=%h/%h", w, received, exp_data,
               retrans, exp_rt);
    end
    if (exp_rt != 0) n_retrans++;
    else if (exp_se) n_corrected++;
    else n_clean++;
  endtask

  initial begin
    divisor = DIV;
    hamin = '0;
    @(posedge clock);
    for (int i = 0; i < N_RX; i++)
      apply(RX_VEC[i].hamin, RX_VEC[i].data, RX_VEC[i].retrans, RX_VEC[i].sedandc);
    for (int i = 0; i < 600; i++) begin
      logic [31:0] d;
      logic [45:0] w;
      logic [39:0] m;
      int          p, q;
      d = $urandom;
      w = ham_encode({d, crc_serial({32'h0, d}, 32, DIV)});
      p = $urandom_range(46, 1);
      do q = $urandom_range(46, 1); while (q == p);
      case (i % 3)
        0: ;
        1: w[46 - p] = ~w[46 - p];
        default: begin
          w[46 - p] = ~w[46 - p];
          w[46 - q] = ~w[46 - q];
        end
      endcase
      m = ham_decode(w);
      apply(w, m[39:8], crc_serial({24'h0, m}, 40, DIV), syndrome_of(w) != 0);
      // Any two flipped bits must be caught by the CRC.
      checks++;
      if (i % 3 == 2 && retrans == 8'h00) begin
        failures++;
        $display("FAIL double error not flagged: hamin=%h", w);
      end
    end
    $display("receiver: clean=%0d corrected=%0d retransmit=%0d", n_clean, n_corrected, n_retrans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
