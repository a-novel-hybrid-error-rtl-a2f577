// tb_hamming_encoder: checks hamming_encoder against the published 46-bit
// codes of the example words and, for random messages, against the
// XOR-of-positions model; every output must also have a zero syndrome.
module tb_hamming_encoder;
  import edac_ref_pkg::*;

  logic [39:0] msg;
  logic [45:0] code;
  int checks = 0, failures = 0;

  hamming_encoder dut (.msg_i(msg), .code_o(code));

  task automatic check(input logic [45:0] exp, input string what);
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s msg=%h code=%h exp=%h", what, msg, code, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < N_TX; i++) begin
      msg = {TX_DATA[i], crc_serial({32'h0, TX_DATA[i]}, 32, DIV)};
      #1 check(TX_CODE[i], "example");
    end
    // Each single message bit must land at its own position and set the
    // check bits of that position.
    for (int b = 0; b < 40; b++) begin
      msg = 40'h1 << b;
      #1 check(ham_encode(msg), "one-hot");
    end
    for (int i = 0; i < 2000; i++) begin
      msg = {$urandom, 8'($urandom)};
      #1 check(ham_encode(msg), "random");
      checks++;
      if (syndrome_of(code) != 0) begin
        failures++;
        $display("FAIL non-zero syndrome code=%h", code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
