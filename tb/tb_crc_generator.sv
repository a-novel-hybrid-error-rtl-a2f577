// tb_crc_generator: checks crc_generator against the published example words
// (the low byte of each 40-bit message) and against a bit-serial CRC model
// on random words and random divisors with the top bit set. It also checks
// that {data, crc} leaves no remainder.
module tb_crc_generator;
  import edac_ref_pkg::*;

  logic [31:0] data;
  logic [8:0]  div;
  logic [7:0]  crc;
  int checks = 0, failures = 0;

  crc_generator dut (.data_i(data), .div_i(div), .crc_o(crc));

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (crc !== exp) begin
      failures++;
      $display("FAIL %s data=%h div=%h crc=%h exp=%h", what, data, div, crc, exp);
    end
  endtask

  initial begin
    // Expected CRCs of the example words, read off their published codes
    // (message bit order: data then CRC, see ham_decode).
    div = DIV;
    for (int i = 0; i < N_TX; i++) begin
      logic [39:0] m;
      m = ham_decode(TX_CODE[i]);
      data = TX_DATA[i];
      #1 check(m[7:0], "example");
    end
    data = 32'h87654321; #1 check(8'hD5, "0x87654321");
    data = 32'h0;        #1 check(8'h00, "zero");
    for (int i = 0; i < 2000; i++) begin
      data = $urandom;
      div  = (i < 1000) ? DIV : {1'b1, 8'($urandom)};
      #1;
      check(crc_serial({32'h0, data}, 32, div), "random");
      checks++;
      if (crc_serial({24'h0, data, crc}, 40, div) != 8'h00 && div == DIV) begin
        failures++;
        $display("FAIL codeword not divisible data=%h crc=%h", data, crc);
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
