// tb_crc_checker: checks crc_checker. Valid messages {data, crc} must give a
// zero remainder; the corrected messages of the published corrupted example
// words must give the published retransmission values (0x16, 0x6C, 0xA8,
// 0x9E); random messages are compared with a bit-serial CRC model.
module tb_crc_checker;
  import edac_ref_pkg::*;

  logic [39:0] msg;
  logic [8:0]  div;
  logic [7:0]  rem;
  int checks = 0, failures = 0;

  crc_checker dut (.msg_i(msg), .div_i(div), .rem_o(rem));

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (rem !== exp) begin
      failures++;
      $display("FAIL %s msg=%h div=%h rem=%h exp=%h", what, msg, div, rem, exp);
    end
  endtask

  initial begin
    div = DIV;
    for (int i = 0; i < N_RX; i++) begin
      msg = ham_decode(RX_VEC[i].hamin);
      #1 check(RX_VEC[i].retrans, "example");
    end
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] d;
      d = $urandom;
      msg = {d, crc_serial({32'h0, d}, 32, DIV)};
      #1 check(8'h00, "valid");
      msg[$urandom_range(39, 0)] ^= 1'b1;
      #1 check(crc_serial({24'h0, msg}, 40, DIV), "one bit flipped");
      checks++;
      if (rem == 8'h00) begin
        failures++;
        $display("FAIL single error not detected msg=%h", msg);
      end
    end
    for (int i = 0; i < 1000; i++) begin
      msg = {$urandom, 8'($urandom)};
      div = {1'b1, 8'($urandom)};
      #1 check(crc_serial({24'h0, msg}, 40, div), "random");
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
