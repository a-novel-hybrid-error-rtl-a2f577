// tb_hamming_decoder: checks hamming_decoder. Clean codewords must pass
// unchanged with syndrome 0; every single flipped position 1..46 must be
// reported as that position and corrected; two flipped bits must give a
// non-zero syndrome (their XOR). Also checks the published received words.
module tb_hamming_decoder;
  import edac_ref_pkg::*;

  logic [45:0] code;
  logic [39:0] msg;
  logic [5:0]  syn;
  logic        serr;
  int checks = 0, failures = 0;

  hamming_decoder dut (.code_i(code), .msg_o(msg), .syndrome_o(syn), .single_err_o(serr));

  task automatic check(input logic [39:0] exp_msg, input int exp_syn, input string what);
    checks++;
    if (msg !== exp_msg || int'(syn) != exp_syn || serr !== (exp_syn != 0)) begin
      failures++;
      $display("FAIL %s code=%h msg=%h/%h syn=%0d/%0d serr=%b", what, code, msg, exp_msg,
               syn, exp_syn, serr);
    end
  endtask

  initial begin
    for (int i = 0; i < N_RX; i++) begin
      code = RX_VEC[i].hamin;
      #1;
      checks++;
      if (msg[39:8] !== RX_VEC[i].data || serr !== RX_VEC[i].sedandc) begin
        failures++;
        $display("FAIL example %h data=%h exp=%h serr=%b", code, msg[39:8], RX_VEC[i].data, serr);
      end
    end
    for (int i = 0; i < 200; i++) begin
      logic [39:0] m;
      logic [45:0] c;
      int          p, q;
      m = {$urandom, 8'($urandom)};
      c = ham_encode(m);
      code = c;
      #1 check(m, 0, "clean");
      for (p = 1; p <= 46; p++) begin
        code = c ^ (46'h1 << (46 - p));
        #1 check(m, p, "single");
      end
      p = $urandom_range(46, 1);
      do q = $urandom_range(46, 1); while (q == p);
      code = c ^ (46'h1 << (46 - p)) ^ (46'h1 << (46 - q));
      #1;
      checks++;
      if (int'(syn) != (p ^ q) || !serr) begin
        failures++;
        $display("FAIL double p=%0d q=%0d syn=%0d", p, q, syn);
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
