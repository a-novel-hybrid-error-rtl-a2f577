// tb_transmitter: checks the transmitter with a 10 ns clock. Each word is
// applied after a falling edge; the output must still show the previous
// word's code just before the next rising edge and the new word's code just
// after it (one edge of latency). Words: the published examples with their
// published codes, then random words against the reference model.
module tb_transmitter;
  import edac_ref_pkg::*;

  logic        clk = 1'b0;
  logic [8:0]  div;
  logic [31:0] datain;
  logic [45:0] outputdata;
  int checks = 0, failures = 0;
  int cycles = 0;

  transmitter dut (.clk(clk), .div(div), .datain(datain), .outputdata(outputdata));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [45:0] model(input logic [31:0] d);
    return ham_encode({d, crc_serial({32'h0, d}, 32, DIV)});
  endfunction

  task automatic send(input logic [31:0] d, input logic [45:0] exp);
    logic [45:0] prev_out;
    @(negedge clk);
    prev_out = outputdata;
    datain = d;
    #4;  // 1 ns before the rising edge
    checks++;
    if (outputdata !== prev_out) begin
      failures++;
      $display("FAIL output changed before the clock edge: %h", outputdata);
    end
    @(posedge clk);
    #1;
    checks++;
    if (outputdata !== exp) begin
      failures++;
      $display("FAIL datain=%h outputdata=%h exp=%h", d, outputdata, exp);
    end
  endtask

  initial begin
    div = DIV;
    datain = '0;
    @(posedge clk);
    for (int i = 0; i < N_TX; i++) send(TX_DATA[i], TX_CODE[i]);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] d;
      d = $urandom;
      send(d, model(d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
