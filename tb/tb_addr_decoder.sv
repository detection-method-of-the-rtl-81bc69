// tb_addr_decoder - exhaustive self-check of the 4-to-16 address decoder.
// Every address 0..15 is applied; the output must be exactly the word with only bit
// <address> set (expected value built with a shift, independently of the DUT).
module tb_addr_decoder;
  logic [3:0]  addr;
  logic [15:0] onehot;
  int checks = 0, failures = 0;

  addr_decoder #(.K(4)) dut (.addr(addr), .onehot(onehot));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a);
      #1;
      checks++;
      if (onehot !== (16'h1 << a)) begin
        failures++;
        $display("FAIL addr=%0d onehot=%h", a, onehot);
      end
      checks++;
      if ($countones(onehot) != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
