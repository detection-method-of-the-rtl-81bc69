// tb_sticky_shift_reg - random self-check of the sticky registration / shift register.
// A reference model kept in the testbench applies the same rule set each clock:
// reset clears, L=1 ORs the parallel input into the state, L=0 shifts toward the MSB
// with SI entering bit 0. State and SO are compared after every edge. Dedicated
// phases make sure that a set bit is offered a 0 input in registration mode (sticky
// hold) and that a full 16-bit word is shifted out through SO in MSB-first order.
module tb_sticky_shift_reg;
  localparam int W = 16;
  logic clk = 0, rst, l, si;
  logic [W-1:0] d, q, ref_q;
  logic so;
  int checks = 0, failures = 0;
  int n_hold = 0;

  sticky_shift_reg #(.W(W)) dut (.clk, .rst, .l, .si, .d, .q, .so);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic nl, input logic nsi, input logic [W-1:0] nd);
    l = nl; si = nsi; d = nd;
    @(posedge clk);
    if (nl) begin
      if ((ref_q & ~nd) != 0) n_hold++;
      ref_q = ref_q | nd;
    end else begin
      ref_q = {ref_q[W-2:0], nsi};
    end
    #1;
    checks++;
    if (q !== ref_q || so !== ref_q[W-1]) begin
      failures++;
      $display("FAIL t=%0t l=%b q=%h exp=%h so=%b", $time, nl, q, ref_q, so);
    end
  endtask

  initial begin
    l = 1; si = 0; d = '0;
    rst = 1; #12; rst = 0; ref_q = '0;
    checks++; if (q !== '0) failures++;
    // registration of a few one-hot words, then zeros: bits must stay
    step(1, 0, 16'h0008);
    step(1, 0, 16'h8000);
    step(1, 0, 16'h0000);
    step(1, 0, 16'h0001);
    checks++; if (q !== 16'h8009) failures++;
    // shift the word out, MSB first, with SI = 1 filling from bit 0
    for (int i = 0; i < W; i++) begin
      checks++;
      if (so !== ref_q[W-1]) failures++;
      step(0, 1, $urandom());
    end
    checks++; if (q !== 16'hFFFF) failures++;
    // random mix
    for (int n = 0; n < 2000; n++) begin
      if (n % 500 == 499) begin
        rst = 1; #1; ref_q = '0; checks++; if (q !== '0) failures++;
        @(posedge clk); #1; checks++; if (q !== '0) failures++; @(negedge clk); rst = 0;
      end
      step(1'($urandom_range(0, 2) != 0), 1'($urandom()), 16'h1 << $urandom_range(0, 15));
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("FAIL sticky hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
